// line_buffer_tb: self-checking test of the rotating four-line buffer.
//
// The testbench streams lines of known pixels into the buffer and plays the
// ditherer's part itself: for every column it receives it writes back a
// marked value for the column two (FS) or four (JJN) positions behind, using
// the line tags the buffer handed out.  A model indexed by absolute line
// number predicts every value read: the top row must carry the write-backs of
// the previous pass, the lower rows the raw or partly written values.  It
// checks the column, frame row and line tags of every read, the two-cycle
// read latency, both algorithms, pixels arriving every cycle and every third
// cycle, and that glitch mode (roles rotating while the last column is held)
// changes what is read.
module line_buffer_tb;
  import dither_pkg::*;
  localparam int W = 16;
  localparam int H = 8;

  logic   clk = 0, rst = 1;
  alg_e   alg;
  logic   glitch_mode;
  logic   bw_valid;
  col_t   bw_hcount;
  row_t   bw_vcount;
  pix_t   bw;
  lb_rd_t rd;
  lb_wb_t wb;
  int     checks = 0, failures = 0;

  line_buffer #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected content of absolute line n (kept modulo 16 lines)
  int exp_v [16][W];
  function automatic int rawv(int n, int c);
    return (n * 37 + c * 11 + 5) % 256;
  endfunction
  function automatic int wbv(int n, int c);
    return (n * 53 + c * 29 + 131) % 256;
  endfunction

  // what was sent, per absolute input index
  int sent_line [$];
  int sent_col  [$];
  int sent_cyc  [$];

  // the testbench's own "ditherer": positions and absolute lines waiting to
  // be written back
  typedef struct {pos_t pos; int l1; int l2;} pend_t;
  pend_t pend [$];
  int lag, offs;
  logic checking, glitch_seen;
  int glitch_mismatch;

  always @(posedge clk) begin
    wb.v1 <= 1'b0;
    wb.v2 <= 1'b0;
    if (rd.pos.valid && sent_line.size() > 0) begin
      int n, c, t;
      n = sent_line.pop_front();
      c = sent_col.pop_front();
      t = sent_cyc.pop_front();
      if (checking) begin
        int d;
        d = n - lag;   // absolute line being dithered
        checks++;
        if (int'(rd.pos.col) != c || int'(rd.pos.row) != ((d % H) + H) % H || cyc - t != 2) begin
          failures++;
          $display("pos mismatch: col %0d/%0d row %0d/%0d latency %0d", rd.pos.col, c, rd.pos.row, ((d % H) + H) % H, cyc - t);
        end
        if (d >= 0) begin
          checks++;
          if (glitch_mode) begin
            if (int'(rd.p0) != exp_v[d % 16][c]) glitch_mismatch++;
          end else if (int'(rd.p0) != exp_v[d % 16][c] ||
                       int'(rd.p1) != exp_v[(d + 1) % 16][c] ||
                       (alg == ALG_JJN && int'(rd.p2) != exp_v[(d + 2) % 16][c])) begin
            failures++;
            if (failures < 10)
              $display("data mismatch line %0d col %0d: %0d %0d %0d exp %0d %0d %0d", d, c, rd.p0, rd.p1, rd.p2,
                       exp_v[d % 16][c], exp_v[(d + 1) % 16][c], exp_v[(d + 2) % 16][c]);
          end
        end
        pend.push_back('{pos: rd.pos, l1: d + 1, l2: d + 2});
        if (pend.size() > offs) begin
          pend_t q;
          q = pend.pop_front();
          if (!glitch_mode) begin
            wb.v1   <= 1'b1;
            wb.tag1 <= q.pos.tag1;
            wb.col  <= q.pos.col;
            wb.d1   <= pix_t'(wbv(q.l1, int'(q.pos.col)));
            exp_v[q.l1 % 16][q.pos.col] = wbv(q.l1, int'(q.pos.col));
            if (alg == ALG_JJN) begin
              wb.v2   <= 1'b1;
              wb.tag2 <= q.pos.tag2;
              wb.d2   <= pix_t'(wbv(q.l2 + 1000, int'(q.pos.col)));
              exp_v[q.l2 % 16][q.pos.col] = wbv(q.l2 + 1000, int'(q.pos.col));
            end
          end
        end
      end
    end
  end

  task automatic stream(alg_e a, int lines, int gap, logic glitch);
    rst = 1;
    alg = a;
    glitch_mode = glitch;
    lag  = (a == ALG_JJN) ? 3 : 2;
    offs = (a == ALG_JJN) ? 4 : 2;
    pend.delete();
    bw_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checking = 1;
    for (int n = 0; n < lines; n++)
      for (int c = 0; c < W; c++) begin
        bw_valid  <= 1'b1;
        bw_hcount <= col_t'(c);
        bw_vcount <= row_t'(n % H);
        bw        <= pix_t'(rawv(n, c));
        exp_v[n % 16][c] = rawv(n, c);
        sent_line.push_back(n);
        sent_col.push_back(c);
        sent_cyc.push_back(cyc);
        @(posedge clk);
        #1;
        if (gap > 0) begin
          bw_valid <= 1'b0;
          repeat (gap) begin
            @(posedge clk);
            #1;
          end
        end
      end
    bw_valid <= 1'b0;
    repeat (6) @(posedge clk);
    #1;
    checking = 0;
  endtask

  initial begin
    wb = '0;
    bw_valid = 0;
    bw_hcount = '0;
    bw_vcount = '0;
    bw = '0;
    checking = 0;
    glitch_mismatch = 0;
    stream(ALG_FS, 3 * H, 0, 1'b0);
    stream(ALG_FS, 2 * H, 2, 1'b0);
    stream(ALG_JJN, 3 * H, 0, 1'b0);
    stream(ALG_JJN, 2 * H, 2, 1'b0);
    stream(ALG_FS, 2 * H, 2, 1'b1);
    checks++;
    if (glitch_mismatch == 0) begin
      failures++;
      $display("glitch mode did not change the line order");
    end
    $display("glitch mode: %0d reads differ from the normal order", glitch_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
