// dither_fs_tb: self-checking test of the Floyd-Steinberg ditherer.
//
// A behavioural frame memory stands in for the line buffer: for every column
// it supplies the pixel of the row being dithered and the row below, and it
// applies the ditherer's write-backs, resolving the line tag to a row (tag =
// row mod 4).  The ditherer's bits are compared with a plain raster-order
// Floyd-Steinberg reference computed here over the whole frame with the same
// arithmetic (shares truncated toward zero, each sum clamped to 0..255).
// It also checks that, with one column per cycle, a pixel's bit appears two
// cycles after the pixel entered.
module dither_fs_tb;
  import dither_pkg::*;
  localparam int W = 320;
  localparam int H = 240;

  logic   clk = 0, rst = 1;
  pix_t   threshold;
  lb_rd_t in;
  lb_wb_t wb;
  logic   out_valid, out_bit;
  col_t   out_col;
  row_t   out_row;
  int     checks = 0, failures = 0;

  dither_fs #(.H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   raw  [H][W];
  int   work [H][W];
  int   ref_bits [H][W];
  int   got  [H][W];
  int   t_in [H][W];
  int   t_out[H][W];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sh(int e, int num, int den);
    return (e * num) / den;   // integer division truncates toward zero
  endfunction
  function automatic int clampi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  task automatic reference(int thr);
    int img[H][W];
    img = raw;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int b, e;
        b = (img[r][c] >= thr) ? 1 : 0;
        e = img[r][c] - (b ? 255 : 0);
        ref_bits[r][c] = b;
        if (c + 1 < W) img[r][c+1] = clampi(img[r][c+1] + sh(e, 7, 16));
        if (r + 1 < H) begin
          if (c > 0)     img[r+1][c-1] = clampi(img[r+1][c-1] + sh(e, 3, 16));
                         img[r+1][c]   = clampi(img[r+1][c]   + sh(e, 5, 16));
          if (c + 1 < W) img[r+1][c+1] = clampi(img[r+1][c+1] + sh(e, 1, 16));
        end
      end
  endtask

  // write-backs into the frame model
  int cur_row;
  always @(posedge clk) begin
    if (wb.v1 && int'(wb.col) < W) begin
      int tr;
      tr = -1;
      for (int k = cur_row - 1; k <= cur_row + 2; k++)
        if (k >= 0 && k < H && (k % 4) == int'(wb.tag1)) tr = k;
      // the last row's "row below" is outside the frame: nothing to update
      if (tr < 0 && cur_row < H - 1) begin failures++; $display("write-back to unknown line %0d", wb.tag1); end
      else if (tr >= 0) work[tr][wb.col] = int'(wb.d1);
    end
    if (out_valid) begin
      got[out_row][out_col] = int'(out_bit);
      t_out[out_row][out_col] = cyc;
    end
  end

  task automatic run_frame(int thr, int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        case (kind)
          0: raw[r][c] = int'($urandom_range(0, 255));
          1: raw[r][c] = (c * 255) / (W - 1);
          default: raw[r][c] = (r * 7 + c * 3) % 256;
        endcase
        got[r][c] = -1;
      end
    work = raw;
    reference(thr);
    threshold = pix_t'(thr);
    #1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        cur_row = r;
        in.pos  <= '{valid: 1'b1, col: col_t'(c), row: row_t'(r),
                     tag1: line_t'((r + 1) % 4), tag2: line_t'((r + 2) % 4)};
        in.p0   <= pix_t'(work[r][c]);
        in.p1   <= pix_t'((r + 1 < H) ? work[r+1][c] : 0);
        in.p2   <= '0;
        t_in[r][c] = cyc;   // the cycle in which the column is presented
        @(posedge clk);
        #1;
      end
    // flush the window with two columns of an unrelated row, placed beyond
    // the frame width so their own write-backs are ignored
    for (int k = 0; k < 2; k++) begin
      in.pos <= '{valid: 1'b1, col: col_t'(W + k), row: row_t'(H + 5), tag1: 2'd0, tag2: 2'd0};
      @(posedge clk);
      #1;
    end
    in.pos.valid <= 1'b0;
    repeat (4) @(posedge clk);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (got[r][c] != ref_bits[r][c]) begin
          failures++;
          if (failures < 10) $display("bit (%0d,%0d) got %0d expected %0d", r, c, got[r][c], ref_bits[r][c]);
        end
      end
    // latency: every pixel but the last two of the frame
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        if (!(r == H - 1 && c >= W - 2)) begin
          checks++;
          if (t_out[r][c] - t_in[r][c] != 2) begin
            failures++;
            if (failures < 10) $display("latency (%0d,%0d) = %0d", r, c, t_out[r][c] - t_in[r][c]);
          end
        end
  endtask

  initial begin
    in = '0;
    threshold = 8'd128;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run_frame(128, 0);
    run_frame(100, 1);
    run_frame(170, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
