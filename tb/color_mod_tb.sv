// color_mod_tb: checks every grayscale flavour of color_mod (average, R, G,
// B, Y, Cr, Cb) on random RGB565 pixels, the three-cycle latency of value,
// strobe and coordinates, and that the flavour may change every cycle.
module color_mod_tb;
  import dither_pkg::*;
  logic        clk = 0, rst = 1;
  logic [2:0]  sel;
  logic        valid_in;
  logic [15:0] pixel_in;
  col_t        hcount_in;
  row_t        vcount_in;
  logic        bw_valid;
  pix_t        bw;
  col_t        bw_hcount;
  row_t        bw_vcount;
  int checks = 0, failures = 0;

  color_mod dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampr(real v);
    int i;
    i = int'($floor(v));
    return i < 0 ? 0 : (i > 255 ? 255 : i);
  endfunction

  typedef struct {int val; int tol; logic v; int h; int vc;} exp_t;
  exp_t q[$];

  initial begin
    valid_in = 0; sel = 0; pixel_in = 0; hcount_in = 0; vcount_in = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      int r8, g8, b8, s, e, tol;
      logic [15:0] p;
      p = 16'($urandom);
      s = n % 7;
      r8 = {p[15:11], p[15:13]};
      g8 = {p[10:5], p[10:9]};
      b8 = {p[4:0], p[4:2]};
      tol = 0;
      case (s)
        0: e = (r8 + g8 + b8) / 3;
        1: e = r8;
        2: e = g8;
        3: e = b8;
        4: begin e = clampr(0.299 * r8 + 0.587 * g8 + 0.114 * b8); tol = 1; end
        5: begin e = clampr(128.0 + 0.5 * r8 - 0.418688 * g8 - 0.081312 * b8); tol = 1; end
        default: begin e = clampr(128.0 - 0.168736 * r8 - 0.331264 * g8 + 0.5 * b8); tol = 1; end
      endcase
      valid_in  <= (n % 3) != 2;
      sel       <= 3'(s);
      pixel_in  <= p;
      hcount_in <= col_t'(n % 320);
      vcount_in <= row_t'(n / 320);
      q.push_back('{val: e, tol: tol, v: (n % 3) != 2, h: n % 320, vc: n / 320});
      @(posedge clk);
      #1;
      if (q.size() == 3) begin
        exp_t x;
        x = q.pop_front();
        // outputs now belong to the input applied three cycles ago
        checks++;
        if (bw_valid != x.v || (x.v && (int'(bw_hcount) != x.h || int'(bw_vcount) != x.vc ||
            int'(bw) - x.val > x.tol || x.val - int'(bw) > x.tol))) begin
          failures++;
          if (failures < 10) $display("n %0d: bw %0d exp %0d valid %0d/%0d", n, bw, x.val, bw_valid, x.v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
