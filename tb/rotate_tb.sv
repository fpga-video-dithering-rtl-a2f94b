// rotate_tb: checks that every shown pixel of the 240 x 320 upright picture
// maps to a distinct stored address (a bijection onto the 320 x 240 frame),
// that the corners land where a quarter turn puts them, and that points
// outside the picture are flagged invalid.  One cycle of latency.
module rotate_tb;
  localparam int W = 320, H = 240, AW = 17;
  logic clk = 0;
  logic [10:0] x;
  logic [9:0]  y;
  logic valid_in, valid_out;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  bit seen [W*H];

  rotate dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid_in = 1;
    for (int yy = 0; yy < W; yy++)
      for (int xx = 0; xx < H; xx++) begin
        x = 11'(xx); y = 10'(yy);
        @(posedge clk);
        #1;
        checks++;
        // stored column = yy, stored row = H-1-xx
        if (!valid_out || int'(addr) != (H - 1 - xx) * W + yy || seen[addr]) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) -> %0d", xx, yy, addr);
        end else seen[addr] = 1;
      end
    x = 11'(H); y = 0;
    @(posedge clk); #1;
    checks++;
    if (valid_out) begin failures++; $display("outside point valid"); end
    x = 0; y = 10'(W);
    @(posedge clk); #1;
    checks++;
    if (valid_out) begin failures++; $display("outside point valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
