// scale_tb: sweeps the screen and checks that scale divides both coordinates
// by 2 after one cycle and flags only the 480 x 640 picture area as valid.
module scale_tb;
  logic clk = 0;
  logic [10:0] hcount_in, hcount_scaled;
  logic [9:0]  vcount_in, vcount_scaled;
  logic valid_addr;
  int checks = 0, failures = 0;

  scale dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 720; v += 3)
      for (int h = 0; h < 1280; h += 7) begin
        hcount_in = 11'(h); vcount_in = 10'(v);
        @(posedge clk);
        #1;
        checks++;
        if (int'(hcount_scaled) != h / 2 || int'(vcount_scaled) != v / 2 ||
            valid_addr != (h < 480 && v < 640)) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) -> (%0d,%0d) %0d", h, v, hcount_scaled, vcount_scaled, valid_addr);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
