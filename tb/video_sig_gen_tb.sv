// video_sig_gen_tb: runs the 720p60 timing generator for two full frames and
// checks, cycle by cycle, hcount/vcount against a free-running count,
// the active area, hsync and vsync positions, one new_frame pulse per frame
// and the totals 1650 x 750.
module video_sig_gen_tb;
  logic clk = 0, rst = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic hsync, vsync, active, new_frame;
  logic [5:0] frame_count;
  int checks = 0, failures = 0;

  video_sig_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, nf;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);   // first registered output appears
    h = 0; v = 0; nf = 0;
    for (int n = 0; n < 2 * 1650 * 750; n++) begin
      #1;
      checks++;
      if (int'(hcount) != h || int'(vcount) != v ||
          active != (h < 1280 && v < 720) ||
          hsync != (h >= 1390 && h < 1430) ||
          vsync != (v >= 725 && v < 730) ||
          new_frame != (h == 1280 && v == 720)) begin
        failures++;
        if (failures < 10) $display("at %0d,%0d: got %0d,%0d a%0d hs%0d vs%0d nf%0d", h, v, hcount, vcount, active, hsync, vsync, new_frame);
      end
      nf += new_frame;
      h++;
      if (h == 1650) begin h = 0; v = (v == 749) ? 0 : v + 1; end
      @(posedge clk);
    end
    checks++;
    if (nf != 2) begin failures++; $display("new_frame pulses %0d", nf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
