// threshold_buttons_tb: presses the up, down and load buttons (with contact
// bounce) and moves the host value, and checks the threshold after each:
// steps of the switch value, saturation at 0 and 255, a bounce shorter than
// the debounce time being ignored, a manta change being taken, and a load
// taking the calibrator's value.  Debounce time is shortened to 20 cycles.
module threshold_buttons_tb;
  import dither_pkg::*;
  localparam int DB = 20;
  logic       clk = 0, rst = 1;
  logic       btn_inc = 0, btn_dec = 0, btn_load = 0;
  logic [6:0] step;
  pix_t       manta_threshold, calib_threshold, threshold;
  int checks = 0, failures = 0;

  threshold_buttons #(.DEBOUNCE(DB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(ref logic b);
    // bounce, then hold, then release
    for (int i = 0; i < 3; i++) begin
      b = 1; repeat (3) @(posedge clk);
      b = 0; repeat (2) @(posedge clk);
    end
    b = 1; repeat (DB + 10) @(posedge clk);
    b = 0; repeat (DB + 10) @(posedge clk);
  endtask

  task automatic expect_thr(int e, string what);
    checks++;
    if (int'(threshold) != e) begin
      failures++;
      $display("%s: threshold %0d expected %0d", what, threshold, e);
    end
  endtask

  initial begin
    step = 7'd10;
    manta_threshold = 8'd0;
    calib_threshold = 8'd77;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);
    expect_thr(128, "reset");
    press(btn_inc); expect_thr(138, "up");
    press(btn_inc); expect_thr(148, "up");
    press(btn_dec); expect_thr(138, "down");
    step = 7'd100;
    press(btn_inc); expect_thr(238, "up 100");
    press(btn_inc); expect_thr(255, "saturate high");
    // a short glitch only
    btn_inc = 1; repeat (DB / 2) @(posedge clk); btn_inc = 0; repeat (DB * 2) @(posedge clk);
    expect_thr(255, "short glitch ignored");
    manta_threshold = 8'd40; repeat (3) @(posedge clk);
    expect_thr(40, "manta");
    press(btn_dec); expect_thr(0, "saturate low");
    step = 7'd5;
    press(btn_inc); expect_thr(5, "up from 0");
    press(btn_load); expect_thr(77, "load suggestion");
    press(btn_dec); expect_thr(72, "down after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
