// threshold_calibrator_tb: feeds the calibrator frames of dithered bits whose
// number of horizontal transitions depends on the trial threshold it is
// asking for, with the peak at a chosen threshold, and checks that it sweeps
// k * 256 / X_FRAMES one frame at a time, keeps calibrating high until the
// sweep ends, and then suggests the threshold with the most transitions.
module threshold_calibrator_tb;
  import dither_pkg::*;
  localparam int X = 8;
  localparam int W = 32;
  localparam int H = 6;
  logic clk = 0, rst = 1;
  logic bit_valid = 0, bit_in = 0, frame_start = 0;
  col_t bit_col = 0;
  logic calibrating, done;
  pix_t trial_threshold, suggestion;
  int checks = 0, failures = 0;

  threshold_calibrator #(.X_FRAMES(X)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transitions per row for a given threshold: peak at 160
  function automatic int trans_for(int thr);
    int d;
    d = thr > 160 ? thr - 160 : 160 - thr;
    return d > 150 ? 0 : (150 - d) / 10;
  endfunction

  task automatic frame(int transitions_per_row);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        bit_valid   <= 1;
        bit_col     <= col_t'(c);
        // alternate for the first "transitions" columns, then hold
        bit_in      <= (c <= transitions_per_row) ? c[0] : transitions_per_row[0];
        frame_start <= (r == 0 && c == 0);
        @(posedge clk);
        bit_valid <= 0;
        frame_start <= 0;
        @(posedge clk);
        if (r == 0 && c == 0) begin
          seen_trial = int'(trial_threshold);
          seen_cal   = calibrating;
        end
      end
  endtask
  int   seen_trial;
  logic seen_cal;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++;
    if (!calibrating) begin failures++; $display("not calibrating after reset"); end
    // the trial changes with the first pixel of each frame
    for (int f = 0; f < X; f++) begin
      frame(trans_for(f * 256 / X));
      checks++;
      if (seen_trial != f * 256 / X || !seen_cal) begin
        failures++;
        $display("frame %0d: trial %0d calibrating %0d", f, seen_trial, seen_cal);
      end
    end
    frame(0);    // its first pixel closes the last trial
    checks++;
    if (calibrating || !done || int'(suggestion) != 160) begin
      failures++;
      $display("end: calibrating %0d done %0d suggestion %0d", calibrating, done, suggestion);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
