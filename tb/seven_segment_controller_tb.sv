// seven_segment_controller_tb: shows a known 32-bit value and, for every
// digit period, decodes which anode is active and which hex digit the
// segments draw, checking each of the eight digits in turn and that exactly
// one anode is on.  Refresh period shortened to 4 cycles.
module seven_segment_controller_tb;
  localparam int P = 4;
  logic        clk = 0, rst = 1;
  logic [31:0] val;
  logic [6:0]  cat;
  logic [7:0]  an;
  int checks = 0, failures = 0;

  seven_segment_controller #(.COUNT_PERIOD(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment patterns (a..g = bit 0..6, active high) of the hex digits
  localparam logic [6:0] PAT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  initial begin
    val = 32'h8C3A_F150;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 2; round++)
      for (int d = 0; d < 8; d++) begin
        #1;
        checks++;
        if (an != ~(8'b1 << d) || ~cat != PAT[val[4*d +: 4]]) begin
          failures++;
          $display("digit %0d: an %b cat %b", d, an, cat);
        end
        repeat (P) @(posedge clk);
      end
    val = 32'h0123_4567;
    #1;
    checks++;
    if (~cat != PAT[val[3:0]]) begin failures++; $display("value change not shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
