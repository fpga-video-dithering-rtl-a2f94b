// tmds_serializer: 10:1 serialiser for one TMDS lane.
//
// The 10-bit word is captured on clk_pixel; a bit clock clk_bit at ten times
// the pixel rate, phase-aligned with clk_pixel (both from one clock
// generator), shifts it out least significant bit first.  A divide-by-ten
// counter in the bit domain reloads the shift register at the start of every
// pixel period, sampling the captured word half a pixel period after it
// changed.  On the FPGA this job is done by the vendor's serialiser
// primitive feeding a differential output buffer; this is a plain-logic
// equivalent (this design's choice).  Latency: after a reset released on a
// pixel clock edge, the word presented in pixel cycle n starts on serial one
// pixel period plus one bit period later, and the words then follow back to
// back.
module tmds_serializer (
  input  logic       clk_pixel,
  input  logic       clk_bit,
  input  logic       rst,
  input  logic [9:0] word,
  output logic       serial
);
  logic [9:0] held;
  logic [9:0] shreg;
  logic [3:0] phase;
  logic       rst_bit;

  always_ff @(posedge clk_pixel)
    held <= word;

  always_ff @(posedge clk_bit) begin
    rst_bit <= rst;
    if (rst_bit) begin
      phase <= 4'd0;
      shreg <= '0;
    end else begin
      phase <= (phase == 4'd9) ? 4'd0 : phase + 1'b1;
      shreg <= (phase == 4'd9) ? held : {1'b0, shreg[9:1]};
    end
  end

  assign serial = shreg[0];
endmodule
