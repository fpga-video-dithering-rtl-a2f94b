// frame_buffer: simple dual-port block RAM holding one frame, WIDTH bits per
// pixel, DEPTH = width x height pixels, addressed row * width + column.
//
// Port A (clk_a) writes the pixels as the camera side produces them; port B
// (clk_b) reads them for the HDMI side with a one-cycle registered read.  The
// two sides run at different pixel rates, and the buffer decouples them.
// The design uses two: WIDTH 1 for the dithered frame and WIDTH 8 for the
// grayscale frame, both 320 x 240 deep as the document gives.  The read
// latency is this design's choice.
module frame_buffer #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 320 * 240,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  input  logic             clk_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a)
    if (we_a && int'(addr_a) < DEPTH) mem[addr_a] <= din_a;

  always_ff @(posedge clk_b)
    dout_b <= mem[addr_b];
endmodule
