// rotate: turns image coordinates of the upright picture into a frame-buffer
// address, rotating the stored 320 x 240 camera image by 90 degrees.
//
// The shown picture is H wide and W tall (240 x 320).
// Shown pixel (x, y) comes from stored pixel (column y, row H-1-x), so the
// address is (H-1-x) * W + y.  Inputs outside the picture pass valid low.
// One register stage.  The document names the stage; the direction of the
// turn is this design's choice.
module rotate #(
  parameter int unsigned W  = 320,                 // stored image width
  parameter int unsigned H  = 240,                 // stored image height
  parameter int unsigned AW = $clog2(W * H)
) (
  input  logic          clk,
  input  logic [10:0]   x,
  input  logic [9:0]    y,
  input  logic          valid_in,
  output logic [AW-1:0] addr,
  output logic          valid_out
);
  always_ff @(posedge clk) begin
    valid_out <= valid_in && int'(x) < H && int'(y) < W;
    addr      <= AW'((int'(H) - 1 - int'(x)) * int'(W) + int'(y));
  end
endmodule
