// scale: maps screen coordinates to image coordinates by an integer factor,
// so each image pixel covers a SCALE x SCALE block on the screen.
//
// The image (after rotation IMG_COLS x IMG_ROWS = 240 x 320) is drawn in the
// top-left corner; outside it valid_addr is low and the pixel is shown black.
// With SCALE = 2 the picture is 480 x 640 and fits the 720-line screen.  One
// register stage.  The document names the stage; the factor and placement
// are this design's choices.
module scale #(
  parameter int unsigned SCALE    = 2,
  parameter int unsigned IMG_COLS = 240,
  parameter int unsigned IMG_ROWS = 320
) (
  input  logic        clk,
  input  logic [10:0] hcount_in,
  input  logic [9:0]  vcount_in,
  output logic [10:0] hcount_scaled,
  output logic [9:0]  vcount_scaled,
  output logic        valid_addr
);
  always_ff @(posedge clk) begin
    hcount_scaled <= 11'(int'(hcount_in) / SCALE);
    vcount_scaled <= 10'(int'(vcount_in) / SCALE);
    valid_addr    <= int'(hcount_in) < IMG_COLS * SCALE && int'(vcount_in) < IMG_ROWS * SCALE;
  end
endmodule
