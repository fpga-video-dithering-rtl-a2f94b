// color_mod: turns the camera's RGB565 pixel into the 8-bit grayscale value
// bw, in one of seven flavours chosen by sel (sw[4:2]):
//   0 average of R, G, B   1 R   2 G   3 B   4 Y   5 Cr   6 Cb
//   (7, not listed in the document, falls back to the average.)
// The 5- and 6-bit channels are widened to 8 bits by repeating their top
// bits.  Every flavour, and the pixel's coordinates and valid strobe, are
// delayed to the 3-cycle latency of rgb_to_ycrcb, so bw_* lines up on the
// same cycle whatever sel is.  The flavour list and the 3-cycle latency are
// the document's; the numbering of sel and the widening are this design's.
module color_mod
  import dither_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  sel,
  input  logic        valid_in,
  input  logic [15:0] pixel_in,
  input  col_t        hcount_in,
  input  row_t        vcount_in,
  output logic        bw_valid,
  output pix_t        bw,
  output col_t        bw_hcount,
  output row_t        bw_vcount
);
  typedef enum logic [2:0] {
    GRAY_AVG = 3'd0, GRAY_R = 3'd1, GRAY_G = 3'd2, GRAY_B = 3'd3,
    GRAY_Y = 3'd4, GRAY_CR = 3'd5, GRAY_CB = 3'd6
  } gray_e;

  logic [7:0] r8, g8, b8;
  assign r8 = {pixel_in[15:11], pixel_in[15:13]};
  assign g8 = {pixel_in[10:5],  pixel_in[10:9]};
  assign b8 = {pixel_in[4:0],   pixel_in[4:2]};

  logic [7:0] y, cr, cb;
  rgb_to_ycrcb u_ycc (.clk(clk), .r(r8), .g(g8), .b(b8), .y(y), .cr(cr), .cb(cb));

  // the other flavours and the side information, delayed to match
  logic [7:0] avg_d [3], r_d [3], g_d [3], b_d [3];
  logic [2:0] sel_d [3];
  logic       v_d   [3];
  col_t       h_d   [3];
  row_t       vc_d  [3];
  logic [9:0] sum;
  assign sum = 10'(r8) + 10'(g8) + 10'(b8);

  always_ff @(posedge clk) begin
    avg_d[0] <= 8'(sum / 10'd3);
    r_d[0]   <= r8;
    g_d[0]   <= g8;
    b_d[0]   <= b8;
    sel_d[0] <= sel;
    h_d[0]   <= hcount_in;
    vc_d[0]  <= vcount_in;
    for (int i = 1; i < 3; i++) begin
      avg_d[i] <= avg_d[i-1];
      r_d[i]   <= r_d[i-1];
      g_d[i]   <= g_d[i-1];
      b_d[i]   <= b_d[i-1];
      sel_d[i] <= sel_d[i-1];
      h_d[i]   <= h_d[i-1];
      vc_d[i]  <= vc_d[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < 3; i++) v_d[i] <= 1'b0;
    else begin
      v_d[0] <= valid_in;
      v_d[1] <= v_d[0];
      v_d[2] <= v_d[1];
    end
  end

  always_comb begin
    bw_valid  = v_d[2];
    bw_hcount = h_d[2];
    bw_vcount = vc_d[2];
    case (gray_e'(sel_d[2]))
      GRAY_R:  bw = r_d[2];
      GRAY_G:  bw = g_d[2];
      GRAY_B:  bw = b_d[2];
      GRAY_Y:  bw = y;
      GRAY_CR: bw = cr;
      GRAY_CB: bw = cb;
      default: bw = avg_d[2];
    endcase
  end
endmodule
