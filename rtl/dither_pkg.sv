// dither_pkg: types, sizes and arithmetic shared by the line buffer and the
// two error-diffusion ditherers.
//
// A pixel travels from the line buffer to a ditherer as a "position" record
// (pos_t) that names its column, the frame row that is being dithered when it
// was read, and the physical line-buffer lines that hold the two rows below
// (tag1 = row+1, tag2 = row+2).  Carrying the tags with the data lets a
// ditherer write an updated pixel back to the right line even after the line
// buffer has rotated its line roles.
//
// Error arithmetic (this design's choice; the weights themselves are the
// Floyd-Steinberg sixteenths and Jarvis-Judice-Ninke forty-eighths):
//   bit   = (pixel >= threshold)
//   error = pixel - (bit ? 255 : 0)                      (-255 .. 255)
//   share = (error * weight) / denominator, truncated toward zero
//   new   = clamp(old + share, 0, 255)                   (lines are 8 bits wide)
package dither_pkg;

  localparam int unsigned IMG_W = 320;   // default frame width  (pixels)
  localparam int unsigned IMG_H = 240;   // default frame height (lines)
  localparam int unsigned COL_BITS = 9;  // holds columns up to 511
  localparam int unsigned ROW_BITS = 8;  // holds rows up to 255

  typedef logic [COL_BITS-1:0] col_t;
  typedef logic [ROW_BITS-1:0] row_t;
  typedef logic [1:0]          line_t;   // physical line index, 0..3
  typedef logic [7:0]          pix_t;
  typedef logic signed [9:0]   err_t;

  // Dither algorithm, selected by sw[13].
  typedef enum logic {ALG_FS = 1'b0, ALG_JJN = 1'b1} alg_e;

  // Where a pixel of the window sits in the frame.
  typedef struct packed {
    logic  valid;
    col_t  col;
    row_t  row;    // frame row being dithered (the top row of the window)
    line_t tag1;   // physical line holding row+1
    line_t tag2;   // physical line holding row+2 (JJN only)
  } pos_t;

  // Line buffer -> ditherer: one column of the window, top to bottom.
  typedef struct packed {
    pos_t pos;
    pix_t p0;      // row   (B for FS, G for JJN)
    pix_t p1;      // row+1 (E for FS, L for JJN)
    pix_t p2;      // row+2 (Q for JJN, unused by FS)
  } lb_rd_t;

  // Ditherer -> line buffer: finished pixels to write back.
  typedef struct packed {
    logic  v1;     // write d1 to line tag1 at col (C for FS, H for JJN)
    logic  v2;     // write d2 to line tag2 at col (M for JJN)
    line_t tag1;
    line_t tag2;
    col_t  col;
    pix_t  d1;
    pix_t  d2;
  } lb_wb_t;

  function automatic logic quant_bit(input pix_t p, input pix_t thr);
    return p >= thr;
  endfunction

  function automatic err_t quant_err(input pix_t p, input pix_t thr);
    return quant_bit(p, thr) ? err_t'($signed({2'b00, p}) - 10'sd255)
                             : err_t'($signed({2'b00, p}));
  endfunction

  // (e * num) / den, truncated toward zero.
  function automatic logic signed [13:0] share(input err_t e, input logic [2:0] num,
                                               input logic [5:0] den);
    logic signed [13:0] prod;
    prod = 14'(e) * $signed({11'b0, num});
    return prod / $signed({8'b0, den});
  endfunction

  // Add a (possibly zero) share to a pixel and clamp to 0..255.
  function automatic pix_t add_clamp(input pix_t p, input logic signed [13:0] s);
    logic signed [14:0] sum;
    sum = $signed({7'b0, p}) + 15'(s);
    if (sum < 0)        return 8'd0;
    else if (sum > 255) return 8'd255;
    else                return sum[7:0];
  endfunction

endpackage
