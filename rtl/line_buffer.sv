// line_buffer: four 8-bit lines of block RAM that stage grayscale pixels for
// the error-diffusion ditherer and take back the pixels it has updated.
//
// Every line plays one role at a time.  With Floyd-Steinberg (alg = ALG_FS)
// three lines are used:
//   role 1  writes the incoming pixel bw at bw_hcount
//   role 2  reads B (the row being dithered) at bw_hcount
//   role 3  reads E (the row below) at bw_hcount; takes back C two columns
//           behind
// With Jarvis-Judice-Ninke (ALG_JJN) all four lines are used: role 2 reads G,
// role 3 reads L and takes back H, role 4 reads Q and takes back M, the last
// two four columns behind.  When a line is complete (the pixel at column W-1
// has been written) the roles rotate: the line just written becomes the
// lowest read line, every read line moves up one row, and the top line, fully
// consumed, becomes the write line.  This is done with one pointer p, the
// physical index of the role-1 line; role k is line (p + k - 1) mod N.
//
// The row being dithered lags the incoming row by 2 (FS) or 3 (JJN) lines,
// modulo H, so the last rows of a frame are finished while the first rows of
// the next frame arrive.
//
// glitch_mode (sw[14]) reproduces a known variant: the roles rotate on every
// clock cycle in which bw_hcount sits at W-1, valid pixel or not, which
// scrambles the lines and gives a non-dithered compressed look.
//
// Timing: the column read for a valid pixel appears on rd two cycles later
// (one cycle of block-RAM read, one output register).  One pixel per cycle is
// sustained.  Write-backs on wb are applied on the cycle they are presented,
// through each line's second port.
//
// The four-line structure, the roles, the rotation order and the
// write-back offsets follow the design's description; the tag-carrying
// write-back, the frame-row bookkeeping and the reset values are this
// design's own.
module line_buffer
  import dither_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H
) (
  input  logic   clk,
  input  logic   rst,
  input  alg_e   alg,
  input  logic   glitch_mode,
  // incoming grayscale pixel stream
  input  logic   bw_valid,
  input  col_t   bw_hcount,
  input  row_t   bw_vcount,
  input  pix_t   bw,
  // to the ditherer
  output lb_rd_t rd,
  // from the ditherer
  input  lb_wb_t wb
);
  localparam int unsigned AW = COL_BITS;

  logic [1:0] p;            // physical index of the role-1 line
  logic [2:0] nlines;
  line_t      r2, r3, r4;   // physical indices of the read roles
  logic       rotate;

  assign nlines = (alg == ALG_JJN) ? 3'd4 : 3'd3;

  function automatic line_t wrap(input logic [2:0] v, input logic [2:0] n);
    return line_t'((v >= n) ? v - n : v);
  endfunction

  always_comb begin
    r2 = wrap(3'(p) + 3'd1, nlines);
    r3 = wrap(3'(p) + 3'd2, nlines);
    r4 = (alg == ALG_JJN) ? wrap(3'(p) + 3'd3, nlines) : 2'd3;
  end

  assign rotate = (bw_hcount == col_t'(W - 1)) && (bw_valid || glitch_mode);

  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else if (3'(p) >= nlines) p <= '0;        // after a switch from JJN to FS
    else if (rotate) p <= wrap(3'(p) + 3'd1, nlines);
  end

  // frame row being dithered for the incoming row bw_vcount
  row_t drow;
  always_comb begin
    int lag;
    lag = (alg == ALG_JJN) ? 3 : 2;
    drow = (int'(bw_vcount) >= lag) ? row_t'(int'(bw_vcount) - lag)
                                    : row_t'(int'(bw_vcount) + int'(H) - lag);
  end

  // the four lines
  pix_t dout [4];
  for (genvar i = 0; i < 4; i++) begin : g_line
    logic b_we;
    pix_t b_din;
    always_comb begin
      b_we  = 1'b0;
      b_din = wb.d1;
      if (wb.v1 && wb.tag1 == line_t'(i)) begin
        b_we = 1'b1; b_din = wb.d1;
      end else if (wb.v2 && wb.tag2 == line_t'(i)) begin
        b_we = 1'b1; b_din = wb.d2;
      end
    end
    line_bram #(.DEPTH(W), .AW(AW)) u_bram (
      .clk    (clk),
      .a_en   (bw_valid),
      .a_we   (p == line_t'(i)),
      .a_addr (bw_hcount),
      .a_din  (bw),
      .a_dout (dout[i]),
      .b_we   (b_we),
      .b_addr (wb.col),
      .b_din  (b_din)
    );
  end

  // stage 1: remember which line holds which role while the RAM reads
  logic  s1_valid;
  pos_t  s1_pos;
  line_t s1_r2;
  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= bw_valid;
    s1_pos <= '{valid: 1'b1, col: bw_hcount, row: drow, tag1: r3, tag2: r4};
    s1_r2  <= r2;
  end

  // stage 2: output register
  always_ff @(posedge clk) begin
    if (rst) rd.pos.valid <= 1'b0;
    else     rd.pos.valid <= s1_valid;
    rd.pos.col  <= s1_pos.col;
    rd.pos.row  <= s1_pos.row;
    rd.pos.tag1 <= s1_pos.tag1;
    rd.pos.tag2 <= s1_pos.tag2;
    rd.p0 <= dout[s1_r2];
    rd.p1 <= dout[s1_pos.tag1];
    rd.p2 <= dout[s1_pos.tag2];
  end

endmodule
