// dither_fs: Floyd-Steinberg error diffusion, one pixel per input column.
//
// The window is five pixels:      A  B        A is dithered to one bit and
//                              C  D  E        its error e goes to B (7/16),
//                                             C (3/16), D (5/16), E (1/16).
// B and E arrive together from the line buffer (in.p0, in.p1) for column x;
// A (column x-1), C (x-2) and D (x-1) are held in registers.  On each valid
// input the module, in one cycle: dithers A, adds the shares, hands the
// finished C back to the line buffer, and shifts: A <- B, C <- D, D <- E.
// So C is written back at column x-2, the offset the design prescribes.
//
// Edges: a share is only added to a neighbour that lies in the same frame row
// as A's row (or the row below) and at the expected column, and nothing is
// pushed below the last row; the window simply streams across line ends, so
// the last pixel of a row is dithered when the first pixel of the next row
// arrives.  This edge handling is this design's own choice.
//
// Timing: a pixel entering as B on cycle t is dithered on the next valid
// input; with one input per cycle its bit appears on out_* at t+2
// (one cycle to move from B to A, one to be dithered).  wb is registered and
// valid one cycle after the input that finished C.
module dither_fs
  import dither_pkg::*;
#(
  parameter int unsigned H = IMG_H
) (
  input  logic   clk,
  input  logic   rst,
  input  pix_t   threshold,
  input  lb_rd_t in,
  output lb_wb_t wb,
  output logic   out_valid,
  output logic   out_bit,
  output col_t   out_col,
  output row_t   out_row
);
  pos_t a_pos, c_pos;
  pix_t a_val, c_val, d_val;

  logic bit_a;
  err_t e;
  logic below_ok, adj_b, adj_c;
  pix_t b_new, c_new, d_new, e_new;

  always_comb begin
    bit_a    = quant_bit(a_val, threshold);
    e        = a_pos.valid ? quant_err(a_val, threshold) : err_t'(0);
    below_ok = (int'(a_pos.row) + 1) < int'(H);
    adj_b    = in.pos.row == a_pos.row && int'(in.pos.col) == int'(a_pos.col) + 1;
    adj_c    = c_pos.valid && c_pos.row == a_pos.row && int'(c_pos.col) + 1 == int'(a_pos.col);
    b_new = add_clamp(in.p0, adj_b              ? share(e, 7, 16) : 14'sd0);
    c_new = add_clamp(c_val, adj_c && below_ok  ? share(e, 3, 16) : 14'sd0);
    d_new = add_clamp(d_val, below_ok           ? share(e, 5, 16) : 14'sd0);
    e_new = add_clamp(in.p1, adj_b && below_ok  ? share(e, 1, 16) : 14'sd0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_pos.valid <= 1'b0;
      c_pos.valid <= 1'b0;
      out_valid   <= 1'b0;
      wb.v1       <= 1'b0;
    end else begin
      out_valid <= in.pos.valid && a_pos.valid;
      wb.v1     <= in.pos.valid && c_pos.valid;
      if (in.pos.valid) begin
        a_pos <= in.pos;
        c_pos <= a_pos;
      end
    end
    if (in.pos.valid) begin
      out_bit <= bit_a;
      out_col <= a_pos.col;
      out_row <= a_pos.row;
      wb.tag1 <= c_pos.tag1;
      wb.col  <= c_pos.col;
      wb.d1   <= c_new;
      a_val   <= b_new;
      c_val   <= d_new;
      d_val   <= e_new;
    end
  end

  assign wb.v2   = 1'b0;
  assign wb.tag2 = '0;
  assign wb.d2   = '0;

endmodule
