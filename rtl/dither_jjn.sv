// dither_jjn: Jarvis-Judice-Ninke (minimized average error) diffusion, one
// pixel per input column.
//
// The window is thirteen pixels over three rows, weights in 48ths:
//              A  F  G            .  .  A  7  5
//        H  I  J  K  L      =     3  5  7  5  3
//        M  N  O  P  Q            1  3  5  3  1
// G, L and Q arrive together from the line buffer (in.p0/p1/p2) for column x,
// so A is column x-2 and H, M are column x-4.  On each valid input, in one
// cycle, A is dithered, every neighbour gets its share of the error, H and M
// (now final) are handed back to the line buffer, and the window shifts one
// column left.  Positions travel with the data (pos_t) so that a share is
// only added to a neighbour in the right row and column, nothing is pushed
// below the last frame row, and write-backs go to the line that held the
// pixel when it was read.  The edge handling is this design's own choice.
//
// Timing: a pixel entering as G is dithered two valid inputs later; with one
// input per cycle its bit appears on out_* three cycles after it entered.
// wb is registered, valid one cycle after the input that finished H and M.
module dither_jjn
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
  // Column slots at offsets -2, -1, 0, +1 from A (slot 2 is A); the input is
  // offset +2.  top[] holds row values (A at 2, F at 3), mid[] and bot[] the
  // two rows below (H..K, M..P).
  pos_t pos [4];
  pix_t top [4];
  pix_t mid [4];
  pix_t bot [4];

  // weights in 48ths, index = offset + 2
  localparam logic [2:0] WT [5] = '{0, 0, 0, 7, 5};
  localparam logic [2:0] WM [5] = '{3, 5, 7, 5, 3};
  localparam logic [2:0] WB [5] = '{1, 3, 5, 3, 1};

  pos_t slot [5];
  pix_t t_in [5], m_in [5], b_in [5];
  pix_t t_new [5], m_new [5], b_new [5];
  logic adj [5];
  logic bit_a, r1_ok, r2_ok;
  err_t e;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      slot[k] = pos[k];
      t_in[k] = top[k];
      m_in[k] = mid[k];
      b_in[k] = bot[k];
    end
    slot[4] = in.pos;
    t_in[4] = in.p0;
    m_in[4] = in.p1;
    b_in[4] = in.p2;

    bit_a = quant_bit(top[2], threshold);
    e     = pos[2].valid ? quant_err(top[2], threshold) : err_t'(0);
    r1_ok = (int'(pos[2].row) + 1) < int'(H);
    r2_ok = (int'(pos[2].row) + 2) < int'(H);
    for (int k = 0; k < 5; k++) begin
      adj[k] = slot[k].valid && slot[k].row == pos[2].row &&
               int'(slot[k].col) == int'(pos[2].col) + k - 2;
      t_new[k] = add_clamp(t_in[k], adj[k]          ? share(e, WT[k], 48) : 14'sd0);
      m_new[k] = add_clamp(m_in[k], adj[k] && r1_ok ? share(e, WM[k], 48) : 14'sd0);
      b_new[k] = add_clamp(b_in[k], adj[k] && r2_ok ? share(e, WB[k], 48) : 14'sd0);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) pos[k].valid <= 1'b0;
      out_valid <= 1'b0;
      wb.v1     <= 1'b0;
      wb.v2     <= 1'b0;
    end else begin
      out_valid <= in.pos.valid && pos[2].valid;
      wb.v1     <= in.pos.valid && pos[0].valid;
      wb.v2     <= in.pos.valid && pos[0].valid;
      if (in.pos.valid)
        for (int k = 0; k < 4; k++) pos[k] <= slot[k+1];
    end
    if (in.pos.valid) begin
      out_bit <= bit_a;
      out_col <= pos[2].col;
      out_row <= pos[2].row;
      wb.tag1 <= pos[0].tag1;
      wb.tag2 <= pos[0].tag2;
      wb.col  <= pos[0].col;
      wb.d1   <= m_new[0];
      wb.d2   <= b_new[0];
      for (int k = 0; k < 4; k++) begin
        top[k] <= t_new[k+1];
        mid[k] <= m_new[k+1];
        bot[k] <= b_new[k+1];
      end
    end
  end

endmodule
