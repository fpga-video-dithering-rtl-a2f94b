// tmds_encoder: DVI/HDMI TMDS 8b/10b encoder for one colour channel.
//
// Stage one ("transition minimisation") turns the byte into 9 bits q_m by
// chaining XOR or XNOR, whichever gives fewer transitions; bit 8 records the
// choice.  Stage two keeps the line DC balanced: a running disparity cnt
// (ones minus zeros sent so far) decides whether to send q_m[7:0] inverted,
// flagged by bit 9.  Outside the active video area the channel sends one of
// the four control tokens selected by ctrl, and cnt is cleared.  This is the
// standard DVI 1.0 algorithm; the document only names the block.  Output is
// registered: tmds is valid one cycle after data/ctrl/active.
module tmds_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic [1:0] ctrl,
  input  logic       active,
  output logic [9:0] tmds
);
  logic [8:0] q_m;
  logic [3:0] n1_d, n1_q;
  logic signed [4:0] cnt, diff;

  function automatic logic [3:0] ones(input logic [7:0] v);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) n += {3'b000, v[i]};
    return n;
  endfunction

  function automatic logic [8:0] minimise(input logic [7:0] d, input logic use_xnor);
    logic [8:0] q;
    q[0] = d[0];
    for (int i = 1; i < 8; i++) q[i] = use_xnor ? ~(q[i-1] ^ d[i]) : (q[i-1] ^ d[i]);
    q[8] = ~use_xnor;
    return q;
  endfunction

  always_comb begin
    n1_d = ones(data);
    q_m  = minimise(data, n1_d > 4'd4 || (n1_d == 4'd4 && !data[0]));
    n1_q = ones(q_m[7:0]);
    diff = $signed({1'b0, n1_q}) - $signed(5'd4);   // (ones - zeros) / 2
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tmds <= '0;
      cnt  <= '0;
    end else if (!active) begin
      cnt <= '0;
      unique case (ctrl)
        2'b00: tmds <= 10'b1101010100;
        2'b01: tmds <= 10'b0010101011;
        2'b10: tmds <= 10'b0101010100;
        2'b11: tmds <= 10'b1010101011;
      endcase
    end else if (cnt == 0 || diff == 0) begin
      tmds <= {~q_m[8], q_m[8], q_m[8] ? q_m[7:0] : ~q_m[7:0]};
      cnt  <= q_m[8] ? cnt + 2 * diff : cnt - 2 * diff;
    end else if ((cnt > 0 && diff > 0) || (cnt < 0 && diff < 0)) begin
      tmds <= {1'b1, q_m[8], ~q_m[7:0]};
      cnt  <= cnt + (q_m[8] ? 5'sd2 : 5'sd0) - 2 * diff;
    end else begin
      tmds <= {1'b0, q_m[8], q_m[7:0]};
      cnt  <= cnt - (q_m[8] ? 5'sd0 : 5'sd2) + 2 * diff;
    end
  end
endmodule
