// rgb_to_ycrcb: three-stage pipelined conversion of 8-bit R, G, B into
// full-range BT.601 Y, Cr and Cb.
//
//   Y  =       (306 R + 601 G + 117 B) / 1024
//   Cr = 128 + (512 R - 429 G -  83 B) / 1024
//   Cb = 128 + (-173 R - 339 G + 512 B) / 1024
// (floor of the scaled sums, results clamped to 0..255).  Stage 1 forms the
// nine products, stage 2 the three sums, stage 3 shifts, offsets and clamps.
// Latency 3 cycles, one pixel per cycle.  The document only says a 3-cycle
// conversion is used; the coefficients are the standard BT.601 ones,
// rounded to 10 fractional bits, a choice of this design.
module rgb_to_ycrcb (
  input  logic       clk,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic [7:0] y,
  output logic [7:0] cr,
  output logic [7:0] cb
);
  typedef logic signed [19:0] acc_t;

  acc_t p [9];
  acc_t sy, scr, scb;

  function automatic logic [7:0] sat(input acc_t v);
    acc_t q;
    q = v >>> 10;
    if (q < 0)        return 8'd0;
    else if (q > 255) return 8'd255;
    else              return q[7:0];
  endfunction

  always_ff @(posedge clk) begin
    p[0] <= 20'sd306 * $signed({12'b0, r});
    p[1] <= 20'sd601 * $signed({12'b0, g});
    p[2] <= 20'sd117 * $signed({12'b0, b});
    p[3] <= 20'sd512 * $signed({12'b0, r});
    p[4] <= 20'sd429 * $signed({12'b0, g});
    p[5] <= 20'sd83  * $signed({12'b0, b});
    p[6] <= 20'sd173 * $signed({12'b0, r});
    p[7] <= 20'sd339 * $signed({12'b0, g});
    p[8] <= 20'sd512 * $signed({12'b0, b});

    sy  <= p[0] + p[1] + p[2];
    scr <= p[3] - p[4] - p[5] + 20'sd131072;   // +128 << 10
    scb <= p[8] - p[6] - p[7] + 20'sd131072;

    y  <= sat(sy);
    cr <= sat(scr);
    cb <= sat(scb);
  end
endmodule
