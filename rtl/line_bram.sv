// line_bram: one line of the line buffer, a simple true-dual-port block RAM.
//
// Port A is the streaming port: it either writes the incoming grayscale
// pixel (role 1) or reads the pixel the ditherer needs next (roles 2-4), with
// a one-cycle registered read (read-first).  Port B only writes: it takes the
// updated pixels the ditherer hands back.  Both ports share one clock.  If
// both ports write the same address in the same cycle, port B wins; the line
// buffer never does this in normal operation because port B trails port A by
// two or four columns.
module line_bram #(
  parameter int unsigned DEPTH = 320,
  parameter int unsigned AW    = 9
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_din,
  output logic [7:0]    a_dout,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [7:0]    b_din
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_din;
    end
    if (b_we) mem[b_addr] <= b_din;
  end
endmodule
