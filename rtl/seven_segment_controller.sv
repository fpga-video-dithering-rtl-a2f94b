// seven_segment_controller: drives an 8-digit multiplexed seven-segment
// display with the 32-bit value val shown as eight hex digits.
//
// A refresh counter selects one digit every COUNT_PERIOD cycles; the digit's
// anode (an, active low) is enabled and its segments (cat, active low,
// bit 0 = segment a ... bit 6 = segment g) are driven from the matching
// nibble, digit 0 being the least significant.  The display itself is named
// in the document; the multiplexing scheme is the usual one for such boards.
module seven_segment_controller #(
  parameter int unsigned COUNT_PERIOD = 100_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] val,
  output logic [6:0]  cat,
  output logic [7:0]  an
);
  localparam int unsigned CW = $clog2(COUNT_PERIOD);
  logic [CW-1:0] cnt;
  logic [2:0]    digit;
  logic [3:0]    nib;
  logic [6:0]    seg;   // active high, {g,f,e,d,c,b,a}

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (int'(cnt) == COUNT_PERIOD - 1) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    nib = val[4*digit +: 4];
    unique case (nib)
      4'h0: seg = 7'b0111111;  4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;  4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;  4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;  4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;  4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;  4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;  4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;  4'hF: seg = 7'b1110001;
    endcase
    cat = ~seg;
    an  = ~(8'b1 << digit);
  end
endmodule
