// debouncer: synchronises a push-button input and reports it only after it
// has been stable for STABLE_CYCLES clock cycles.  rise pulses for one cycle
// when the debounced level goes high.  Default: 5 ms at 74.25 MHz (this
// design's choice; the document does not give a debounce time).
module debouncer #(
  parameter int unsigned STABLE_CYCLES = 371_250
) (
  input  logic clk,
  input  logic rst,
  input  logic btn,
  output logic level,
  output logic rise
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);
  logic [1:0]    sync;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      cnt   <= '0;
      level <= 1'b0;
      rise  <= 1'b0;
    end else begin
      sync <= {sync[0], btn};
      rise <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE_CYCLES - 1)) begin
        cnt   <= '0;
        level <= sync[1];
        rise  <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
