// threshold_buttons: owns the dither threshold and lets three sources move it.
//
//  * btn_inc / btn_dec (buttons 2 and 3): each debounced press adds or
//    subtracts step (switches 11:5) from the threshold, saturating at 0 and
//    255.
//  * manta_threshold: whenever the host-written value changes, the threshold
//    takes it.
//  * btn_load (button 1): takes the calibrator's suggestion.
// All three can be used one after the other, each starting from wherever the
// threshold is now.  If several happen on one cycle the priority is load,
// then manta, then the buttons.  The threshold resets to 128.  The three
// sources and the buttons' roles are the document's; saturation, priority,
// the reset value and "load manta on change" are this design's choices.
// Timing: a press changes the threshold DEBOUNCE cycles (plus 3) after the
// button settles; manta and load take effect one cycle after they occur.
module threshold_buttons
  import dither_pkg::*;
#(
  parameter int unsigned DEBOUNCE = 371_250
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn_inc,
  input  logic       btn_dec,
  input  logic       btn_load,
  input  logic [6:0] step,
  input  pix_t       manta_threshold,
  input  pix_t       calib_threshold,
  output pix_t       threshold
);
  logic inc_rise, dec_rise, load_rise;
  logic inc_lvl, dec_lvl, load_lvl;
  pix_t manta_d;

  debouncer #(.STABLE_CYCLES(DEBOUNCE)) u_inc  (.clk, .rst, .btn(btn_inc),  .level(inc_lvl),  .rise(inc_rise));
  debouncer #(.STABLE_CYCLES(DEBOUNCE)) u_dec  (.clk, .rst, .btn(btn_dec),  .level(dec_lvl),  .rise(dec_rise));
  debouncer #(.STABLE_CYCLES(DEBOUNCE)) u_load (.clk, .rst, .btn(btn_load), .level(load_lvl), .rise(load_rise));

  logic [8:0] up;
  logic signed [9:0] down;
  assign up   = 9'(threshold) + 9'(step);
  assign down = $signed({2'b00, threshold}) - $signed({3'b000, step});

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold <= 8'd128;
      manta_d   <= manta_threshold;
    end else begin
      manta_d <= manta_threshold;
      if (load_rise)                         threshold <= calib_threshold;
      else if (manta_threshold != manta_d)   threshold <= manta_threshold;
      else if (inc_rise && !dec_rise)        threshold <= up[8] ? 8'd255 : up[7:0];
      else if (dec_rise && !inc_rise)        threshold <= down < 0 ? 8'd0 : down[7:0];
    end
  end
endmodule
