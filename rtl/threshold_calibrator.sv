// threshold_calibrator: after reset, tries X_FRAMES thresholds, one per
// frame, and remembers the one whose dithered frame had the most bit
// transitions.
//
// Trial k (k = 0 .. X_FRAMES-1) uses threshold k * 256 / X_FRAMES.  While
// calibrating is high the ditherer should use trial_threshold.  A transition
// is counted for every dithered pixel whose bit differs from the pixel to its
// left in the same row.  frame_start marks the start of a frame; it
// should arrive just before pixel (0,0) is dithered, since the threshold
// changes on the next cycle.  The first frame_start after reset starts trial 0,
// each later one closes the current trial, so the sweep takes X_FRAMES + 1
// frame starts.  A trial wins only with strictly more transitions than the
// best so far.  suggestion holds the winner; done rises when the sweep ends.
// The sweep, the 256/x step and the transition count are the document's;
// X_FRAMES (the document's "x"), horizontal-only counting and the tie rule
// are this design's choices.
module threshold_calibrator
  import dither_pkg::*;
#(
  parameter int unsigned X_FRAMES = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic bit_valid,
  input  logic bit_in,
  input  col_t bit_col,
  input  logic frame_start,
  output logic calibrating,
  output pix_t trial_threshold,
  output pix_t suggestion,
  output logic done
);
  localparam int unsigned STEP = 256 / X_FRAMES;
  localparam int unsigned KW   = $clog2(X_FRAMES + 1);

  typedef enum logic [1:0] {WAIT_FRAME, SWEEP, FINISHED} state_e;
  state_e        state;
  logic [KW-1:0] k;
  logic [17:0]   count, best_count;
  logic          prev_bit;

  assign calibrating     = state != FINISHED;
  assign trial_threshold = pix_t'(int'(k) * STEP);
  assign done            = state == FINISHED;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= WAIT_FRAME;
      k          <= '0;
      count      <= '0;
      best_count <= '0;
      suggestion <= 8'd128;
      prev_bit   <= 1'b0;
    end else begin
      if (bit_valid) prev_bit <= bit_in;
      unique case (state)
        WAIT_FRAME: if (frame_start) begin
          state <= SWEEP;
          count <= '0;
        end
        SWEEP: begin
          if (frame_start) begin
            if (count > best_count) begin
              best_count <= count;
              suggestion <= trial_threshold;
            end
            count <= '0;
            if (int'(k) == X_FRAMES - 1) state <= FINISHED;
            else k <= k + 1'b1;
          end
          // frame_start comes with the first pixel of the next frame (col 0),
          // which never counts as a transition
          if (bit_valid && bit_col != '0 && bit_in != prev_bit && !frame_start)
            count <= count + 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
