// sd_pixel_source: turns grayscale bytes from the SD-card FIFO into a pixel
// stream like the camera's, and selects which of the two feeds the line
// buffer.
//
// A byte is taken from the FIFO (AXI-stream style: fifo_tvalid / fifo_tdata,
// fifo_tready pulsed by this module) on each cycle the camera's recover
// module presents a pixel (data_valid_rec), so the SD frames run at the
// camera's pixel rate.  read_count is the position of the byte among all
// N_FRAMES frames of the clip; hcount and vcount are derived from it by
// counting columns and rows alongside, and it wraps to loop the clip.  If the
// FIFO is empty when a pixel is due, that pixel is skipped.  With use_sd low
// the camera stream (cam_*) passes through unchanged; with use_sd high the SD
// stream replaces it.  The output is registered: one cycle of latency on both
// paths.  The document gives the FIFO read rule, read_count and the mux;
// N_FRAMES, the empty-FIFO rule and the handshake details are this design's.
module sd_pixel_source
  import dither_pkg::*;
#(
  parameter int unsigned W        = IMG_W,
  parameter int unsigned H        = IMG_H,
  parameter int unsigned N_FRAMES = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic use_sd,
  input  logic data_valid_rec,
  // FIFO read side
  input  logic fifo_tvalid,
  input  pix_t fifo_tdata,
  output logic fifo_tready,
  // camera grayscale stream
  input  logic cam_valid,
  input  pix_t cam_bw,
  input  col_t cam_hcount,
  input  row_t cam_vcount,
  // to the line buffer and grayscale frame buffer
  output logic bw_valid,
  output pix_t bw,
  output col_t bw_hcount,
  output row_t bw_vcount,
  output logic [23:0] read_count
);
  col_t hc;
  row_t vc;
  logic take;

  assign take        = use_sd && data_valid_rec && fifo_tvalid;
  assign fifo_tready = use_sd && data_valid_rec;

  always_ff @(posedge clk) begin
    if (rst) begin
      read_count <= '0;
      hc <= '0;
      vc <= '0;
      bw_valid <= 1'b0;
    end else begin
      if (use_sd) begin
        bw_valid <= take;
        if (take) begin
          bw        <= fifo_tdata;
          bw_hcount <= hc;
          bw_vcount <= vc;
          read_count <= (int'(read_count) == W * H * N_FRAMES - 1) ? '0 : read_count + 1'b1;
          if (int'(hc) == W - 1) begin
            hc <= '0;
            vc <= (int'(vc) == H - 1) ? '0 : vc + 1'b1;
          end else begin
            hc <= hc + 1'b1;
          end
        end
      end else begin
        bw_valid  <= cam_valid;
        bw        <= cam_bw;
        bw_hcount <= cam_hcount;
        bw_vcount <= cam_vcount;
      end
    end
  end
endmodule
