// recover: gives every camera pixel its frame coordinates.
//
// hcount counts the pixels of a line and returns to 0 when href falls at the
// end of the line; vcount counts lines and returns to 0 when vsync rises at
// the start of a frame.  Each pixel leaves one cycle after it arrives, with
// data_valid_rec high for that cycle; hcount_rec and vcount_rec hold the
// coordinates of the last pixel until the next one, so downstream logic can
// look at them on any cycle.  Counters saturate-free: they simply wrap at
// their widths.  The document names the module and its job (assign hcount
// and vcount); the counting rules are this design's.
module recover
  import dither_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        pixel_valid,
  input  logic [15:0] pixel,
  input  logic        href,
  input  logic        vsync,
  output logic        data_valid_rec,
  output logic [15:0] pixel_rec,
  output col_t        hcount_rec,
  output row_t        vcount_rec
);
  logic href_d, vsync_d;
  col_t hc;
  row_t vc;

  always_ff @(posedge clk) begin
    if (rst) begin
      href_d <= 1'b0;
      vsync_d <= 1'b0;
      hc <= '0;
      vc <= '0;
      data_valid_rec <= 1'b0;
      pixel_rec  <= '0;
      hcount_rec <= '0;
      vcount_rec <= '0;
    end else begin
      href_d  <= href;
      vsync_d <= vsync;
      data_valid_rec <= pixel_valid;
      if (vsync && !vsync_d) begin
        vc <= '0;
        hc <= '0;
      end else if (href_d && !href) begin
        hc <= '0;
        vc <= vc + 1'b1;
      end else if (pixel_valid) begin
        hc <= hc + 1'b1;
      end
      if (pixel_valid) begin
        pixel_rec  <= pixel;
        hcount_rec <= hc;
        vcount_rec <= vc;
      end
    end
  end
endmodule
