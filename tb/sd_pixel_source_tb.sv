// sd_pixel_source_tb: with use_sd high, offers FIFO bytes (sometimes
// running dry) against a camera-rate pixel strobe and checks that a byte is
// taken only with the strobe, that each one comes out with the next raster
// coordinates (wrapping at line and frame ends) and that read_count wraps
// after all frames of the clip; with use_sd low, checks that the camera
// stream passes through with one cycle of latency.  Frame size shrunk to
// 6 x 4, clip to 3 frames.
module sd_pixel_source_tb;
  import dither_pkg::*;
  localparam int W = 6, H = 4, NF = 3;
  logic clk = 0, rst = 1;
  logic use_sd, data_valid_rec, fifo_tvalid, fifo_tready, cam_valid;
  pix_t fifo_tdata, cam_bw, bw;
  col_t cam_hcount, bw_hcount;
  row_t cam_vcount, bw_vcount;
  logic bw_valid;
  logic [23:0] read_count;
  int checks = 0, failures = 0;

  sd_pixel_source #(.W(W), .H(H), .N_FRAMES(NF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int taken;
    use_sd = 1; data_valid_rec = 0; fifo_tvalid = 0; fifo_tdata = 0;
    cam_valid = 0; cam_bw = 0; cam_hcount = 0; cam_vcount = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    taken = 0;
    for (int n = 0; n < 400; n++) begin
      logic strobe, avail;
      strobe = (n % 3) == 0;
      avail  = (n % 17) != 5;
      data_valid_rec = strobe;
      fifo_tvalid    = avail;
      fifo_tdata     = pix_t'(taken * 7 + 1);
      #1;
      checks++;
      if (fifo_tready != strobe) begin failures++; $display("tready %0d at strobe %0d", fifo_tready, strobe); end
      @(posedge clk);
      #1;
      checks++;
      if (bw_valid != (strobe && avail)) begin
        failures++; $display("n %0d valid %0d", n, bw_valid);
      end else if (bw_valid) begin
        int p;
        p = taken % (W * H);
        if (bw != pix_t'(taken * 7 + 1) || int'(bw_hcount) != p % W || int'(bw_vcount) != p / W ||
            int'(read_count) != (taken + 1) % (W * H * NF)) begin
          failures++;
          $display("byte %0d: %0d at (%0d,%0d) count %0d", taken, bw, bw_hcount, bw_vcount, read_count);
        end
        taken++;
      end
    end
    use_sd = 0;
    for (int n = 0; n < 50; n++) begin
      cam_valid = n[0]; cam_bw = pix_t'(n * 3); cam_hcount = col_t'(n); cam_vcount = row_t'(n / 7);
      @(posedge clk);
      #1;
      checks++;
      if (bw_valid != n[0] || bw != pix_t'(n * 3) || int'(bw_hcount) != n || int'(bw_vcount) != n / 7) begin
        failures++; $display("camera pass-through %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
