// fpga_dither_top: live camera video, dithered to one bit per pixel in real
// time and shown on a 720p HDMI monitor.
//
// Camera side (clk_pixel, 74.25 MHz):
//   camera -> recover -> color_mod (sw[4:2]) -> sd_pixel_source (sw[1]) ->
//   line_buffer <-> dither_fs / dither_jjn (sw[13]) -> 1-bit frame buffer
//   The grayscale stream is also written to the 8-bit frame buffer.
// Threshold: threshold_buttons (btn[2] up, btn[3] down by sw[11:5], btn[1]
//   loads the calibrator's suggestion, manta_threshold loads on change) and
//   threshold_calibrator, which sweeps the threshold for its first X_FRAMES
//   frames after reset (btn[0]) and drives the ditherer meanwhile.
// Display side: video_sig_gen -> scale -> rotate -> both frame buffers ->
//   sw[0] mux (1 = dithered, 0 = grayscale) -> three tmds_encoders, all lanes
//   the same black/white/gray value -> tmds_serializers -> hdmi_tx / hdmi_clk
//   (single-ended serial bits; the board's differential pad buffers are
//   outside this design).
// sw[14] selects glitch mode in the line buffer.  The seven-segment display
// shows, from the left, the button step, the calibrator's trial threshold,
// its suggestion and the threshold in use; led[7:0] shows the suggestion.
//
// The chain of blocks, the switch and button uses named above (sw[4:2],
// sw[11:5], sw[13], sw[14], btn[1..3]) and all sizes are the document's;
// sw[0], sw[1], btn[0] as reset, the display contents and the latency
// alignment of the display path are this design's choices.
//
// The calibrator's frame boundary is taken from the line buffer's read side,
// one column before pixel (0,0) is dithered, so a trial threshold applies to
// exactly one frame; the last one or two bits of the previous frame, which
// leave the ditherer just after that point, are counted with the new trial.
//
// Display-path timing: sync and active are delayed 4 cycles to line up with
// the pixel (scale 1, rotate 1, frame buffer 1, output register 1), then the
// TMDS encoder adds one more.
module fpga_dither_top
  import dither_pkg::*;
#(
  parameter int unsigned W         = IMG_W,
  parameter int unsigned H         = IMG_H,
  parameter int unsigned DEBOUNCE  = 371_250,
  parameter int unsigned X_FRAMES  = 16,
  parameter int unsigned SS_PERIOD = 100_000,
  parameter int unsigned SCALE     = 2,
  parameter int unsigned H_ACTIVE  = 1280,
  parameter int unsigned H_FP      = 110,
  parameter int unsigned H_SYNC    = 40,
  parameter int unsigned H_BP      = 220,
  parameter int unsigned V_ACTIVE  = 720,
  parameter int unsigned V_FP      = 5,
  parameter int unsigned V_SYNC    = 5,
  parameter int unsigned V_BP      = 20,
  parameter int unsigned N_FRAMES  = 16
) (
  input  logic        clk_pixel,
  input  logic        clk_bit,
  input  logic [3:0]  btn,
  input  logic [15:0] sw,
  // OV7670 camera
  input  logic        cam_pclk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  input  logic [7:0]  cam_data,
  // host-set threshold (debug core)
  input  pix_t        manta_threshold,
  // SD-card FIFO read side
  input  logic        sd_fifo_tvalid,
  input  pix_t        sd_fifo_tdata,
  output logic        sd_fifo_tready,
  // HDMI serial lanes, before the differential pad buffers
  output logic [2:0]  hdmi_tx,
  output logic        hdmi_clk,
  // board indicators
  output logic [6:0]  ss_cat,
  output logic [7:0]  ss_an,
  output logic [15:0] led
);
  localparam int unsigned DEPTH = W * H;
  localparam int unsigned AW    = $clog2(DEPTH);

  // ---------------------------------------------------------------- reset
  logic [1:0] rst_sync;
  logic       rst;
  always_ff @(posedge clk_pixel) rst_sync <= {rst_sync[0], btn[0]};
  assign rst = rst_sync[1];

  // ---------------------------------------------------------------- camera
  logic        cam_pix_valid, cam_href_s, cam_vsync_s;
  logic [15:0] cam_pix;
  camera u_camera (
    .clk(clk_pixel), .rst,
    .cam_pclk, .cam_href, .cam_vsync, .cam_data,
    .pixel_valid(cam_pix_valid), .pixel(cam_pix), .href(cam_href_s), .vsync(cam_vsync_s)
  );

  logic        data_valid_rec;
  logic [15:0] pixel_rec;
  col_t        hcount_rec;
  row_t        vcount_rec;
  recover u_recover (
    .clk(clk_pixel), .rst,
    .pixel_valid(cam_pix_valid), .pixel(cam_pix), .href(cam_href_s), .vsync(cam_vsync_s),
    .data_valid_rec, .pixel_rec, .hcount_rec, .vcount_rec
  );

  logic cam_bw_valid;
  pix_t cam_bw;
  col_t cam_bw_hcount;
  row_t cam_bw_vcount;
  color_mod u_color_mod (
    .clk(clk_pixel), .rst, .sel(sw[4:2]),
    .valid_in(data_valid_rec), .pixel_in(pixel_rec), .hcount_in(hcount_rec), .vcount_in(vcount_rec),
    .bw_valid(cam_bw_valid), .bw(cam_bw), .bw_hcount(cam_bw_hcount), .bw_vcount(cam_bw_vcount)
  );

  logic        bw_valid;
  pix_t        bw;
  col_t        bw_hcount;
  row_t        bw_vcount;
  logic [23:0] sd_read_count;
  sd_pixel_source #(.W(W), .H(H), .N_FRAMES(N_FRAMES)) u_sd_source (
    .clk(clk_pixel), .rst, .use_sd(sw[1]), .data_valid_rec,
    .fifo_tvalid(sd_fifo_tvalid), .fifo_tdata(sd_fifo_tdata), .fifo_tready(sd_fifo_tready),
    .cam_valid(cam_bw_valid), .cam_bw, .cam_hcount(cam_bw_hcount), .cam_vcount(cam_bw_vcount),
    .bw_valid, .bw, .bw_hcount, .bw_vcount, .read_count(sd_read_count)
  );

  // ---------------------------------------------------------------- dither
  alg_e   alg;
  lb_rd_t lb_rd;
  lb_wb_t wb_fs, wb_jjn, wb;
  assign alg = alg_e'(sw[13]);

  line_buffer #(.W(W), .H(H)) u_line_buffer (
    .clk(clk_pixel), .rst, .alg, .glitch_mode(sw[14]),
    .bw_valid, .bw_hcount, .bw_vcount, .bw,
    .rd(lb_rd), .wb
  );

  pix_t threshold, user_threshold, trial_threshold, suggestion;
  logic calibrating, calib_done;

  lb_rd_t rd_fs, rd_jjn;
  always_comb begin
    rd_fs  = lb_rd;
    rd_jjn = lb_rd;
    rd_fs.pos.valid  = lb_rd.pos.valid && alg == ALG_FS;
    rd_jjn.pos.valid = lb_rd.pos.valid && alg == ALG_JJN;
  end

  logic fs_valid, fs_bit, jjn_valid, jjn_bit;
  col_t fs_col, jjn_col;
  row_t fs_row, jjn_row;
  dither_fs #(.H(H)) u_dither_fs (
    .clk(clk_pixel), .rst, .threshold, .in(rd_fs), .wb(wb_fs),
    .out_valid(fs_valid), .out_bit(fs_bit), .out_col(fs_col), .out_row(fs_row)
  );
  dither_jjn #(.H(H)) u_dither_jjn (
    .clk(clk_pixel), .rst, .threshold, .in(rd_jjn), .wb(wb_jjn),
    .out_valid(jjn_valid), .out_bit(jjn_bit), .out_col(jjn_col), .out_row(jjn_row)
  );

  logic d_valid, d_bit;
  col_t d_col;
  row_t d_row;
  always_comb begin
    if (alg == ALG_JJN) begin
      wb = wb_jjn; d_valid = jjn_valid; d_bit = jjn_bit; d_col = jjn_col; d_row = jjn_row;
    end else begin
      wb = wb_fs;  d_valid = fs_valid;  d_bit = fs_bit;  d_col = fs_col;  d_row = fs_row;
    end
  end

  // ---------------------------------------------------------------- threshold
  threshold_buttons #(.DEBOUNCE(DEBOUNCE)) u_threshold_buttons (
    .clk(clk_pixel), .rst,
    .btn_inc(btn[2]), .btn_dec(btn[3]), .btn_load(btn[1]), .step(sw[11:5]),
    .manta_threshold, .calib_threshold(suggestion), .threshold(user_threshold)
  );

  // A new trial starts on the column read just before pixel (0,0) is
  // dithered, so every pixel of a frame sees the same trial threshold.
  logic frame_start;
  assign frame_start = lb_rd.pos.valid && lb_rd.pos.row == '0 &&
                       lb_rd.pos.col == ((alg == ALG_JJN) ? col_t'(1) : col_t'(0));

  threshold_calibrator #(.X_FRAMES(X_FRAMES)) u_calibrator (
    .clk(clk_pixel), .rst,
    .bit_valid(d_valid), .bit_in(d_bit), .bit_col(d_col),
    .frame_start(frame_start),
    .calibrating, .trial_threshold, .suggestion, .done(calib_done)
  );

  assign threshold = calibrating ? trial_threshold : user_threshold;

  // ---------------------------------------------------------------- frame buffers
  logic [AW-1:0] rd_addr;
  logic          fb_bit;
  pix_t          fb_gray;

  frame_buffer #(.WIDTH(1), .DEPTH(DEPTH), .AW(AW)) u_fb_dither (
    .clk_a(clk_pixel), .we_a(d_valid && int'(d_row) < H && int'(d_col) < W),
    .addr_a(AW'(int'(d_row) * int'(W) + int'(d_col))), .din_a(d_bit),
    .clk_b(clk_pixel), .addr_b(rd_addr), .dout_b(fb_bit)
  );

  frame_buffer #(.WIDTH(8), .DEPTH(DEPTH), .AW(AW)) u_fb_gray (
    .clk_a(clk_pixel), .we_a(bw_valid && int'(bw_vcount) < H && int'(bw_hcount) < W),
    .addr_a(AW'(int'(bw_vcount) * int'(W) + int'(bw_hcount))), .din_a(bw),
    .clk_b(clk_pixel), .addr_b(rd_addr), .dout_b(fb_gray)
  );

  // ---------------------------------------------------------------- display path
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, active, new_frame;
  logic [5:0]  frame_count;
  video_sig_gen #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vsg (
    .clk(clk_pixel), .rst, .hcount, .vcount, .hsync, .vsync, .active, .new_frame, .frame_count
  );

  logic [10:0] hs_scaled;
  logic [9:0]  vs_scaled;
  logic        scaled_ok, addr_ok;
  scale #(.SCALE(SCALE), .IMG_COLS(H), .IMG_ROWS(W)) u_scale (
    .clk(clk_pixel), .hcount_in(hcount), .vcount_in(vcount),
    .hcount_scaled(hs_scaled), .vcount_scaled(vs_scaled), .valid_addr(scaled_ok)
  );

  rotate #(.W(W), .H(H), .AW(AW)) u_rotate (
    .clk(clk_pixel), .x(hs_scaled), .y(vs_scaled), .valid_in(scaled_ok),
    .addr(rd_addr), .valid_out(addr_ok)
  );

  logic [3:0] hs_d, vs_d, act_d;
  logic       addr_ok_d;
  pix_t       pixel_out;
  always_ff @(posedge clk_pixel) begin
    hs_d      <= {hs_d[2:0], hsync};
    vs_d      <= {vs_d[2:0], vsync};
    act_d     <= {act_d[2:0], active};
    addr_ok_d <= addr_ok;
    if (!addr_ok_d)  pixel_out <= 8'd0;
    else if (sw[0])  pixel_out <= fb_bit ? 8'd255 : 8'd0;
    else             pixel_out <= fb_gray;
  end

  logic [9:0] tmds_word [3];
  for (genvar i = 0; i < 3; i++) begin : g_lane
    tmds_encoder u_enc (
      .clk(clk_pixel), .rst, .data(pixel_out),
      .ctrl(i == 0 ? {vs_d[3], hs_d[3]} : 2'b00), .active(act_d[3]),
      .tmds(tmds_word[i])
    );
    tmds_serializer u_ser (
      .clk_pixel, .clk_bit, .rst, .word(tmds_word[i]), .serial(hdmi_tx[i])
    );
  end
  tmds_serializer u_ser_clk (
    .clk_pixel, .clk_bit, .rst, .word(10'b0000011111), .serial(hdmi_clk)
  );

  // ---------------------------------------------------------------- indicators
  seven_segment_controller #(.COUNT_PERIOD(SS_PERIOD)) u_ss (
    .clk(clk_pixel), .rst,
    .val({1'b0, sw[11:5], trial_threshold, suggestion, threshold}),
    .cat(ss_cat), .an(ss_an)
  );

  assign led = {sw[13], sw[14], calib_done, calibrating, frame_count[3:0], suggestion};

endmodule
