// Body shared by the end-to-end testbenches of fpga_dither_top.  The
// including module defines the sizes (W, H, X_FRAMES, DEBOUNCE, SCALE,
// SS_PERIOD, WATCHDOG) and instantiates the top as `dut`.
//
// What it does:
//  * A camera model drives the OV7670 pins with random RGB565 frames (pclk
//    about 3.4 system clocks); an SD-FIFO model supplies grayscale frames.
//  * For every frame fed in, the expected grayscale image is worked out here
//    from the pixels (average or a single channel).
//  * Every dithered bit leaving the ditherer is recorded with the threshold in
//    force when it was computed.  When a frame is complete it is compared
//    with a plain raster-order Floyd-Steinberg or Jarvis-Judice-Ninke
//    reference over that grayscale image.
//  * Every gray flavour (sw[4:2]) is used for at least one checked frame.
//  * The seven-segment display is decoded digit by digit.
//  * The calibrator's sweep, the buttons, manta, the load button, glitch
//    mode, the SD source and the HDMI output (TMDS symbols decoded back to
//    pixels) are checked, and each mechanism is counted.

  logic        clk_pixel = 0, clk_bit = 1;
  logic [3:0]  btn = 4'b0001;
  logic [15:0] sw = '0;
  logic        cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [7:0]  cam_data = 0;
  pix_t        manta_threshold = 8'd0;
  logic        sd_fifo_tvalid = 0;
  pix_t        sd_fifo_tdata = 0;
  logic        sd_fifo_tready;
  logic [2:0]  hdmi_tx;
  logic        hdmi_clk;
  logic [6:0]  ss_cat;
  logic [7:0]  ss_an;
  logic [15:0] led;

  int checks = 0, failures = 0;

  always #5 clk_pixel = ~clk_pixel;
  always #0.5 clk_bit = ~clk_bit;
  always #17 cam_pclk = ~cam_pclk;

  int cyc = 0;
  always @(posedge clk_pixel) cyc <= cyc + 1;

  // ------------------------------------------------------------ frames fed
  localparam int NB = 4;           // ring of frame records
  int    gray  [NB][H][W];         // expected grayscale image of fed frame j
  int    feed_alg [NB];
  bit    feed_glitch [NB];
  int    feed_sel [NB];             // gray flavour (sw[4:2]), -1 for SD frames
  int    flavour_ok [8];            // matched frames per gray flavour
  int    fed = 0;                  // number of frames fed since reset

  // the SD clip: bytes waiting in the "FIFO"
  int sd_q [$];
  always @(posedge clk_pixel) begin
    if (sd_fifo_tready && sd_fifo_tvalid) void'(sd_q.pop_front());
  end
  always_comb begin
    sd_fifo_tvalid = sd_q.size() > 0;
    sd_fifo_tdata  = sd_q.size() > 0 ? pix_t'(sd_q[0]) : 8'd0;
  end

  function automatic int clampi(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int gray_of(logic [15:0] p, int sel);
    int r8, g8, b8;
    r8 = {p[15:11], p[15:13]};
    g8 = {p[10:5], p[10:9]};
    b8 = {p[4:0], p[4:2]};
    // Y, Cr, Cb: BT.601 full range with coefficients scaled by 1024,
    // rounded down, clamped
    case (sel)
      1: return r8;
      2: return g8;
      3: return b8;
      4: return clampi((306 * r8 + 601 * g8 + 117 * b8) >>> 10);
      5: return clampi((512 * r8 - 429 * g8 - 83 * b8 + 131072) >>> 10);
      6: return clampi((-173 * r8 - 339 * g8 + 512 * b8 + 131072) >>> 10);
      default: return (r8 + g8 + b8) / 3;
    endcase
  endfunction

  // Feed one frame through the camera pins.  With use_sd the line buffer
  // takes the SD bytes instead, one per camera pixel.
  task automatic feed_frame(int kind);
    int j;
    logic [15:0] img [H][W];
    j = fed % NB;
    feed_alg[j]    = int'(sw[13]);
    feed_glitch[j] = sw[14];
    feed_sel[j]    = sw[1] ? -1 : int'(sw[4:2]);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        case (kind)
          0: img[r][c] = 16'($urandom);
          1: img[r][c] = 16'(((c * 31 / W) << 11) | ((r * 63 / H) << 5) | ((c + r) % 32));
          default: img[r][c] = (((r / 2) + (c / 3)) % 2 == 1) ? 16'hFFFF : 16'h0000;
        endcase
        if (sw[1]) begin
          int v;
          v = (kind == 0) ? int'($urandom_range(0, 255)) : (c * 255 / (W - 1) + r * 5) % 256;
          sd_q.push_back(v);
          gray[j][r][c] = v;
        end else begin
          gray[j][r][c] = gray_of(img[r][c], int'(sw[4:2]));
        end
      end
    fed++;
    // vsync pulse, then the lines
    @(negedge cam_pclk);
    cam_vsync = 1;
    repeat (3) @(negedge cam_pclk);
    cam_vsync = 0;
    repeat (3) @(negedge cam_pclk);
    for (int r = 0; r < H; r++) begin
      cam_href = 1;
      for (int c = 0; c < W; c++) begin
        cam_data = img[r][c][15:8];
        @(negedge cam_pclk);
        cam_data = img[r][c][7:0];
        @(negedge cam_pclk);
      end
      cam_href = 0;
      repeat (4) @(negedge cam_pclk);
    end
    repeat (6) @(negedge cam_pclk);
  endtask

  // ------------------------------------------------------------ dithered bits
  int   got     [NB][H][W];
  int   got_thr [NB][H][W];
  int   got_n   [NB];
  int   dframe = -1;               // index of the frame being dithered
  pix_t thr_prev;
  int   frames_ok [2];             // per algorithm
  int   glitch_frames_differ = 0, glitch_frames = 0;
  int   sd_frames_ok = 0;
  bit   frame_is_sd [NB];
  int   wb_count = 0;
  int   trans [NB];                // horizontal transitions per dithered frame
  int   trial_thr [64];
  int   trial_trans [64];

  localparam int WT [5] = '{0, 0, 0, 7, 5};
  localparam int WM [5] = '{3, 5, 7, 5, 3};
  localparam int WB [5] = '{1, 3, 5, 3, 1};
  localparam int FT [5] = '{0, 0, 0, 7, 0};
  localparam int FM [5] = '{0, 3, 5, 1, 0};


  // raster-order reference with a per-pixel threshold; returns mismatches
  function automatic int compare_frame(int j, int alg);
    int img [H][W];
    int bad;
    int den;
    bad = 0;
    den = alg ? 48 : 16;
    img = gray[j];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int b, e;
        b = img[r][c] >= got_thr[j][r][c] ? 1 : 0;
        e = img[r][c] - (b ? 255 : 0);
        if (b != got[j][r][c]) bad++;
        for (int dc = -2; dc <= 2; dc++)
          if (c + dc >= 0 && c + dc < W) begin
            int wt, wm, wb;
            wt = alg ? WT[dc+2] : FT[dc+2];
            wm = alg ? WM[dc+2] : FM[dc+2];
            wb = alg ? WB[dc+2] : 0;
            if (wt != 0) img[r][c+dc] = clampi(img[r][c+dc] + (e * wt) / den);
            if (wm != 0 && r + 1 < H) img[r+1][c+dc] = clampi(img[r+1][c+dc] + (e * wm) / den);
            if (wb != 0 && r + 2 < H) img[r+2][c+dc] = clampi(img[r+2][c+dc] + (e * wb) / den);
          end
      end
    return bad;
  endfunction

  int last_fb_bit [W*H];
  bit prev_bit;

  always @(posedge clk_pixel) begin
    thr_prev <= dut.threshold;
    if (dut.wb.v1) wb_count++;
    if (!dut.rst && dut.d_valid) begin
      int r, c, j;
      r = int'(dut.d_row);
      c = int'(dut.d_col);
      if (r == 0 && c == 0) begin
        dframe++;
        j = dframe % NB;
        got_n[j] = 0;
        trans[j] = 0;
      end
      if (dframe >= 0 && r < H && c < W) begin
        j = dframe % NB;
        got[j][r][c]     = int'(dut.d_bit);
        got_thr[j][r][c] = int'(thr_prev);
        got_n[j]++;
        last_fb_bit[r * W + c] = int'(dut.d_bit);
        if (c > 0 && dut.d_bit != prev_bit) trans[j]++;
        prev_bit = dut.d_bit;
        if (r == H - 1 && c == W - 1) frame_done(dframe);
      end else if (r < H && c < W) begin
        prev_bit = dut.d_bit;
      end
    end
  end

  task automatic frame_done(int f);
    int j, bad, alg;
    bit glitch, clean;
    j = f % NB;
    alg = feed_alg[j];
    glitch = feed_glitch[j];
    // frame f is finished while frame f+1 is fed: both must share the set-up
    clean = fed > f + 1 && feed_alg[(f + 1) % NB] == alg && feed_glitch[(f + 1) % NB] == glitch;
    if (f < 64) begin
      trial_thr[f]   = got_thr[j][1][1];
      trial_trans[f] = trans[j];
    end
    if (!clean) return;
    bad = compare_frame(j, alg);
    if (glitch) begin
      glitch_frames++;
      if (bad > 0) glitch_frames_differ++;
      return;
    end
    checks++;
    if (bad != 0 || got_n[j] != W * H) begin
      failures++;
      $display("dithered frame %0d (%s): %0d of %0d bits differ, %0d bits seen", f, alg ? "JJN" : "FS",
               bad, W * H, got_n[j]);
    end else begin
      frames_ok[alg]++;
      if (feed_sel[j] >= 0) flavour_ok[feed_sel[j]]++;
      if (frame_is_sd[j]) sd_frames_ok++;
    end
  endtask

  always @(posedge clk_pixel) if (dut.bw_valid && !dut.rst) frame_is_sd[(fed - 1) % NB] = sw[1];


  // ------------------------------------------------------------ seven segment
  // While enabled, the lit digit must show its nibble of
  // {0, step, trial threshold, suggestion, threshold in use}.
  localparam logic [6:0] HEXSEG [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  bit ss_check_on = 0;
  int ss_checked = 0, ss_bad = 0;
  bit [7:0] ss_digits_seen = 0;
  always @(negedge clk_pixel) if (ss_check_on) begin
    logic [31:0] v;
    int d;
    v = {1'b0, sw[11:5], dut.trial_threshold, dut.suggestion, dut.threshold};
    d = -1;
    for (int i = 0; i < 8; i++) if (ss_an == ~(8'b1 << i)) d = i;
    ss_checked++;
    if (d < 0 || ss_cat != ~HEXSEG[v[4*d +: 4]]) ss_bad++;
    else ss_digits_seen[d] = 1'b1;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk_pixel);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ helpers
  task automatic press(int b);
    @(negedge clk_pixel);
    btn[b] = 1;
    repeat (DEBOUNCE + 10) @(negedge clk_pixel);
    btn[b] = 0;
    repeat (DEBOUNCE + 10) @(negedge clk_pixel);
  endtask

  task automatic expect_threshold(int e, string what);
    checks++;
    if (int'(dut.user_threshold) != e) begin
      failures++;
      $display("%s: threshold %0d expected %0d", what, dut.user_threshold, e);
    end
  endtask

  // ------------------------------------------------------------ HDMI check
  function automatic logic [7:0] tmds_decode(logic [9:0] s);
    logic [7:0] d, o;
    d = s[9] ? ~s[7:0] : s[7:0];
    o[0] = d[0];
    for (int i = 1; i < 8; i++) o[i] = s[8] ? (d[i] ^ d[i-1]) : ~(d[i] ^ d[i-1]);
    return o;
  endfunction
  localparam logic [9:0] TOK [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};

  // screen position of the symbol now leaving the encoders: the timing
  // generator's outputs five cycles ago
  int  hq [6], vq [6];
  bit  aq [6], hsq [6], vsq [6];
  int  display_checked [2];
  int  display_bad = 0;
  bit  display_check_on = 0;
  always @(posedge clk_pixel) begin
    for (int i = 5; i > 0; i--) begin
      hq[i] = hq[i-1]; vq[i] = vq[i-1]; aq[i] = aq[i-1]; hsq[i] = hsq[i-1]; vsq[i] = vsq[i-1];
    end
    hq[0] = int'(dut.hcount); vq[0] = int'(dut.vcount); aq[0] = dut.active;
    hsq[0] = dut.hsync; vsq[0] = dut.vsync;
    if (display_check_on) begin
      int e;
      if (aq[5]) begin
        if (hq[5] < H * SCALE && vq[5] < W * SCALE) begin
          int col, row;
          col = vq[5] / SCALE;
          row = H - 1 - hq[5] / SCALE;
          e = sw[0] ? (dut.u_fb_dither.mem[row * W + col] ? 255 : 0) : int'(dut.u_fb_gray.mem[row * W + col]);
          display_checked[sw[0]]++;
        end else e = 0;
        for (int l = 0; l < 3; l++)
          if (int'(tmds_decode(dut.tmds_word[l])) != e) display_bad++;
      end else begin
        if (dut.tmds_word[0] != TOK[{vsq[5], hsq[5]}] || dut.tmds_word[1] != TOK[0]) display_bad++;
      end
    end
  end

  // ------------------------------------------------------------ scenario
  initial begin
    int sugg, best, thr;
    for (int k = 0; k < 6; k++) begin hq[k] = 0; vq[k] = 0; aq[k] = 0; hsq[k] = 0; vsq[k] = 0; end
    frames_ok[0] = 0; frames_ok[1] = 0;
    for (int f = 0; f < 8; f++) flavour_ok[f] = 0;
    display_checked[0] = 0; display_checked[1] = 0;
    for (int k = 0; k < NB; k++) frame_is_sd[k] = 0;
    sw[0] = 1;                    // show the dithered frame
    sw[11:5] = 7'd16;             // button step
    sw[4:2] = 3'd0;               // average
    repeat (20) @(negedge clk_pixel);
    btn[0] = 0;                   // release reset
    repeat (10) @(negedge clk_pixel);

    // 1. calibration sweep (Floyd-Steinberg), X_FRAMES trial frames
    checks++;
    if (!dut.calibrating) begin failures++; $display("calibrator idle after reset"); end
    for (int f = 0; f < X_FRAMES + 1; f++) feed_frame(f % 3 == 2 ? 1 : 0);
    feed_frame(0);
    checks++;
    if (!dut.calib_done || dut.calibrating) begin
      failures++; $display("calibration did not finish");
    end
    best = -1;
    for (int f = 0; f < X_FRAMES; f++) begin
      checks++;
      if (trial_thr[f] != f * 256 / X_FRAMES) begin
        failures++; $display("trial frame %0d used threshold %0d", f, trial_thr[f]);
      end
      if (trial_trans[f] > best) best = trial_trans[f];
    end
    sugg = int'(dut.suggestion);
    checks++;
    begin
      bit found;
      found = 0;
      // the hardware attributes one or two boundary bits to the next trial
      for (int f = 0; f < X_FRAMES; f++)
        if (trial_thr[f] == sugg && trial_trans[f] >= best - 3) found = 1;
      if (!found || int'(led[7:0]) != sugg) begin
        failures++; $display("suggestion %0d does not match the sweep", sugg);
      end
    end

    // 2. threshold buttons, manta and load, between frames
    expect_threshold(128, "after calibration");
    ss_check_on = 1;
    repeat (8 * SS_PERIOD + 8) @(negedge clk_pixel);
    ss_check_on = 0;
    checks++;
    if (ss_bad != 0 || ss_digits_seen != 8'hFF) begin
      failures++; $display("seven-segment display: %0d of %0d samples wrong, digits seen %b", ss_bad, ss_checked, ss_digits_seen);
    end
    press(2);                       expect_threshold(144, "button up");
    press(3); press(3);             expect_threshold(112, "button down");
    manta_threshold = 8'd90;
    repeat (4) @(negedge clk_pixel); expect_threshold(90, "manta");
    press(2);                       expect_threshold(106, "button up after manta");
    feed_frame(0);
    sw[4:2] = 3'd1;                 // red channel only
    feed_frame(1);
    press(1);                       expect_threshold(sugg, "load suggestion");
    sw[4:2] = 3'd2;
    feed_frame(0);
    for (int f = 3; f < 8; f++) begin
      sw[4:2] = 3'(f);
      feed_frame(f == 5 ? 1 : 0);
    end
    sw[4:2] = 3'd0;
    manta_threshold = 8'd128;
    repeat (4) @(negedge clk_pixel);
    feed_frame(2);
    feed_frame(0);

    // 3. Jarvis-Judice-Ninke
    sw[13] = 1;
    for (int f = 0; f < 4; f++) feed_frame(f == 1 ? 1 : 0);

    // 4. glitch mode
    sw[14] = 1;
    for (int f = 0; f < 3; f++) feed_frame(0);
    sw[14] = 0;
    sw[13] = 0;
    for (int f = 0; f < 3; f++) feed_frame(0);

    // 5. frames from the SD card
    sw[1] = 1;
    for (int f = 0; f < 3; f++) feed_frame(f == 1 ? 1 : 0);
    sw[1] = 0;
    feed_frame(0);

    // 6. HDMI output, camera idle: one video frame per display source
    for (int s = 1; s >= 0; s--) begin
      sw[0] = s[0];
      @(posedge dut.new_frame);
      display_check_on = 1;
      @(posedge dut.new_frame);
      display_check_on = 0;
    end
    checks++;
    if (display_bad != 0) begin failures++; $display("%0d HDMI symbols wrong", display_bad); end

    // 7. frame buffers hold the last bits / bytes written
    begin
      int bad;
      bad = 0;
      for (int a = 0; a < W * H; a++) if (int'(dut.u_fb_dither.mem[a]) != last_fb_bit[a]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("%0d dithered frame buffer bits wrong", bad); end
      bad = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          if (int'(dut.u_fb_gray.mem[r * W + c]) != gray[(fed - 1) % NB][r][c]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("%0d grayscale frame buffer bytes wrong", bad); end
    end

    // 8. every mechanism happened
    $display("FS frames matched %0d, JJN frames matched %0d, SD frames matched %0d",
             frames_ok[0], frames_ok[1], sd_frames_ok);
    $display("glitch frames %0d (%0d differ from true dithering), write-backs %0d",
             glitch_frames, glitch_frames_differ, wb_count);
    $display("frames matched per gray flavour (avg R G B Y Cr Cb avg): %0d %0d %0d %0d %0d %0d %0d %0d",
             flavour_ok[0], flavour_ok[1], flavour_ok[2], flavour_ok[3], flavour_ok[4], flavour_ok[5],
             flavour_ok[6], flavour_ok[7]);
    $display("seven-segment samples checked %0d", ss_checked);
    $display("HDMI pixels checked: dithered %0d, grayscale %0d", display_checked[1], display_checked[0]);
    checks++; if (frames_ok[0] == 0)            begin failures++; $display("no FS frame checked"); end
    checks++; if (frames_ok[1] == 0)            begin failures++; $display("no JJN frame checked"); end
    checks++; if (sd_frames_ok == 0)            begin failures++; $display("no SD frame checked"); end
    checks++; if (glitch_frames_differ == 0)    begin failures++; $display("glitch mode never showed"); end
    for (int f = 0; f < 7; f++) begin
      checks++;
      if (flavour_ok[f] == 0) begin failures++; $display("no frame of gray flavour %0d checked", f); end
    end
    checks++; if (wb_count == 0)                begin failures++; $display("no write-backs"); end
    checks++; if (display_checked[0] == 0 || display_checked[1] == 0) begin
      failures++; $display("a display source was never shown");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
