// video_sig_gen: raster timing generator for the HDMI output.
//
// Counts hcount across H_TOTAL pixels per line and vcount across V_TOTAL
// lines per frame.  The defaults are the CEA 1280x720p60 timing at a
// 74.25 MHz pixel clock: 1280 active + 110 front porch + 40 sync + 220 back
// porch; 720 active + 5 + 5 + 20 lines; syncs active high.  active is high
// inside the visible area, new_frame pulses for one cycle at the first pixel
// after the visible area of each frame, frame_count counts frames.  All
// outputs are registered together.  The document names the module and the
// 720p60 format; the numbers are the standard ones.
module video_sig_gen #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 220,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        active,
  output logic        new_frame,
  output logic [5:0]  frame_count
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] h;
  logic [9:0]  v;

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0;
      v <= '0;
      frame_count <= '0;
    end else begin
      if (int'(h) == H_TOTAL - 1) begin
        h <= '0;
        v <= (int'(v) == V_TOTAL - 1) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
      if (int'(h) == H_ACTIVE && int'(v) == V_ACTIVE) frame_count <= frame_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0; vcount <= '0; hsync <= 1'b0; vsync <= 1'b0;
      active <= 1'b0; new_frame <= 1'b0;
    end else begin
      hcount    <= h;
      vcount    <= v;
      hsync     <= int'(h) >= H_ACTIVE + H_FP && int'(h) < H_ACTIVE + H_FP + H_SYNC;
      vsync     <= int'(v) >= V_ACTIVE + V_FP && int'(v) < V_ACTIVE + V_FP + V_SYNC;
      active    <= int'(h) < H_ACTIVE && int'(v) < V_ACTIVE;
      new_frame <= int'(h) == H_ACTIVE && int'(v) == V_ACTIVE;
    end
  end
endmodule
