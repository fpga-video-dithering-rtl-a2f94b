// camera: captures the OV7670 parallel output in the clk_pixel domain and
// assembles RGB565 pixels.
//
// The sensor's pclk, href, vsync and data come from another clock (about
// 24 MHz) and are passed through a two-flop synchroniser; clk_pixel
// (74.25 MHz) samples them about three times per pclk period.  On each
// rising edge of the synchronised pclk while href is high one byte is taken;
// every second byte completes a pixel {first byte, second byte}, which is
// presented with pixel_valid for one cycle.  The byte phase restarts whenever
// href is low.  href and vsync are passed on, synchronised, for the recover
// module.  The document gives the camera's role (sync to clk_pixel, RGB565
// pixels); the byte order and the synchroniser are this design's choices.
//
// Latency: pixel_valid rises 4 clk_pixel cycles after the pclk edge that
// carried the second byte (two sync flops, the edge detector, the output
// register).
module camera (
  input  logic        clk,
  input  logic        rst,
  input  logic        cam_pclk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  input  logic [7:0]  cam_data,
  output logic        pixel_valid,
  output logic [15:0] pixel,
  output logic        href,
  output logic        vsync
);
  logic [10:0] s0, s1;   // {pclk, href, vsync, data}
  logic        pclk_d;
  logic        phase;
  logic [7:0]  first;

  always_ff @(posedge clk) begin
    s0 <= {cam_pclk, cam_href, cam_vsync, cam_data};
    s1 <= s0;
  end

  assign href  = s1[9];
  assign vsync = s1[8];

  always_ff @(posedge clk) begin
    if (rst) begin
      pclk_d      <= 1'b0;
      phase       <= 1'b0;
      pixel_valid <= 1'b0;
      first       <= '0;
      pixel       <= '0;
    end else begin
      pclk_d      <= s1[10];
      pixel_valid <= 1'b0;
      if (!s1[9]) begin
        phase <= 1'b0;
      end else if (s1[10] && !pclk_d) begin
        phase <= ~phase;
        if (!phase) first <= s1[7:0];
        else begin
          pixel       <= {first, s1[7:0]};
          pixel_valid <= 1'b1;
        end
      end
    end
  end
endmodule
