// camera_tb: drives an OV7670-like byte stream (pclk about a third of the
// system clock, asynchronous phase) into camera and checks that every pair of
// bytes inside href comes out as one RGB565 pixel, in order, that an odd
// trailing byte is dropped when href falls, and that href/vsync follow the
// pins.
module camera_tb;
  logic        clk = 0, rst = 1;
  logic        cam_pclk = 0, cam_href = 0, cam_vsync = 0;
  logic [7:0]  cam_data = 0;
  logic        pixel_valid, href, vsync;
  logic [15:0] pixel;
  int checks = 0, failures = 0;

  camera dut (.*);

  always #5 clk = ~clk;           // 100 MHz stand-in for clk_pixel
  always #17 cam_pclk = ~cam_pclk; // about 29 MHz, unrelated phase

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] expq [$];
  int got = 0;
  always @(posedge clk) if (pixel_valid) begin
    checks++;
    got++;
    if (expq.size() == 0) begin failures++; $display("unexpected pixel %h", pixel); end
    else begin
      logic [15:0] e;
      e = expq.pop_front();
      if (pixel !== e) begin failures++; $display("pixel %h expected %h", pixel, e); end
    end
  end

  // data changes on the falling pclk edge, is sampled on the rising edge
  task automatic send_line(int nbytes, int seed);
    @(negedge cam_pclk);
    cam_href = 1;
    for (int i = 0; i < nbytes; i++) begin
      cam_data = 8'((seed * 17 + i * 29) & 255);
      if (i % 2 == 1) expq.push_back({8'((seed * 17 + (i - 1) * 29) & 255), cam_data});
      @(negedge cam_pclk);
    end
    cam_href = 0;
    repeat (6) @(negedge cam_pclk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    cam_vsync = 1;
    repeat (8) @(posedge clk);
    checks++;
    if (!vsync) begin failures++; $display("vsync not passed on"); end
    cam_vsync = 0;
    for (int l = 0; l < 6; l++) send_line(40, l);
    send_line(7, 99);   // odd count: the last byte must be dropped
    send_line(10, 7);
    repeat (20) @(posedge clk);
    checks++;
    if (got != 6 * 20 + 3 + 5 || expq.size() != 0) begin
      failures++;
      $display("pixel count %0d, %0d still expected", got, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
