// frame_buffer_tb: writes a whole 320 x 240 frame into an 8-bit and a 1-bit
// frame buffer and reads it back in a different order on the other port,
// checking every pixel and the one-cycle read latency.
module frame_buffer_tb;
  localparam int DEPTH = 320 * 240;
  localparam int AW = 17;
  logic clk = 0;
  logic we;
  logic [AW-1:0] addr_a, addr_b;
  logic [7:0] din8, dout8;
  logic din1, dout1;
  int checks = 0, failures = 0;

  frame_buffer #(.WIDTH(8), .DEPTH(DEPTH), .AW(AW)) u8 (
    .clk_a(clk), .we_a(we), .addr_a, .din_a(din8), .clk_b(clk), .addr_b, .dout_b(dout8));
  frame_buffer #(.WIDTH(1), .DEPTH(DEPTH), .AW(AW)) u1 (
    .clk_a(clk), .we_a(we), .addr_a, .din_a(din1), .clk_b(clk), .addr_b, .dout_b(dout1));
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] f8(int a); return 8'((a * 7 + (a >> 8) * 3) & 255); endfunction
  function automatic logic f1(int a); return ((a * 13) >> 3) & 1; endfunction

  initial begin
    we = 0; addr_b = 0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      #1 we = 1; addr_a = AW'(a); din8 = f8(a); din1 = f1(a);
      @(posedge clk);
    end
    #1 we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 4099) % DEPTH;   // 4099 is coprime with DEPTH: visits every address
      addr_b = AW'(a);
      @(posedge clk);
      #1;
      checks++;
      if (dout8 != f8(a) || dout1 != f1(a)) begin
        failures++;
        if (failures < 10) $display("addr %0d: %0d %0d", a, dout8, dout1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
