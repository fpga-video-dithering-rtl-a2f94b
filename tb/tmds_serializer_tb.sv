// tmds_serializer_tb: presents a new 10-bit word every pixel clock, with a
// bit clock ten times faster whose edges coincide with the pixel clock's,
// records the serial line, and checks that it carries the words least
// significant bit first, back to back and in order, and that the first word
// starts within three pixel periods of being presented.
module tmds_serializer_tb;
  logic clk_pixel = 0, clk_bit = 1, rst = 1;
  logic [9:0] word;
  logic serial;
  int checks = 0, failures = 0;

  tmds_serializer dut (.*);
  always #50 clk_pixel = ~clk_pixel;   // rising edges at 50, 150, ...
  always #5  clk_bit = ~clk_bit;       // rising edges at 10, 20, ..., 50, ...

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] wf(int n); return 10'((n * 389 + 77) & 1023); endfunction

  localparam int NW = 300;
  logic bits [NW * 10 + 100];
  int nb = 0;
  logic recording = 0;
  always @(negedge clk_bit) if (recording && nb < NW * 10 + 100) begin
    bits[nb] = serial;
    nb++;
  end

  initial begin
    int off;
    word = 10'h3FF;   // idle pattern, differs from word 0 in its low bits
    repeat (3) @(posedge clk_pixel);
    rst <= 0;
    repeat (3) @(posedge clk_pixel);
    recording = 1;
    for (int n = 0; n < NW; n++) begin
      word <= wf(n);
      @(posedge clk_pixel);
    end
    repeat (4) @(posedge clk_pixel);
    // find where word 0 begins
    off = -1;
    for (int o = 0; o < 40 && off < 0; o++) begin
      bit ok;
      ok = 1;
      for (int b = 0; b < 20; b++) if (bits[o + b] != wf(b / 10)[b % 10]) ok = 0;
      if (ok) off = o;
    end
    checks++;
    if (off < 0 || off > 30) begin
      failures++;
      $display("first word not found near the start (offset %0d)", off);
    end else
      for (int n = 0; n < NW; n++)
        for (int b = 0; b < 10; b++) begin
          checks++;
          if (bits[off + n * 10 + b] != wf(n)[b]) begin
            failures++;
            if (failures < 10) $display("word %0d bit %0d wrong", n, b);
          end
        end
    $display("first bit after %0d bit periods", off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
