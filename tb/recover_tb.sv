// recover_tb: feeds recover synthetic pixel strobes with href and vsync and
// checks the hcount/vcount given to each pixel, the one-cycle latency, and
// that the coordinates restart at line and frame boundaries.
module recover_tb;
  import dither_pkg::*;
  logic        clk = 0, rst = 1;
  logic        pixel_valid = 0, href = 0, vsync = 0;
  logic [15:0] pixel = 0;
  logic        data_valid_rec;
  logic [15:0] pixel_rec;
  col_t        hcount_rec;
  row_t        vcount_rec;
  int checks = 0, failures = 0;

  recover dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_h, exp_v;
  logic [15:0] exp_p;
  logic expect_out = 0;
  always @(posedge clk) begin
    if (expect_out) begin
      checks++;
      if (!data_valid_rec || hcount_rec != col_t'(exp_h) || vcount_rec != row_t'(exp_v) || pixel_rec != exp_p) begin
        failures++;
        $display("got v%0d (%0d,%0d) %h expected (%0d,%0d) %h", data_valid_rec, hcount_rec, vcount_rec, pixel_rec, exp_h, exp_v, exp_p);
      end
    end else if (data_valid_rec && !rst) begin
      failures++;
      $display("unexpected output");
    end
  end

  task automatic frame(int lines, int pix);
    vsync = 1;
    repeat (3) @(posedge clk);
    #1 vsync = 0;
    repeat (3) @(posedge clk);
    for (int l = 0; l < lines; l++) begin
      #1 href = 1;
      for (int p = 0; p < pix; p++) begin
        repeat (2) @(posedge clk);
        #1 pixel_valid = 1;
        pixel = 16'(l * 1000 + p);
        @(posedge clk);
        #1 pixel_valid = 0;
        exp_h = p; exp_v = l; exp_p = 16'(l * 1000 + p);
        expect_out = 1;
        @(posedge clk);
        #1 expect_out = 0;
      end
      href = 0;
      repeat (4) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    frame(5, 12);
    frame(3, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
