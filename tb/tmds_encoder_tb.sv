// tmds_encoder_tb: encodes random bytes and runs of constant bytes, then
// decodes every 10-bit symbol with the DVI decoding rule and checks it
// returns the byte; checks that the running disparity of the sent symbols
// stays within +-10 bits, that blanking sends the four control tokens, and
// the one-cycle latency.
module tmds_encoder_tb;
  logic clk = 0, rst = 1;
  logic [7:0] data;
  logic [1:0] ctrl;
  logic active;
  logic [9:0] tmds;
  int checks = 0, failures = 0;

  tmds_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] decode(logic [9:0] s);
    logic [7:0] d, o;
    d = s[9] ? ~s[7:0] : s[7:0];
    o[0] = d[0];
    for (int i = 1; i < 8; i++) o[i] = s[8] ? (d[i] ^ d[i-1]) : ~(d[i] ^ d[i-1]);
    return o;
  endfunction

  localparam logic [9:0] TOK [4] = '{10'b1101010100, 10'b0010101011, 10'b0101010100, 10'b1010101011};

  initial begin
    int disp;
    disp = 0;
    active = 0; data = 0; ctrl = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [7:0] d;
      logic [1:0] c;
      logic a;
      a = (n % 100) < 80;
      d = (n % 300) < 150 ? 8'($urandom) : 8'((n / 40) * 37);
      c = 2'($urandom);
      data = d; ctrl = c; active = a;
      @(posedge clk);
      #1;
      checks++;
      if (a) begin
        for (int i = 0; i < 10; i++) disp += tmds[i] ? 1 : -1;
        if (decode(tmds) != d || disp > 10 || disp < -10) begin
          failures++;
          if (failures < 10) $display("n %0d: byte %h symbol %b decoded %h disparity %0d", n, d, tmds, decode(tmds), disp);
        end
      end else begin
        disp = 0;
        if (tmds != TOK[c]) begin
          failures++;
          if (failures < 10) $display("n %0d: token %b for ctrl %0d", n, tmds, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
