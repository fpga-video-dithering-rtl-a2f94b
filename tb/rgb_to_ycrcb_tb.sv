// rgb_to_ycrcb_tb: checks Y, Cr and Cb against real-valued BT.601 formulas
// (within one step, since the hardware rounds its coefficients) for corner
// colours and random colours, and checks the three-cycle latency.
module rgb_to_ycrcb_tb;
  logic clk = 0;
  logic [7:0] r, g, b, y, cr, cb;
  int checks = 0, failures = 0;
  rgb_to_ycrcb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampr(real v);
    int i;
    i = int'($floor(v));
    return i < 0 ? 0 : (i > 255 ? 255 : i);
  endfunction

  int qr[$], qg[$], qb[$];
  initial begin
    for (int n = 0; n < 600; n++) begin
      int rr, gg, bb;
      if (n < 8) begin rr = n[0] ? 255 : 0; gg = n[1] ? 255 : 0; bb = n[2] ? 255 : 0; end
      else begin rr = $urandom_range(0, 255); gg = $urandom_range(0, 255); bb = $urandom_range(0, 255); end
      r <= 8'(rr); g <= 8'(gg); b <= 8'(bb);
      qr.push_back(rr); qg.push_back(gg); qb.push_back(bb);
      @(posedge clk);
      if (qr.size() == 3) begin
        int er, eg, eb, ey, ecr, ecb;
        er = qr.pop_front(); eg = qg.pop_front(); eb = qb.pop_front();
        #1;
        ey  = clampr(0.299 * er + 0.587 * eg + 0.114 * eb);
        ecr = clampr(128.0 + 0.5 * er - 0.418688 * eg - 0.081312 * eb);
        ecb = clampr(128.0 - 0.168736 * er - 0.331264 * eg + 0.5 * eb);
        checks++;
        if ((int'(y) - ey) > 1 || (ey - int'(y)) > 1 || (int'(cr) - ecr) > 1 || (ecr - int'(cr)) > 1 ||
            (int'(cb) - ecb) > 1 || (ecb - int'(cb)) > 1) begin
          failures++;
          if (failures < 10) $display("rgb %0d %0d %0d: y %0d/%0d cr %0d/%0d cb %0d/%0d", er, eg, eb, y, ey, cr, ecr, cb, ecb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
