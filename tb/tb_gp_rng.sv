// tb_gp_rng: self-checking test of the random point generator.
// Checks the reset value, that the value holds while `step` is low, that
// each step matches the feedback x^8 + x^6 + x^5 + x^4 + 1 computed here,
// that the sequence returns to the seed after exactly 255 steps, and that
// all 255 non-zero values occur.
module tb_gp_rng;
  logic       clk = 0, rst_n = 0, step = 0;
  logic [7:0] value, expv;
  bit         seen[256];
  int checks = 0, failures = 0, period = 0;

  gp_rng #(.SEED(8'h5C)) dut (.clk(clk), .rst_n(rst_n), .step(step), .value(value));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s value=%h exp=%h", what, value, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expv = 8'h5C;
    repeat (2) @(posedge clk);
    #1 chk(value == expv, "reset value");
    rst_n = 1;
    repeat (3) @(posedge clk);
    #1 chk(value == expv, "holds without step");
    for (int n = 1; n <= 300; n++) begin
      step = 1;
      @(posedge clk);
      #1;
      expv = {expv[6:0], expv[7] ^ expv[5] ^ expv[4] ^ expv[3]};
      chk(value == expv, "step");
      seen[value] = 1;
      if (period == 0 && value == 8'h5C) period = n;
      step = ($urandom % 4) != 0;
      if (!step) begin
        @(posedge clk);
        #1 chk(value == expv, "holds between steps");
      end
    end
    chk(period == 255, "period 255");
    begin
      int cnt = 0;
      for (int v = 1; v < 256; v++) cnt += int'(seen[v]);
      chk(cnt == 255 && !seen[0], "all non-zero values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
