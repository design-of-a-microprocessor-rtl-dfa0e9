// tb_gp_io: self-checking test of the parallel and serial I/O registers.
// Checks that PIN follows the parallel input one clock later, that SIN holds
// the last eight serial bits (newest in bit 0), that POUT takes AC only when
// loaded, and that SOUT sends a loaded byte LSB first, one bit per clock,
// with the busy flag high for exactly 8 clocks.
module tb_gp_io;
  logic       clk = 0, rst_n = 0;
  logic [7:0] par_in = 0, ac = 0;
  logic       serial_in = 0, pout_ld = 0, sout_ld = 0;
  logic [7:0] pin_q, sin_q, par_out;
  logic       serial_out, sout_busy;
  logic [7:0] hist = 0;
  int checks = 0, failures = 0;

  gp_io dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // parallel in and serial in
    for (int n = 0; n < 40; n++) begin
      par_in = 8'($urandom);
      serial_in = 1'($urandom);
      @(posedge clk);
      hist = {hist[6:0], serial_in};
      #1;
      chk(pin_q == par_in, "PIN samples input");
      if (n >= 7) chk(sin_q == hist, "SIN last eight bits");
    end
    // parallel out
    ac = 8'h3C; pout_ld = 1;
    @(posedge clk); #1 pout_ld = 0; ac = 8'hFF;
    chk(par_out == 8'h3C, "POUT loaded");
    repeat (3) @(posedge clk);
    #1 chk(par_out == 8'h3C, "POUT holds");
    // serial out
    for (int n = 0; n < 4; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      ac = v; sout_ld = 1;
      @(posedge clk); #1 sout_ld = 0; ac = ~v;
      for (int b = 0; b < 8; b++) begin
        chk(serial_out == v[b], "SOUT bit order");
        chk(sout_busy, "SOUT busy while sending");
        @(posedge clk); #1;
      end
      chk(!sout_busy, "SOUT idle after 8 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
