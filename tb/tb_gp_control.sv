// tb_gp_control: self-checking test of the microsequencer.
//
// Drives the instruction register, flags and interrupt input and checks the
// micro-PC cycle by cycle against sequences written out here from the
// sequencing rules: reset to FETCH, FETCH (two words) -> DECODE -> routine for the
// op-code and mode, conditional micro-branches on CF/ZF/YZF, the execute
// mapping after an operand routine, return to FETCH at the end of an
// instruction, and interrupts: a rising edge of `irq` is taken at the next
// instruction end (or from HALT), acknowledged once, and a level held high
// does not retrigger.
module tb_gp_control;
  import gp_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [7:0] ir = 0, upc;
  logic       cf = 0, zf = 0, yzf = 0, irq = 0, irq_pending, int_ack;
  uword_t     uw;
  int checks = 0, failures = 0, acks = 0;

  gp_control dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (int_ack) acks++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s (upc=%0d)", $time, what, upc);
    end
  endtask

  // run one instruction whose micro-PC sequence after FETCH is `seq`
  task automatic expect_seq(logic [7:0] instr, logic [7:0] seq[$], string name);
    chk(upc == U_FETCH, {name, ": starts at FETCH"});
    ir = instr;               // loaded by FETCH in the real datapath
    @(posedge clk); #1;
    foreach (seq[k]) begin
      chk(upc == seq[k], $sformatf("%s: step %0d expected %0d", name, k, seq[k]));
      @(posedge clk); #1;
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
    @(posedge clk); #1;
    chk(upc == U_FETCH, "reset to FETCH");
    rst_n = 1;
    // ADD immediate: FETCH, DECODE, operand, execute
    expect_seq({1'b0, 5'(OP_ADD), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_D8_IMM, U_X_BASE + 8'(OP_ADD)}, "ADD #");
    // LDA direct
    expect_seq({1'b0, 5'(OP_LDA), 2'b01},
               '{U_FETCH + 8'd1, U_DECODE, U_D8_DIR, U_D8_DIR + 8'd1, U_D8_DIR + 8'd2, U_R8, U_X_BASE + 8'(OP_LDA)}, "LDA dir");
    // XOVR2 based
    expect_seq({1'b0, 5'(OP_XOVR2), 2'b11},
               '{U_FETCH + 8'd1, U_DECODE, U_D8_BAS, U_D8_BAS + 8'd1, U_R8, U_X_BASE + 8'(OP_XOVR2)}, "XOVR2 bas");
    // LDY indirect
    expect_seq({1'b0, 5'(OP_LDY), 2'b10},
               '{U_FETCH + 8'd1, U_DECODE, U_D16_IND, U_R16, U_R16 + 8'd1, U_X_BASE + 8'(OP_LDY)}, "LDY ind");
    // BC not taken, then taken
    cf = 0;
    expect_seq({1'b0, 5'(OP_BC), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_BC, U_BC + 8'd1, U_BC + 8'd2}, "BC untaken");
    cf = 1;
    expect_seq({1'b0, 5'(OP_BC), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_BC, U_BR, U_BR + 8'd1, U_BR + 8'd2}, "BC taken");
    zf = 1;
    expect_seq({1'b0, 5'(OP_BZ), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_BZ, U_BR, U_BR + 8'd1, U_BR + 8'd2}, "BZ taken");
    yzf = 0;
    expect_seq({1'b0, 5'(OP_BY), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_BY, U_BY + 8'd1, U_BY + 8'd2}, "BY untaken");
    // register instruction
    expect_seq({1'b1, 5'(RO_MUT2), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_R_BASE + 8'(RO_MUT2)}, "MUT2");
    // interrupt raised during an instruction: taken at its end
    ir = {1'b0, 5'(OP_CALL), 2'b00};
    @(posedge clk); #1;                    // second FETCH word
    @(posedge clk); #1;                    // DECODE
    irq = 1;
    @(posedge clk); #1;                    // U_CALL; edge seen
    chk(irq_pending, "edge latched");
    repeat (5) @(posedge clk);
    #1;
    chk(upc == U_INT, "interrupt entry after CALL ends");
    chk(acks == 1, "one acknowledge");
    chk(!irq_pending, "pending cleared");
    @(posedge clk); #1;
    chk(upc == U_INT + 8'd1, "entry second word");
    @(posedge clk); #1;
    chk(upc == U_INT + 8'd2, "entry third word");
    @(posedge clk); #1;
    chk(upc == U_FETCH, "back to FETCH after entry (level held does not retrigger)");
    // HALT waits, interrupt wakes it
    irq = 0;
    expect_seq({1'b1, 5'(RO_HALT), 2'b00}, '{U_FETCH + 8'd1, U_DECODE, U_R_BASE + 8'(RO_HALT), U_HALT, U_HALT + 8'd1, U_HALT}, "HALT");
    repeat (10) begin
      chk(upc == U_HALT || upc == U_HALT + 8'd1, "stays halted");
      @(posedge clk); #1;
    end
    irq = 1;
    repeat (4) @(posedge clk);
    #1;
    chk(upc inside {U_INT, U_INT + 8'd1, U_INT + 8'd2, U_FETCH}, "HALT left for interrupt entry");
    chk(acks == 2, "second acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
