// tb_gp_cpu: end-to-end test of the processor against an instruction-level
// reference model.
//
// A 64 Kbyte memory with asynchronous read is modelled here. The test
// assembles a program into it: a directed part that runs every instruction,
// every addressing mode, taken and untaken branches, CALL/RET, a loop closed
// by INC/BY, a HALT woken by an interrupt, and a small genetic-algorithm
// generation (each member of an 8-member population crossed with an elite
// member and mutated); then a long random straight-line stream with short
// forward branches, subroutine calls and HALTs, while random interrupt
// pulses arrive. The parallel input and the serial input change every clock.
//
// The reference model keeps its own registers, memory copy and random point
// generator, and executes one instruction (or one interrupt entry) each time
// the processor reaches an instruction boundary; the architectural state is
// compared at every boundary, the serial output is compared bit by bit after
// every SOUT, the clock cycles of every instruction and interrupt entry are
// checked against a table, and both memories are compared at the end. Each
// mechanism (every op-code, every addressing mode, taken/untaken branches,
// interrupt while running and from HALT, carry, borrow, serial send) is
// counted, and one that never happened counts as a failure. The processor
// runs with its default parameters.
module tb_gp_cpu;
  import gp_pkg::*;

  localparam logic [15:0] VEC      = 16'h0010;  // default INT_VECTOR
  localparam logic [15:0] SUB      = 16'h0100;
  localparam logic [15:0] MAIN     = 16'h0200;
  localparam logic [15:0] STACK    = 16'hF000;
  localparam logic [15:0] POP      = 16'hFFF8;  // population, 8 members
  localparam logic [15:0] ELITE    = 16'hFFF0;
  localparam logic [15:0] PTRS     = 16'h8400;  // table of safe pointers
  localparam int          NRANDOM  = 6000;

  logic        clk = 0, rst_n = 0;
  logic [15:0] addr;
  logic [7:0]  din, dout, par_in = 0, par_out;
  logic        mem_rd, mem_wr, irq = 0, serial_in = 0, serial_out;

  gp_cpu dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ memory
  logic [7:0] mem [65536];
  assign din = mem[addr];
  always @(posedge clk) if (mem_wr) mem[addr] <= dout;

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int n_op[2][32];          // [register form][op-code]
  int n_mode[4];
  int n_taken, n_untaken, n_int_run, n_int_halt, n_carry, n_borrow, n_sout_bits;
  int n_yloop;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  logic [7:0]  img [65536];
  logic [15:0] here;
  task automatic emit(logic [7:0] b); img[here] = b; here++; endtask
  task automatic emit16(logic [15:0] v); emit(v[15:8]); emit(v[7:0]); endtask
  function automatic logic [7:0] mi(logic [4:0] op, logic [1:0] mode);
    return {1'b0, op, mode};
  endfunction
  task automatic m_imm8(logic [4:0] op, logic [7:0] v); emit(mi(op, 2'b00)); emit(v); endtask
  task automatic m_imm16(logic [4:0] op, logic [15:0] v); emit(mi(op, 2'b00)); emit16(v); endtask
  task automatic m_dir(logic [4:0] op, logic [15:0] a); emit(mi(op, 2'b01)); emit16(a); endtask
  task automatic m_ind(logic [4:0] op); emit(mi(op, 2'b10)); endtask
  task automatic m_bas(logic [4:0] op, logic [7:0] d); emit(mi(op, 2'b11)); emit(d); endtask
  task automatic r_op(logic [4:0] op); emit({1'b1, op, 2'b00}); endtask
  task automatic jump(logic [4:0] op, logic [15:0] t); emit(mi(op, 2'b00)); emit16(t); endtask

  // ------------------------------------------------------------ reference model
  logic [15:0] m_pc, m_sp, m_y, m_base;
  logic [7:0]  m_ac, m_rng, m_pout;
  logic        m_cf, m_zf;
  logic [7:0]  rmem [65536];
  logic [7:0]  pin_sample, sin_sample;
  logic [7:0]  sout_val;
  bit          sout_event;

  function automatic logic [7:0] f8();
    logic [7:0] b = rmem[m_pc];
    m_pc++;
    return b;
  endfunction
  function automatic logic [15:0] f16();
    logic [15:0] v;
    v[15:8] = f8();
    v[7:0]  = f8();
    return v;
  endfunction
  function automatic logic [15:0] ea(logic [1:0] mode);
    case (mode)
      2'b01:   return f16();
      2'b10:   return m_y;
      default: return m_base + {8'h00, f8()};
    endcase
  endfunction

  function automatic logic [7:0] genetic(logic [4:0] kind, logic [7:0] a, logic [7:0] b);
    // kind: 0 XOVRML, 1 XOVRMLM, 2 XOVR2, 3 INV, 4 MUT1, 5 MUT2
    int pi, pj, lo, hi;
    logic [7:0] r;
    pi = int'(m_rng[2:0]); pj = int'(m_rng[5:3]);
    lo = (pi < pj) ? pi : pj; hi = (pi < pj) ? pj : pi;
    r = a;
    for (int k = 0; k < 8; k++)
      case (kind)
        0: r[k] = (k >= pi) ? a[k] : b[k];
        1: r[k] = (k >= pi) ? b[k] : a[k];
        2: r[k] = (k >= hi || k < lo) ? a[k] : b[k];
        3: r[k] = (k >= lo && k <= hi) ? a[lo + hi - k] : a[k];
        default: ;
      endcase
    if (kind == 4) r[pi] = ~r[pi];
    if (kind == 5) begin r[pi] = ~r[pi]; r[pj] = ~r[pj]; end
    m_rng = {m_rng[6:0], m_rng[7] ^ m_rng[5] ^ m_rng[4] ^ m_rng[3]};
    return r;
  endfunction

  // clock cycles per instruction, fetch included: 2 fetch + 1 decode +
  // operand routine + execute; for the modes immediate/direct/indirect/based
  int exp_cyc;
  function automatic int cycles_of(logic [4:0] op, logic [1:0] mode, bit taken);
    int c8[4]  = '{5, 8, 6, 7};
    int c16[4] = '{6, 9, 7, 8};
    int cst[4] = '{4, 7, 5, 6};
    case (op)
      5'd5, 5'd6, 5'd15:      return c16[mode];
      5'd7:                   return cst[mode];
      5'd8:                   return 6;
      5'd9, 5'd10, 5'd11:     return taken ? 7 : 6;
      5'd12, 5'd13:           return 8;
      5'd0, 5'd1, 5'd2, 5'd3, 5'd4, 5'd14, 5'd16, 5'd17, 5'd18: return c8[mode];
      default:                return 4;
    endcase
  endfunction

  task automatic model_interrupt();
    exp_cyc = 3;
    rmem[m_sp] = m_pc[15:8]; rmem[m_sp + 16'd1] = m_pc[7:0];
    m_sp += 16'd2;
    m_pc = VEC;
  endtask

  task automatic model_step();
    logic [7:0]  ir, v;
    logic [4:0]  op;
    logic [1:0]  mode;
    logic [15:0] a, t;
    logic [8:0]  s;
    ir = f8();
    op = ir[6:2]; mode = ir[1:0];
    exp_cyc = ir[7] ? ((op == 5'd11) ? 0 : 4) : cycles_of(op, mode, 1'b0);
    if (ir[7]) begin
      n_op[1][op]++;
      case (op)
        5'd0:  m_y++;
        5'd1:  m_ac = ~m_ac;
        5'd2:  m_ac = m_ac << 1;
        5'd3:  m_ac = m_ac >> 1;
        5'd4:  m_ac = {m_ac[6:0], m_ac[7]};
        5'd5:  m_ac = {m_ac[0], m_ac[7:1]};
        5'd6:  m_ac = pin_sample;
        5'd7:  m_ac = sin_sample;
        5'd8:  m_pout = m_ac;
        5'd9:  begin sout_val = m_ac; sout_event = 1; end
        5'd10: m_cf = 0;
        5'd11: ;                           // HALT: PC already past it
        5'd12: m_ac = genetic(3, m_ac, 0);
        5'd13: m_ac = genetic(4, m_ac, 0);
        5'd14: m_ac = genetic(5, m_ac, 0);
        default: ;
      endcase
      return;
    end
    n_op[0][op]++;
    case (op)
      5'd0, 5'd1, 5'd2, 5'd3, 5'd4, 5'd14, 5'd16, 5'd17, 5'd18: begin
        n_mode[mode]++;
        if (mode == 2'b00) v = f8();
        else v = rmem[ea(mode)];
        case (op)
          5'd0: begin s = {1'b0, m_ac} + {1'b0, v}; m_ac = s[7:0]; m_cf = s[8];
                      m_zf = (s[7:0] == 0); if (s[8]) n_carry++; end
          5'd1: begin m_ac &= v; m_zf = (m_ac == 0); end
          5'd2: begin m_ac |= v; m_zf = (m_ac == 0); end
          5'd3: begin m_cf = m_ac < v; m_zf = m_ac == v; if (m_cf) n_borrow++; end
          5'd4: m_ac = v;
          5'd14: begin m_ac ^= v; m_zf = (m_ac == 0); end
          5'd16: m_ac = genetic(0, m_ac, v);
          5'd17: m_ac = genetic(1, m_ac, v);
          default: m_ac = genetic(2, m_ac, v);
        endcase
      end
      5'd5, 5'd6, 5'd15: begin
        n_mode[mode]++;
        if (mode == 2'b00) t = f16();
        else begin
          a = ea(mode);
          t = {rmem[a], rmem[a + 16'd1]};
        end
        if (op == 5'd5) m_sp = t; else if (op == 5'd6) m_y = t; else m_base = t;
      end
      5'd7: begin
        n_mode[mode]++;
        if (mode == 2'b00) begin rmem[m_pc] = m_ac; m_pc++; end
        else rmem[ea(mode)] = m_ac;
      end
      5'd8, 5'd9, 5'd10, 5'd11: begin
        bit c;
        c = (op == 5'd8) || (op == 5'd9 && m_cf) || (op == 5'd10 && m_zf) ||
            (op == 5'd11 && m_y == 0);
        t = f16();
        if (op != 5'd8) begin if (c) n_taken++; else n_untaken++; end
        if (op == 5'd11 && c) n_yloop++;
        exp_cyc = cycles_of(op, mode, c);
        if (c) m_pc = t;
      end
      5'd12: begin
        t = f16();
        rmem[m_sp] = m_pc[15:8]; rmem[m_sp + 16'd1] = m_pc[7:0];
        m_sp += 16'd2;
        m_pc = t;
      end
      5'd13: begin
        m_sp -= 16'd2;
        m_pc = {rmem[m_sp], rmem[m_sp + 16'd1]};
      end
      default: ;
    endcase
  endtask

  task automatic compare_state(string where);
    chk(dut.u_dp.pc   == m_pc,   $sformatf("%s PC %h exp %h", where, dut.u_dp.pc, m_pc));
    chk(dut.u_dp.ac   == m_ac,   $sformatf("%s AC %h exp %h (pc %h)", where, dut.u_dp.ac, m_ac, m_pc));
    chk(dut.u_dp.cf   == m_cf,   $sformatf("%s CF (pc %h)", where, m_pc));
    chk(dut.u_dp.zf   == m_zf,   $sformatf("%s ZF (pc %h)", where, m_pc));
    chk(dut.u_dp.sp   == m_sp,   $sformatf("%s SP %h exp %h", where, dut.u_dp.sp, m_sp));
    chk(dut.u_dp.y    == m_y,    $sformatf("%s Y %h exp %h", where, dut.u_dp.y, m_y));
    chk(dut.u_dp.base == m_base, $sformatf("%s BASE (pc %h)", where, m_pc));
    chk(dut.u_dp.rng  == m_rng,  $sformatf("%s RNG (pc %h)", where, m_pc));
    chk(par_out       == m_pout, $sformatf("%s POUT (pc %h)", where, m_pc));
  endtask

  // ------------------------------------------------------------ program
  logic [15:0] end_addr;

  task automatic build_program();
    logic [15:0] loop, skip;
    for (int k = 0; k < 65536; k++) img[k] = 8'h00;
    // data: random bytes, pointer table, population
    for (int k = 16'h8000; k < 16'h8400; k++) img[k] = 8'($urandom);
    for (int k = 0; k < 128; k++) begin
      logic [15:0] p = 16'h8000 + 16'($urandom % 16'h0100);
      img[PTRS + 16'(2 * k)] = p[15:8]; img[PTRS + 16'(2 * k + 1)] = p[7:0];
    end
    img[16'h8500] = STACK[15:8]; img[16'h8501] = STACK[7:0];
    for (int k = 0; k < 8; k++) img[POP + 16'(k)] = 8'($urandom);
    img[ELITE] = 8'hF0;

    here = 16'h0000; jump(OP_BR, MAIN);
    // interrupt service routine: save AC, count interrupts, restore AC
    here = VEC;
    m_dir(OP_ST, 16'h9000);
    m_dir(OP_LDA, 16'h9001);
    m_imm8(OP_ADD, 8'h01);
    m_dir(OP_ST, 16'h9001);
    m_dir(OP_LDA, 16'h9000);
    jump(OP_RET, 16'h0000);
    // subroutine
    here = SUB;
    m_imm8(OP_XOR, 8'h55);
    r_op(RO_ROTL);
    emit(mi(OP_RET, 2'b00));

    here = MAIN;
    m_dir(OP_LDSP, 16'h8500);              // SP from memory: direct 16-bit load
    m_imm16(OP_LDB, 16'h8000);
    m_imm16(OP_LDY, 16'h8020);
    // every 8-bit operation in every mode
    foreach (n_mode[md]) begin
      logic [4:0] ops[9] = '{OP_ADD, OP_AND, OP_OR, OP_CMP, OP_LDA, OP_XOR,
                             OP_XOVRML, OP_XOVRMLM, OP_XOVR2};
      foreach (ops[k]) begin
        case (md)
          0: m_imm8(ops[k], 8'($urandom));
          1: m_dir(ops[k], 16'h8000 + 16'($urandom % 256));
          2: m_ind(ops[k]);
          default: m_bas(ops[k], 8'($urandom));
        endcase
      end
      m_imm8(OP_LDA, 8'hF0); m_imm8(OP_ADD, 8'h20);   // carry
      m_imm8(OP_CMP, 8'h40);                          // borrow
      m_dir(OP_ST, 16'h8100 + 16'(md));
      m_ind(OP_ST);
      m_bas(OP_ST, 8'(md + 8'h30));
      m_imm8(OP_ST, 8'h00);
    end
    // 16-bit loads in every mode through the pointer table
    m_imm16(OP_LDY, PTRS);
    m_ind(OP_LDB);                          // BASE <- [PTRS]
    m_imm16(OP_LDB, PTRS);
    m_bas(OP_LDY, 8'h04);                   // Y <- [PTRS+4]
    m_dir(OP_LDB, PTRS + 16'h0008);
    m_ind(OP_LDSP); m_dir(OP_LDSP, 16'h8500);
    m_bas(OP_LDSP, 8'h00); m_imm16(OP_LDSP, STACK);
    // register and I/O instructions
    r_op(RO_PIN); r_op(RO_COM); r_op(RO_SHL); r_op(RO_SHR); r_op(RO_ROTL);
    r_op(RO_ROTR); r_op(RO_POUT); r_op(RO_SIN); r_op(RO_SOUT);
    repeat (3) r_op(RO_COM);
    r_op(RO_CC); r_op(RO_INV); r_op(RO_MUT1); r_op(RO_MUT2); r_op(RO_INC);
    // taken and untaken conditional branches
    m_imm8(OP_LDA, 8'h80); m_imm8(OP_ADD, 8'h80);  // CF = 1, ZF = 1
    skip = here + 16'd6; jump(OP_BC, skip); r_op(RO_COM); r_op(RO_COM); r_op(RO_COM);
    skip = here + 16'd4; jump(OP_BZ, skip); r_op(RO_COM);
    r_op(RO_CC); m_imm8(OP_OR, 8'h01);             // CF = 0, ZF = 0
    skip = here + 16'd4; jump(OP_BC, skip); r_op(RO_COM);
    skip = here + 16'd4; jump(OP_BZ, skip); r_op(RO_COM);
    // a loop counted by Y
    m_imm16(OP_LDY, 16'hFFFA);
    loop = here;
    m_imm8(OP_ADD, 8'h03);
    r_op(RO_INC);
    skip = here + 16'd6;
    jump(OP_BY, skip);
    jump(OP_BR, loop);
    // subroutine call, then a HALT woken by an interrupt
    jump(OP_CALL, SUB);
    r_op(RO_HALT);
    // one genetic-algorithm generation over the population at POP
    m_imm16(OP_LDY, POP);
    loop = here;
    m_ind(OP_LDA);
    m_dir(OP_XOVRML, ELITE);
    r_op(RO_MUT1);
    m_ind(OP_ST);
    r_op(RO_INC);
    skip = here + 16'd6;
    jump(OP_BY, skip);
    jump(OP_BR, loop);
    // random stream
    m_imm16(OP_LDY, 16'h8040);
    m_imm16(OP_LDB, 16'h8080);
    for (int n = 0; n < NRANDOM; n++) begin
      int c = $urandom % 20;
      logic [4:0] ops[9] = '{OP_ADD, OP_AND, OP_OR, OP_CMP, OP_LDA, OP_XOR,
                             OP_XOVRML, OP_XOVRMLM, OP_XOVR2};
      logic [4:0] rops[13] = '{RO_INC, RO_COM, RO_SHL, RO_SHR, RO_ROTL, RO_ROTR,
                               RO_PIN, RO_SIN, RO_POUT, RO_SOUT, RO_CC, RO_INV,
                               RO_MUT1};
      if (c < 8) begin
        logic [4:0] op = ops[$urandom % 9];
        case ($urandom % 4)
          0: m_imm8(op, 8'($urandom));
          1: m_dir(op, 16'h8000 + 16'($urandom % 1024));
          2: m_ind(op);
          default: m_bas(op, 8'($urandom));
        endcase
      end else if (c < 13) begin
        r_op((c == 12) ? RO_MUT2 : rops[$urandom % 13]);
      end else if (c < 15) begin
        case ($urandom % 4)
          0: m_imm8(OP_ST, 8'h00);
          1: m_dir(OP_ST, 16'h8000 + 16'($urandom % 1024));
          2: m_ind(OP_ST);
          default: m_bas(OP_ST, 8'($urandom));
        endcase
      end else if (c < 17) begin
        logic [4:0] bop = (c == 15) ? OP_BC : ((($urandom % 2) == 0) ? OP_BZ : OP_BY);
        skip = here + 16'd4; jump(bop, skip); r_op(RO_COM);
      end else if (c == 17) begin
        if (($urandom % 2) == 0) m_imm16(OP_LDY, 16'h8000 + 16'($urandom % 256));
        else m_dir(OP_LDB, PTRS + 16'(2 * ($urandom % 128)));
      end else if (c == 18) begin
        jump(OP_CALL, SUB);
      end else begin
        if (($urandom % 8) == 0) r_op(RO_HALT); else m_imm8(OP_CMP, 8'($urandom));
      end
    end
    end_addr = here;
    r_op(RO_HALT);
  endtask

  // ------------------------------------------------------------ stimulus
  logic [7:0] pin_model = 0, sin_model = 0;
  always @(posedge clk) begin
    pin_model <= par_in;
    sin_model <= {sin_model[6:0], serial_in};
  end
  always @(negedge clk) begin
    par_in    <= 8'($urandom);
    serial_in <= 1'($urandom);
    if (dut.u_ctrl.upc == U_R_BASE + 8'(RO_PIN)) pin_sample = pin_model;
    if (dut.u_ctrl.upc == U_R_BASE + 8'(RO_SIN)) sin_sample = sin_model;
  end

  // serial output checker: after a SOUT, bit k is on the line k clocks after
  // the instruction boundary, until the next SOUT reloads the register
  int sout_k = 8;
  logic [7:0] sout_cur;

  // ------------------------------------------------------------ main
  bit started = 0, finished = 0, in_halt_irq = 0, first_fetch = 1;
  int halt_cycles = 0, cycle = 0, next_irq = 400, last_b = 0, n_timed = 0;
  typedef enum {EV_INSN, EV_INT} ev_e;
  ev_e pending_ev;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_program();
    for (int k = 0; k < 65536; k++) begin mem[k] = img[k]; rmem[k] = img[k]; end
    m_pc = 0; m_sp = 0; m_y = 0; m_base = 0; m_ac = 0; m_cf = 0; m_zf = 0;
    m_rng = 8'hA5; m_pout = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    started = 1;
  end

  always @(negedge clk) if (started && !finished) begin
    logic [7:0] u;
    cycle++;
    u = dut.u_ctrl.upc;
    if (u == U_FETCH || u == U_INT) begin
      // the previous event is complete: run it in the model, then compare
      if (!first_fetch) begin
        sout_event = 0;
        if (pending_ev == EV_INT) model_interrupt(); else model_step();
        compare_state("boundary");
        if (exp_cyc > 0) begin       // 0: HALT, whose length is the wait
          chk(cycle - last_b == exp_cyc,
              $sformatf("instruction took %0d cycles, expected %0d", cycle - last_b, exp_cyc));
          n_timed++;
        end
        if (sout_event) begin
          sout_cur = sout_val; sout_k = 0;
          chk(serial_out == sout_cur[0], "serial bit 0");
          n_sout_bits++; sout_k = 1;
        end
      end
      first_fetch = 0;
      last_b = cycle;
      if (u == U_INT) begin
        if (in_halt_irq) n_int_halt++; else n_int_run++;
        in_halt_irq = 0;
      end
      pending_ev = (u == U_INT) ? EV_INT : EV_INSN;
    end
    // serial output bits (bit 0 was checked at the boundary itself)
    if (sout_k < 8 && !(sout_event && (u == U_FETCH || u == U_INT) && sout_k == 1)) begin
      chk(serial_out == sout_cur[sout_k], $sformatf("serial bit %0d", sout_k));
      n_sout_bits++;
      sout_k++;
    end
    // interrupts: wake a HALT; random pulses while running past the set-up
    irq <= 0;
    if (u == U_HALT || u == U_HALT + 8'd1) begin
      halt_cycles++;
      if (dut.u_dp.pc == end_addr + 16'd1) begin
        if (halt_cycles > 20) begin
          finished = 1;
          model_step();                     // the final HALT
          compare_state("end");
          for (int k = 0; k < 65536; k++)
            if (mem[k] != rmem[k]) chk(0, $sformatf("memory %h = %h exp %h", k, mem[k], rmem[k]));
          chk(1, "memory compared");
          report();
        end
      end else if (halt_cycles == 5) begin
        irq <= 1; in_halt_irq = 1;
      end
    end else begin
      halt_cycles = 0;
      if (cycle >= next_irq && m_sp == STACK && dut.u_dp.pc >= MAIN) begin
        irq <= 1;
        next_irq = cycle + 150 + int'($urandom % 400);
      end
    end
  end

  task automatic report();
    string names[2] = '{"memory-reference", "register"};
    int nops[2] = '{19, 15};
    for (int f = 0; f < 2; f++)
      for (int op = 0; op < nops[f]; op++)
        chk(n_op[f][op] > 0, $sformatf("%s op-code %0d never executed", names[f], op));
    foreach (n_mode[md]) chk(n_mode[md] > 0, $sformatf("mode %0d never used", md));
    chk(n_taken > 0,    "no conditional branch taken");
    chk(n_untaken > 0,  "no conditional branch untaken");
    chk(n_yloop > 0,    "no loop ended by BY");
    chk(n_int_run > 0,  "no interrupt while running");
    chk(n_int_halt > 0, "no interrupt waking HALT");
    chk(n_carry > 0,    "no ADD carry");
    chk(n_borrow > 0,   "no CMP borrow");
    chk(n_sout_bits > 0, "no serial bits sent");
    chk(n_timed > 0,    "no instruction timed");
    $display("instructions: %0d register-form, mem ops %p", n_op[1].sum(), n_op[0]);
    $display("modes %p taken %0d untaken %0d BY-exits %0d int(run) %0d int(halt) %0d carry %0d borrow %0d serial bits %0d cycles %0d timed %0d",
             n_mode, n_taken, n_untaken, n_yloop, n_int_run, n_int_halt, n_carry,
             n_borrow, n_sout_bits, cycle, n_timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
