// tb_gp_datapath: self-checking test of the datapath under direct
// microword control.
//
// The test plays the role of the control unit: it applies one microword per
// clock and checks the registers, the address bus (always driven from MA), the write data and the
// strobes against values it computes itself. Covered: 16-bit operand
// assembly in MD from two reads, loads of Y, BASE, SP and PC from MD, the
// base-address adder, MA loads from PC, SP, Y and BASE + MD, MA increment, stack pushes of PC, SP steps, the
// interrupt vector load, random ALU operations with their flag rules,
// genetic operations with the point generator stepping, the I/O strobes and
// the Y-zero flag.
module tb_gp_datapath;
  import gp_pkg::*;

  localparam logic [15:0] VEC = 16'h1234;

  logic        clk = 0, rst_n = 0;
  uword_t      uw;
  logic [15:0] addr, pc, sp, y, base, ma, md;
  logic [7:0]  din, dout, pin_q = 8'h00, sin_q = 8'h00, ir, ac, rng;
  logic        mem_rd, mem_wr, pout_ld, sout_ld, cf, zf, yzf;
  logic [7:0]  mem [65536];
  int checks = 0, failures = 0;

  gp_datapath #(.INT_VECTOR(VEC), .RNG_SEED(8'h3B)) dut (.*);

  always #5 clk = ~clk;
  assign din = mem[addr];
  always @(posedge clk) if (mem_wr) mem[addr] <= dout;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  function automatic uword_t mk(mem_e m = M_NONE, pc_e p = PC_HOLD,
                                sp_e s = SP_HOLD, ma_e q = MA_HOLD, yb_e b = YB_NONE,
                                fn_e f = F_NONE);
    uword_t u = '0;
    u.mem = m; u.pc = p; u.sp = s; u.ma = q; u.yb = b; u.fn = f;
    return u;
  endfunction

  task automatic step(uword_t u);
    uw = u;
    @(posedge clk); #1;
    uw = mk();
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  m_ac, m_rng, v, e;
    logic        m_cf, m_zf;
    logic [15:0] e16, opa;
    for (int k = 0; k < 65536; k++) mem[k] = 8'(k * 7 + 3);
    mem[0] = 8'h12; mem[1] = 8'h34; mem[2] = 8'h10; mem[3] = 8'hC0;
    uw = mk();
    @(posedge clk); #1 rst_n = 1;
    chk(pc == 0 && sp == 0 && y == 0 && base == 0 && ac == 0 && rng == 8'h3B, "reset values");
    chk(addr == 0 && !mem_rd && !mem_wr, "idle bus");
    // IR load and 16-bit operand
    step(mk(.q(MA_LD_PC)));
    uw = mk(M_RD_IR);
    #1 chk(mem_rd && !mem_wr && addr == 16'h0000, "read strobe at MA = PC");
    step(mk(M_RD_IR));
    chk(ir == 8'h12, "IR loaded");
    step(mk(M_RD_MDH, PC_INC, .q(MA_INC)));
    step(mk(M_RD_MDL, PC_INC, .q(MA_INC)));
    chk(md == 16'h1234 && pc == 16'd2 && ma == 16'd2, $sformatf("MD assembled %h", md));
    step(mk(.b(YB_Y_LD)));
    step(mk(.b(YB_BASE_LD)));
    chk(y == 16'h1234 && base == 16'h1234, "Y and BASE from MD");
    step(mk(.q(MA_LD_Y)));
    chk(ma == 16'h1234, "MA from Y");
    step(mk(.q(MA_LD_PC)));
    chk(ma == 16'd2, "MA from PC");
    step(mk(M_RD_MDL_CLRH, PC_INC));
    chk(md == 16'h0010 && pc == 16'd3, "MD_H cleared on displacement read");
    step(mk(.q(MA_LD_BASEMD)));
    chk(ma == 16'h1244, "MA = BASE + displacement");
    step(mk(.q(MA_INC)));
    chk(ma == 16'h1245, "MA increments");
    uw = mk(M_RD_MDL);
    #1 chk(addr == 16'h1245, "address from MA");
    step(mk(M_RD_MDL));
    chk(md[7:0] == mem[16'h1245], "MD_L from memory");
    // stack: SP load, pushes, steps
    step(mk(.q(MA_LD_PC)));
    step(mk(M_RD_MDH, PC_INC, .q(MA_INC)));   // mem[3] = C0
    step(mk(M_RD_MDL, PC_INC));               // mem[4]
    e16 = {8'hC0, mem[4]};
    step(mk(.s(SP_LD_MD)));
    chk(sp == e16, "SP from MD");
    step(mk(.q(MA_LD_SP)));
    uw = mk(M_WR_PCH, PC_HOLD, SP_INC, MA_INC);
    #1 chk(mem_wr && !mem_rd && dout == pc[15:8] && addr == e16, "push PC high drives bus");
    step(mk(M_WR_PCH, PC_HOLD, SP_INC, MA_INC));
    step(mk(M_WR_PCL, PC_LD_VEC, SP_INC));
    chk(mem[e16] == 8'h00 && mem[e16 + 1] == 8'h05, "PC pushed high then low");
    chk(pc == VEC && sp == e16 + 2, "vector loaded, SP advanced");
    step(mk(.s(SP_DEC)));
    chk(sp == e16 + 1, "SP decrements");
    step(mk(.p(PC_LD_MD)));
    chk(pc == md, "PC from MD");
    // ALU and genetic operations on random data
    m_ac = ac; m_cf = cf; m_zf = zf; m_rng = rng;
    opa = ma;
    for (int n = 0; n < 400; n++) begin
      fn_e fl[15] = '{F_ADD, F_AND, F_OR, F_XOR, F_CMP, F_LDA, F_COM, F_SHL,
                      F_SHR, F_ROTL, F_ROTR, F_CC, F_XOVRML, F_MUT1, F_PIN};
      fn_e f;
      int pi;
      f = fl[$urandom % 15];
      v = 8'($urandom);
      mem[opa] = v;
      pin_q = 8'($urandom);
      step(mk(M_RD_MDL));
      step(mk(.f(f)));
      pi = int'(m_rng[2:0]);
      case (f)
        F_ADD: begin e16 = 16'(m_ac) + 16'(v); m_ac = e16[7:0]; m_cf = e16[8]; m_zf = m_ac == 0; end
        F_AND: begin m_ac &= v; m_zf = m_ac == 0; end
        F_OR:  begin m_ac |= v; m_zf = m_ac == 0; end
        F_XOR: begin m_ac ^= v; m_zf = m_ac == 0; end
        F_CMP: begin m_cf = m_ac < v; m_zf = m_ac == v; end
        F_LDA: m_ac = v;
        F_COM: m_ac = ~m_ac;
        F_SHL: m_ac = m_ac << 1;
        F_SHR: m_ac = m_ac >> 1;
        F_ROTL: m_ac = (m_ac << 1) | (m_ac >> 7);
        F_ROTR: m_ac = (m_ac >> 1) | (m_ac << 7);
        F_CC:  m_cf = 0;
        F_PIN: m_ac = pin_q;
        F_XOVRML: begin
          for (int k = 0; k < pi; k++) m_ac[k] = v[k];
          m_rng = {m_rng[6:0], m_rng[7] ^ m_rng[5] ^ m_rng[4] ^ m_rng[3]};
        end
        default: begin   // F_MUT1
          m_ac[pi] = ~m_ac[pi];
          m_rng = {m_rng[6:0], m_rng[7] ^ m_rng[5] ^ m_rng[4] ^ m_rng[3]};
        end
      endcase
      chk(ac == m_ac && cf == m_cf && zf == m_zf && rng == m_rng,
          $sformatf("%s v=%h: ac %h/%h cf %0b/%0b zf %0b/%0b rng %h/%h", f.name(), v,
                    ac, m_ac, cf, m_cf, zf, m_zf, rng, m_rng));
    end
    // store AC, I/O strobes
    uw = mk(M_WR_AC);
    #1 chk(mem_wr && dout == ac && addr == opa, "store drives AC at MA");
    step(mk(M_WR_AC));
    chk(mem[opa] == ac, "AC stored at MA");
    uw = mk(.f(F_POUT)); #1 chk(pout_ld && !sout_ld, "POUT strobe");
    uw = mk(.f(F_SOUT)); #1 chk(sout_ld && !pout_ld, "SOUT strobe");
    sin_q = 8'h9C;
    step(mk(.f(F_SIN)));
    chk(ac == 8'h9C, "AC from SIN");
    // Y zero flag
    mem[16'h1245] = 8'hFF; mem[16'h1246] = 8'hFF;
    step(mk(.q(MA_LD_BASEMD)));       // MA = BASE + MD, then reload 0x3423 via Y
    step(mk(.q(MA_LD_Y)));
    step(mk(.q(MA_INC)));
    chk(ma == 16'h1235, "MA from Y again");
    mem[16'h1235] = 8'hFF; mem[16'h1236] = 8'hFF;
    step(mk(M_RD_MDH, PC_HOLD, SP_HOLD, MA_INC));
    step(mk(M_RD_MDL));
    step(mk(.b(YB_Y_LD)));
    chk(y == 16'hFFFF && !yzf, "Y = FFFF, YZF clear");
    step(mk(.b(YB_Y_INC)));
    chk(y == 16'h0000 && yzf, "Y wraps to 0, YZF set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
