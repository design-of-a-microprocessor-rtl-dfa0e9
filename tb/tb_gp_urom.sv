// tb_gp_urom: self-checking test of the microprogram and mapping tables.
//
// For every one of the 256 instruction bytes, and under six settings of the
// branch conditions (none, all, and each of CF, ZF, YZF and interrupt alone),
// this test walks the microprogram from FETCH the way the sequencer does
// and adds up what the microwords do: memory reads and writes, PC
// increments and loads, SP steps, Y/BASE/SP loads and the accumulator
// function used. The totals are compared with what the instruction needs by
// its definition: its length in bytes, its operand reads, its stores and
// stack pushes, and its register effect. The interrupt entry routine is
// checked the same way.
module tb_gp_urom;
  import gp_pkg::*;

  logic [7:0] upc, ir, disp_addr, exec_addr;
  uword_t     uw;
  int checks = 0, failures = 0;

  gp_urom dut (.upc(upc), .ir(ir), .uw(uw), .disp_addr(disp_addr), .exec_addr(exec_addr));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  typedef struct {
    int reads, writes, pc_inc, pc_ld, pc_vec, sp_inc, sp_dec, sp_ld, y_inc, y_ld, b_ld;
    int steps;
    fn_e fn;
    bit ended, irq_entry;
  } tally_t;

  // cond = {IRQ, YZF, ZF, CF}
  task automatic walk(logic [7:0] instr, logic [3:0] cond, output tally_t t);
    t = '{default: 0, fn: F_NONE};
    ir = instr; upc = U_FETCH;
    for (int s = 0; s < 24; s++) begin
      #1;
      t.steps++;
      if (uw.mem inside {M_RD_IR, M_RD_MDL, M_RD_MDH, M_RD_MDL_CLRH}) t.reads++;
      if (uw.mem inside {M_WR_AC, M_WR_PCH, M_WR_PCL}) t.writes++;
      case (uw.pc) PC_INC: t.pc_inc++; PC_LD_MD: t.pc_ld++; PC_LD_VEC: t.pc_vec++; default: ; endcase
      case (uw.sp) SP_INC: t.sp_inc++; SP_DEC: t.sp_dec++; SP_LD_MD: t.sp_ld++; default: ; endcase
      case (uw.yb) YB_Y_INC: t.y_inc++; YB_Y_LD: t.y_ld++; YB_BASE_LD: t.b_ld++; default: ; endcase
      if (uw.fn != F_NONE) t.fn = uw.fn;
      case (uw.nx)
        NX_SEQ:   upc = upc + 1;
        NX_JMP:   upc = uw.addr;
        NX_JCOND: upc = cond[uw.cond] ? uw.addr : upc + 1;
        NX_DISP:  upc = disp_addr;
        NX_EXEC:  upc = exec_addr;
        default:  begin t.ended = 1; return; end
      endcase
      if (upc == U_INT) t.irq_entry = 1;
    end
  endtask

  function automatic fn_e fn_of_mem(int op);
    case (op)
      0: return F_ADD;  1: return F_AND;  2: return F_OR;  3: return F_CMP;
      4: return F_LDA;  14: return F_XOR; 16: return F_XOVRML;
      17: return F_XOVRMLM; 18: return F_XOVR2;
      default: return F_NONE;
    endcase
  endfunction

  function automatic fn_e fn_of_reg(int op);
    fn_e tbl[15] = '{F_NONE, F_COM, F_SHL, F_SHR, F_ROTL, F_ROTR, F_PIN, F_SIN,
                     F_POUT, F_SOUT, F_CC, F_NONE, F_INV, F_MUT1, F_MUT2};
    return (op < 15) ? tbl[op] : F_NONE;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tally_t t;
    logic [3:0] cv[6] = '{4'b0000, 4'b1111, 4'b0001, 4'b0010, 4'b0100, 4'b1000};
    for (int b = 0; b < 256; b++) begin
      for (int ci = 0; ci < 6; ci++) begin
        logic [3:0] c;
        int op, mode, len, rd;
        string tag;
        c = cv[ci];
        op = (b >> 2) & 31; mode = b & 3;
        tag = $sformatf("ir=%02h cond=%b", b, c);
        walk(8'(b), c, t);
        if (b >= 128) begin
          if (op == 11) begin
            // HALT: waits for an interrupt
            chk(c[3] ? (t.irq_entry && t.reads == 1) : !t.ended, {tag, " HALT"});
            continue;
          end
          chk(t.ended && t.reads == 1 && t.writes == 0 && t.pc_inc == 1, {tag, " register form"});
          chk(t.fn == fn_of_reg(op), {tag, " function"});
          chk(t.y_inc == ((op == 0) ? 1 : 0), {tag, " INC Y"});
          continue;
        end
        chk(t.ended, {tag, " ends"});
        case (op)
          0, 1, 2, 3, 4, 14, 16, 17, 18: begin
            len = (mode == 0) ? 2 : (mode == 1) ? 3 : (mode == 2) ? 1 : 2;
            rd  = (mode == 0) ? 2 : len + 1;
            chk(t.pc_inc == len && t.reads == rd && t.writes == 0, {tag, " 8-bit operand"});
            chk(t.fn == fn_of_mem(op), {tag, " function"});
          end
          5, 6, 15: begin
            len = (mode == 0) ? 3 : (mode == 1) ? 3 : (mode == 2) ? 1 : 2;
            rd  = (mode == 0) ? 3 : len + 2;
            chk(t.pc_inc == len && t.reads == rd && t.writes == 0, {tag, " 16-bit operand"});
            chk(t.sp_ld == (op == 5) && t.y_ld == (op == 6) && t.b_ld == (op == 15), {tag, " destination"});
          end
          7: begin
            len = (mode == 0) ? 2 : (mode == 1) ? 3 : (mode == 2) ? 1 : 2;
            rd  = (mode == 0) ? 1 : len;
            chk(t.pc_inc == len && t.reads == rd && t.writes == 1, {tag, " store"});
          end
          8, 9, 10, 11: begin
            bit taken;
            taken = (op == 8) || (op == 9 && c[0]) || (op == 10 && c[1]) || (op == 11 && c[2]);
            chk(t.pc_inc == 3 && t.pc_ld == int'(taken) && t.reads == (taken ? 3 : 1), {tag, " branch"});
          end
          12: chk(t.pc_inc == 3 && t.pc_ld == 1 && t.reads == 3 && t.writes == 2 && t.sp_inc == 2, {tag, " CALL"});
          13: chk(t.pc_inc == 1 && t.pc_ld == 1 && t.reads == 3 && t.sp_dec == 2, {tag, " RET"});
          default: chk(t.pc_inc == 1 && t.reads == 1 && t.writes == 0 && t.fn == F_NONE, {tag, " unused op-code"});
        endcase
      end
    end
    // interrupt entry routine: MA <- SP, push PC high, push PC low + vector
    begin
      int writes = 0, ma_sp = 0;
      ir = 8'h00; upc = U_INT;
      for (int s = 0; s < 3; s++) begin
        #1;
        if (uw.mem == M_WR_PCH) chk(s == 1 && uw.sp == SP_INC, "INT pushes PC high second");
        if (uw.mem == M_WR_PCL) chk(s == 2 && uw.pc == PC_LD_VEC && uw.nx == NX_END, "INT pushes PC low, loads vector");
        if (uw.mem inside {M_WR_PCH, M_WR_PCL}) writes++;
        if (uw.ma == MA_LD_SP) ma_sp++;
        upc = upc + 1;
      end
      chk(writes == 2 && ma_sp == 1, "INT: two pushes at SP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
