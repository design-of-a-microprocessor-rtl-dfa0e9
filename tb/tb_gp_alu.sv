// tb_gp_alu: self-checking test of the accumulator ALU.
// Drives every ALU function with all 256 x 256 operand pairs for the
// two-operand functions and all 256 accumulator values for the one-operand
// ones, and compares result, carry/borrow and zero with values computed here
// in integer arithmetic.
module tb_gp_alu;
  import gp_pkg::*;

  fn_e        fn;
  logic [7:0] a, b, y;
  logic       cf, zf;
  int checks = 0, failures = 0;

  gp_alu dut (.fn(fn), .a(a), .b(b), .y(y), .cf(cf), .zf(zf));

  task automatic check(fn_e f, int ai, int bi);
    int ey, ec;
    fn = f; a = 8'(ai); b = 8'(bi);
    #1;
    ec = 0;
    case (f)
      F_ADD:  begin ey = (ai + bi) % 256; ec = (ai + bi) > 255; end
      F_AND:  ey = ai & bi;
      F_OR:   ey = ai | bi;
      F_XOR:  ey = ai ^ bi;
      F_CMP:  begin ey = (ai - bi + 256) % 256; ec = ai < bi; end
      F_LDA:  ey = bi;
      F_COM:  ey = 255 - ai;
      F_SHL:  ey = (ai * 2) % 256;
      F_SHR:  ey = ai / 2;
      F_ROTL: ey = (ai * 2) % 256 + ai / 128;
      F_ROTR: ey = ai / 2 + (ai % 2) * 128;
      default: ey = ai;
    endcase
    checks++;
    if (int'(y) != ey || int'(cf) != ec || zf != (ey == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL fn=%s a=%0d b=%0d y=%0d cf=%0b zf=%0b exp y=%0d cf=%0d",
                 f.name(), ai, bi, y, cf, zf, ey, ec);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fn_e two[6] = '{F_ADD, F_AND, F_OR, F_XOR, F_CMP, F_LDA};
    fn_e one[5] = '{F_COM, F_SHL, F_SHR, F_ROTL, F_ROTR};
    foreach (two[k])
      for (int ai = 0; ai < 256; ai++)
        for (int bi = 0; bi < 256; bi += 3)
          check(two[k], ai, bi);
    foreach (one[k])
      for (int ai = 0; ai < 256; ai++)
        check(one[k], ai, ai ^ 8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
