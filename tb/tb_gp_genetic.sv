// tb_gp_genetic: self-checking test of the genetic operator unit.
// For every pair of points i, j and random parent pairs, each operator's
// result is rebuilt here bit by bit from the instruction definitions
// (bit-wise choice of parent, segment reversal, bit flips) and compared.
module tb_gp_genetic;
  import gp_pkg::*;

  fn_e        fn;
  logic [7:0] ac, m, y;
  logic [2:0] i, j;
  int checks = 0, failures = 0;

  gp_genetic dut (.fn(fn), .ac(ac), .m(m), .i(i), .j(j), .y(y));

  function automatic logic [7:0] model(fn_e f, logic [7:0] a, logic [7:0] b,
                                       int pi, int pj);
    logic [7:0] r;
    int lo, hi;
    lo = (pi < pj) ? pi : pj;
    hi = (pi < pj) ? pj : pi;
    r = a;
    for (int k = 0; k < 8; k++) begin
      case (f)
        F_XOVRML:  r[k] = (k >= pi) ? a[k] : b[k];
        F_XOVRMLM: r[k] = (k >= pi) ? b[k] : a[k];
        F_XOVR2:   r[k] = (k >= hi || k < lo) ? a[k] : b[k];
        F_INV:     r[k] = (k >= lo && k <= hi) ? a[hi - (k - lo)] : a[k];
        default:   r[k] = a[k];
      endcase
    end
    if (f == F_MUT1) r[pi] = !a[pi];
    if (f == F_MUT2) begin
      r[pi] = !r[pi];
      r[pj] = !r[pj];
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fn_e ops[7] = '{F_XOVRML, F_XOVRMLM, F_XOVR2, F_INV, F_MUT1, F_MUT2, F_ADD};
    logic [7:0] e;
    foreach (ops[k])
      for (int pi = 0; pi < 8; pi++)
        for (int pj = 0; pj < 8; pj++)
          for (int n = 0; n < 20; n++) begin
            fn = ops[k]; i = 3'(pi); j = 3'(pj);
            ac = 8'($urandom); m = 8'($urandom);
            if (n == 0) begin ac = 8'hFF; m = 8'h00; end
            if (n == 1) begin ac = 8'h00; m = 8'hFF; end
            if (n == 2) begin ac = 8'b1000_0001; m = 8'h00; end
            #1;
            e = model(ops[k], ac, m, pi, pj);
            checks++;
            if (y !== e) begin
              failures++;
              if (failures < 10)
                $display("FAIL %s i=%0d j=%0d ac=%b m=%b y=%b exp=%b",
                         ops[k].name(), pi, pj, ac, m, y, e);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
