// gp_genetic: genetic operators on the 8-bit accumulator.
//
// Implements the six genetic instructions on a chromosome held in AC, with
// `m` the second parent (the memory operand) and two points i and j in 0..7:
//   XOVRML  : AC(7..i) & M(i-1..0)             one-point crossover
//   XOVRMLM : M(7..i)  & AC(i-1..0)            one-point crossover, other child
//   XOVR2   : AC(7..j) & M(j-1..i) & AC(i-1..0) two-point crossover
//   INV     : AC(j..i) <- AC(i..j)             the segment i..j reversed
//   MUT1    : AC(i) inverted
//   MUT2    : AC(i) inverted, then AC(j) inverted
// For XOVR2 and INV the two points are put in order first (lo = min, hi =
// max), so that the segment is always well formed; a crossover point of 0
// takes nothing from the lower part. MUT2 applies the two flips one after
// the other as the table reads, so i == j leaves AC unchanged. Ordering the
// points is this design's choice. Purely combinational; for any other
// function `y` is `ac`.
module gp_genetic
  import gp_pkg::*;
(
  input  fn_e        fn,
  input  logic [7:0] ac,
  input  logic [7:0] m,
  input  logic [2:0] i,
  input  logic [2:0] j,
  output logic [7:0] y
);

  logic [2:0] lo, hi;
  logic [7:0] mask_i;    // bits i-1..0
  logic [7:0] mask_seg;  // bits hi-1..lo
  logic [7:0] rev;

  always_comb begin
    lo       = (i < j) ? i : j;
    hi       = (i < j) ? j : i;
    mask_i   = (8'h01 << i) - 8'h01;
    mask_seg = ((8'h01 << hi) - 8'h01) & ~((8'h01 << lo) - 8'h01);
    // reverse the segment lo..hi: bit k takes bit lo+hi-k
    rev = ac;
    for (int k = 0; k < 8; k++) begin
      if (k >= int'(lo) && k <= int'(hi))
        rev[k] = ac[int'(lo) + int'(hi) - k];
    end
    unique case (fn)
      F_XOVRML:  y = (ac & ~mask_i) | (m & mask_i);
      F_XOVRMLM: y = (m & ~mask_i) | (ac & mask_i);
      F_XOVR2:   y = (ac & ~mask_seg) | (m & mask_seg);
      F_INV:     y = rev;
      F_MUT1:    y = ac ^ (8'h01 << i);
      F_MUT2:    y = ac ^ (8'h01 << i) ^ (8'h01 << j);
      default:   y = ac;
    endcase
  end

endmodule
