// gp_alu: 8-bit arithmetic and logic unit of the accumulator.
//
// Computes the ordinary accumulator operations of the instruction set:
// ADD, AND, OR, XOR, compare, load (pass the operand), complement, shifts
// and rotates by one place. It is purely combinational. `a` is the
// accumulator, `b` the memory or immediate operand (MD low byte).
//
// Flag outputs: `cf` is the carry out of ADD and the borrow of CMP
// (a < b, unsigned); `zf` is set when the 8-bit result is zero (for CMP,
// when a == b). The datapath decides which flags an operation writes, as
// in the instruction tables: ADD and CMP write CF and ZF, AND/OR/XOR write
// ZF, the others write neither. Shifts fill with 0. The borrow sense of CF
// and the shift fill are this design's choices.
module gp_alu
  import gp_pkg::*;
(
  input  fn_e        fn,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y,
  output logic       cf,
  output logic       zf
);

  logic [8:0] sum;
  logic [8:0] diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    cf   = 1'b0;
    unique case (fn)
      F_ADD:   begin y = sum[7:0];  cf = sum[8];  end
      F_AND:   y = a & b;
      F_OR:    y = a | b;
      F_XOR:   y = a ^ b;
      F_CMP:   begin y = diff[7:0]; cf = diff[8]; end
      F_LDA:   y = b;
      F_COM:   y = ~a;
      F_SHL:   y = {a[6:0], 1'b0};
      F_SHR:   y = {1'b0, a[7:1]};
      F_ROTL:  y = {a[6:0], a[7]};
      F_ROTR:  y = {a[0], a[7:1]};
      default: y = a;
    endcase
    zf = (y == 8'h00);
  end

endmodule
