// gp_rng: random number generator for the crossover and mutation points.
//
// An 8-bit maximal-length Fibonacci LFSR (x^8 + x^6 + x^5 + x^4 + 1, period
// 255). The register value is presented on `value`; bits 2..0 give point i
// and bits 5..3 point j. The register advances by one step on a clock edge
// where `step` is high, which the datapath asserts whenever a genetic
// instruction uses the points, so a program sees a new pair of points per
// genetic instruction. Reset loads SEED (must be non-zero).
// Only the presence of a random number generator is given; the LFSR, its
// polynomial, width, seed and stepping rule are this design's choices.
module gp_rng #(
  parameter logic [7:0] SEED = 8'hA5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  output logic [7:0] value
);

  logic fb;
  assign fb = value[7] ^ value[5] ^ value[4] ^ value[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= SEED;
    else if (step) value <= {value[6:0], fb};
  end

endmodule
