// sng_bank: a bank of stochastic number generator comparators sharing one
// random number source.
//
// Each output bit is 1 when the shared b-bit random value R is below that
// channel's binary value B_j, so channel j emits a stream with probability
// B_j / 2^b. Read in bipolar format, B_j encodes the value 2*B_j/2^b - 1.
// Purely combinational; the random value normally comes from sobol_gen or
// lfsr_sng. The comparator R < B follows the published SNG; grouping many
// of them on one random source follows its generator sharing scheme.
module sng_bank #(
  parameter int unsigned W   = 10,  // comparator width b
  parameter int unsigned NUM = 784  // channels sharing the source
) (
  input  logic [W-1:0]   r,
  input  logic [W-1:0]   val [NUM],
  output logic [NUM-1:0] bits
);

  always_comb begin
    for (int j = 0; j < NUM; j++) begin
      bits[j] = (r < val[j]);
    end
  end

endmodule
