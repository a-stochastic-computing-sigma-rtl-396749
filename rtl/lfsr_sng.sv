// lfsr_sng: LFSR-based stochastic number generator.
//
// A W-bit maximal-length Fibonacci LFSR (x^16+x^14+x^13+x^11+1 for the
// default W = 16) steps once per enabled cycle; the output bit is 1 when
// the register is below THRESH. With the default THRESH = 2^(W-1) the
// stream has probability 0.5, which is 0 in bipolar format: this is the
// constant input of the clipped-ReLU MAX activation.
//
// Interface: clr (synchronous) loads seed (an all-zero seed is replaced by
// 1 so the LFSR never locks up); en advances one step; bit_o is
// combinational from the register.
// The published design only says the reference stream comes from an LFSR
// SNG; the
// width, polynomial and seeding are this design's choice.
module lfsr_sng #(
  parameter int unsigned W           = 16,
  parameter logic [W-1:0] THRESH     = W'(1) << (W - 1),
  parameter logic [W-1:0] TAPS       = 16'hB400  // x^16+x^14+x^13+x^11+1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] seed,
  output logic         bit_o,
  output logic [W-1:0] state
);

  logic fb;

  assign fb    = ^(state & TAPS);
  assign bit_o = (state < THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W'(1);
    end else if (clr) begin
      state <= (seed == '0) ? W'(1) : seed;
    end else if (en) begin
      state <= {state[W-2:0], fb};
    end
  end

endmodule
