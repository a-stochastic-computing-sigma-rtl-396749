// sobol_gen: b-bit Sobol low-discrepancy number generator.
//
// One generator drives the comparators of many stochastic number generators
// (SNGs): all inputs share one, all weights share another. Its first N = 2^B
// outputs are a permutation of 0..N-1, so a comparator R < value emits
// exactly `value` ones in N cycles.
//
// How it works: the Gray-code (Antonov-Saleev) form. Output x_0 = 0 after
// clr; on each enabled cycle x_{n+1} = x_n XOR v_c, where c is the position
// (1-based) of the lowest zero bit of the counter n. The direction numbers
// v_c come from scsd_pkg::sobol_dir and are constants.
//
// Interface: clr (synchronous) restarts the sequence at x_0 = 0; en advances
// one step per cycle; r is the current value, registered.
// The published design names Sobol generators and their sharing; the generator's
// construction and the dimension numbers are this design's choice.
module sobol_gen
  import scsd_pkg::*;
#(
  parameter int unsigned B   = 10,  // output width b, sequence length N = 2^b
  parameter int unsigned DIM = 1    // Sobol dimension, 1..3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [B-1:0] r
);

  logic [B-1:0] vtab [B];
  logic [B-1:0] idx;
  logic [B-1:0] dir;

  for (genvar i = 0; i < B; i++) begin : g_dir
    localparam logic [B-1:0] V = B'(sobol_dir(DIM, B, i + 1));
    assign vtab[i] = V;
  end

  // Direction of the lowest zero bit of the step counter.
  always_comb begin
    dir = vtab[B-1];
    for (int i = B - 1; i >= 0; i--) begin
      if (!idx[i]) dir = vtab[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      r   <= '0;
    end else if (clr) begin
      idx <= '0;
      r   <= '0;
    end else if (en) begin
      idx <= idx + 1'b1;
      r   <= r ^ dir;
    end
  end

endmodule
