// out_mac: output-layer unit of the SCSD MLP, a multiply-and-accumulate that
// turns L bipolar product streams back into a binary score.
//
// Each cycle the L products XNOR(G_i, W_i) are counted (b' = floor(log2 L)+1
// bits) and the count is added to an accumulator. After N = 2^B enabled
// cycles the accumulator holds S = sum over the sequence of the per-cycle
// counts, and (2*S/N - L) estimates sum_i Ghat_i * What_i, the unit's
// pre-activation value. The classes are ranked by S directly.
//
// Interface: g and w are this cycle's bits; clr (synchronous) zeroes the
// accumulator; en adds one cycle's count; acc is the registered sum.
// Timing: acc is final on the cycle after the N-th enabled cycle.
// The popcount-plus-register structure follows the published output
// unit. That design gives the register b bits with N = 2^b; here it is b + b' bits wide
// so that N cycles of counts up to L cannot overflow.
module out_mac
  import scsd_pkg::*;
#(
  parameter int unsigned L     = 100,  // inputs l_h
  parameter int unsigned B     = 10,   // N = 2^B cycles
  parameter int unsigned ACC_W = B + sum_width(L)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [L-1:0]     g,
  input  logic [L-1:0]     w,
  output logic [ACC_W-1:0] acc
);

  localparam int unsigned BP = sum_width(L);

  logic [L-1:0]  u;
  logic [BP-1:0] cnt;

  assign u = ~(g ^ w);

  always_comb begin
    cnt = '0;
    for (int i = 0; i < L; i++) begin
      cnt = cnt + BP'(u[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (clr) begin
      acc <= '0;
    end else if (en) begin
      acc <= acc + ACC_W'(cnt);
    end
  end

endmodule
