// scsd_adder: stochastic computing sigma-delta (SCSD) adder, a k-input
// multiply-and-add for bipolar stochastic streams with a single-bit output.
//
// Each cycle:
//   U_j = XNOR(X_j, W_j)        bipolar products, j = 1..K
//   Y   = sum_j U_j             c = floor(log2 K) + 1 bits, unsigned
//   V   = 2*Y - K               c' = c + 1 bits, signed, range [-K, K]
//   Z   = dsdm(V)               first-order digital sigma-delta modulator
// The bipolar time average of Z approximates sum_j Xhat_j * What_j, clipped
// to [-1, 1] by the modulator's saturating register. The products are added
// deterministically: no random source is used after the inputs.
//
// Interface: x and w are the K input and weight bits of this cycle; z is
// combinational from them and the modulator state; clr/en control the
// modulator (see dsdm). All of this follows the published SCSD
// adder; the default register width m = c' + 1 is the smallest it allows.
module scsd_adder
  import scsd_pkg::*;
#(
  parameter int unsigned K      = 784,
  parameter int unsigned M_BITS = sum_width(K) + 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [K-1:0] x,
  input  logic [K-1:0] w,
  output logic         z
);

  localparam int unsigned C  = sum_width(K);
  localparam int unsigned CP = C + 1;

  logic [K-1:0]          u;
  logic [C-1:0]          y;
  logic signed [CP-1:0]  v;
  logic [M_BITS-1:0]     t_unused;

  assign u = ~(x ^ w);

  always_comb begin
    y = '0;
    for (int j = 0; j < K; j++) begin
      y = y + C'(u[j]);
    end
  end

  // Range conversion from [0, K] to [-K, K]: a left shift and a subtraction.
  assign v = $signed({1'b0, y} << 1) - CP'(K);

  dsdm #(
    .CP    (CP),
    .M_BITS(M_BITS)
  ) u_dsdm (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (en),
    .v    (v),
    .z    (z),
    .t_q  (t_unused)
  );

endmodule
