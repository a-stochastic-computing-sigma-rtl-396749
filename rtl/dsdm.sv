// dsdm: first-order digital sigma-delta modulator with a most-significant-bit
// quantizer, the back end of the SCSD adder.
//
// It turns a signed multi-bit input V_n in [-k, k] into one bit Z_n per cycle
// whose bipolar time average (2*mean - 1) follows the time average of V_n,
// provided that stays inside [-1, 1].
//
//   T_n = max(0, min(T_{n-1} + V_n - Zs_{n-1}, M - 1)),   M = 2^M_BITS
//   Z_n = MSB(T_n)
//
// T_{n-1} is the unsigned M_BITS-bit register; Zs_{n-1} is the previous
// output bit held in a D flip-flop and sign-extended to +1 (bit 1) or -1
// (bit 0). The register saturates at 0 and M-1 instead of wrapping. T_n is
// the combinational adder output, so Z_n depends on this cycle's V_n with no
// register in between; register and flip-flop load T_n and Z_n on the
// enabled clock edge.
//
// Interface: clr (synchronous) sets T to T_INIT and the flip-flop to
// MSB(T_INIT); en advances one step.
// Structure, saturation and MSB quantizer follow the published SCSD adder;
// the reset value (mid-scale, the bipolar zero point) is this design's
// choice, as the architecture allows any initial state.
module dsdm #(
  parameter int unsigned     CP     = 11,       // input width c' (signed)
  parameter int unsigned     M_BITS = CP + 1,   // register width m >= c'+1
  parameter logic [M_BITS-1:0] T_INIT = M_BITS'(1) << (M_BITS - 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic signed [CP-1:0] v,
  output logic                 z,
  output logic [M_BITS-1:0]    t_q    // register contents T_{n-1}
);

  localparam int unsigned SW = ((M_BITS > CP) ? M_BITS : CP) + 2;
  localparam logic signed [SW-1:0] T_MAX = SW'((64'd1 << M_BITS) - 1);

  logic                  z_q;   // Z_{n-1}
  logic signed [SW-1:0]  sum;
  logic [M_BITS-1:0]     t_n;

  always_comb begin
    sum = $signed({2'b00, t_q}) + SW'(v) - (z_q ? SW'(1) : -SW'(1));
    if (sum < 0)          t_n = '0;
    else if (sum > T_MAX) t_n = T_MAX[M_BITS-1:0];
    else                  t_n = sum[M_BITS-1:0];
  end

  assign z = t_n[M_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q <= T_INIT;
      z_q <= T_INIT[M_BITS-1];
    end else if (clr) begin
      t_q <= T_INIT;
      z_q <= T_INIT[M_BITS-1];
    end else if (en) begin
      t_q <= t_n;
      z_q <= z;
    end
  end

endmodule
