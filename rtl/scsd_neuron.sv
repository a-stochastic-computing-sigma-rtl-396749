// scsd_neuron: stochastic computing artificial neuron built from an SCSD
// adder and a single-bit activation state machine.
//
// The K products X_j*W_j (bipolar, XNOR) and, when USE_BIAS = 1, the bias
// stream B are summed by the SCSD adder into the single-bit stream Z. The
// activation is the clipped ReLU, realized by stoch_max with Z on its first
// input and a bipolar-zero reference stream (probability 0.5) on its second:
// G ~ min(max(0, Z), 1) in bipolar terms.
//
// Interface: x, w, bias and ref_bit are this cycle's stream bits; z and g are
// combinational from them and the state; clr/en control both state machines.
// The bias enters the adder as one more term with weight +1 (it is XNORed
// with a constant 1). The neuron structure follows the published SCSD neuron;
// feeding Z to the MAX's first input and sharing the reference stream are
// this design's choices.
module scsd_neuron
  import scsd_pkg::*;
#(
  parameter int unsigned K        = 784,
  parameter bit          USE_BIAS = 1'b1,
  parameter int unsigned M_BITS   = sum_width(K + int'(USE_BIAS)) + 2,
  parameter int unsigned MP       = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [K-1:0] x,
  input  logic [K-1:0] w,
  input  logic         bias,
  input  logic         ref_bit,
  output logic         z,
  output logic         g
);

  localparam int unsigned KT = K + int'(USE_BIAS);

  logic [KT-1:0] xa;
  logic [KT-1:0] wa;

  if (USE_BIAS) begin : g_bias
    assign xa = {bias, x};
    assign wa = {1'b1, w};
  end else begin : g_nobias
    assign xa = x;
    assign wa = w;
  end

  scsd_adder #(
    .K     (KT),
    .M_BITS(M_BITS)
  ) u_adder (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (en),
    .x    (xa),
    .w    (wa),
    .z    (z)
  );

  stoch_max #(
    .MP(MP)
  ) u_act (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (en),
    .y1   (z),
    .y2   (ref_bit),
    .a    (g)
  );

endmodule
