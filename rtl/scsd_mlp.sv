// scsd_mlp: stochastic computing multi-layer perceptron with one hidden layer
// of SCSD neurons (default 784-100-10, the MNIST network), run for one
// inference of N = 2^B clock cycles.
//
// Input layer: every pixel value x_in[j] and every weight is a B-bit binary
// number that an SNG comparator turns into a bipolar stream (value
// 2*B/2^B - 1). All pixel comparators share one Sobol generator (dimension
// 1), all hidden-layer weight comparators share a second (dimension 2) and
// all output-layer weight comparators a third (dimension 3).
// Hidden layer: N_HID scsd_neuron instances without bias, each summing
// N_IN products with an SCSD adder and applying the clipped ReLU with the
// stochastic MAX against a shared LFSR reference stream of probability 0.5.
// Output layer: N_OUT out_mac units, each accumulating N_HID products of
// hidden outputs and weights over the N cycles. The predicted class is the
// output with the largest score; it is left to the reader of score.
//
// Interface and timing: hold x_in, w_hid, w_out and lfsr_seed stable and
// pulse start for one cycle while busy is low, or during the done cycle to
// run inferences back to back. The cycle after start re-initializes every
// generator and state register (the LFSR takes lfsr_seed), then N cycles
// stream the data, then done is high for one cycle with score valid; score
// holds until the next start. done rises N + 1 clock edges after the edge
// that samples start; busy is high from the cycle after start through done.
// Layer structure, SNG sharing, neuron and output unit follow the published
// description; the controller, the port-level weight interface, the Sobol
// dimensions and the shared reference LFSR are this design's choices.
module scsd_mlp
  import scsd_pkg::*;
#(
  parameter int unsigned N_IN   = 784,
  parameter int unsigned N_HID  = 100,
  parameter int unsigned N_OUT  = 10,
  parameter int unsigned B      = 10,                     // N = 2^B
  parameter int unsigned M_BITS = sum_width(N_IN) + 2,    // SCSD register m
  parameter int unsigned MP     = 4,                      // MAX counter m'
  parameter int unsigned LFSR_W = 16,
  parameter int unsigned ACC_W  = B + sum_width(N_HID)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [B-1:0]      x_in  [N_IN],
  input  logic [B-1:0]      w_hid [N_HID][N_IN],
  input  logic [B-1:0]      w_out [N_OUT][N_HID],
  input  logic [LFSR_W-1:0] lfsr_seed,
  output logic              busy,
  output logic              done,
  output logic [ACC_W-1:0]  score [N_OUT]
);

  localparam int unsigned N = 1 << B;

  mlp_state_e   state;
  logic [B-1:0] cnt;
  logic         clr;
  logic         en;

  // ---------------------------------------------------------------- control
  assign clr  = (state == ST_CLEAR);
  assign en   = (state == ST_RUN);
  assign busy = (state != ST_IDLE);
  assign done = (state == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      case (state)
        ST_IDLE:  if (start) state <= ST_CLEAR;
        ST_CLEAR: begin
          state <= ST_RUN;
          cnt   <= B'(N - 1);
        end
        ST_RUN: begin
          if (cnt == '0) state <= ST_DONE;
          else           cnt   <= cnt - 1'b1;
        end
        ST_DONE:  state <= start ? ST_CLEAR : ST_IDLE;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- random sources
  logic [B-1:0] r_x, r_wh, r_wo;
  logic         ref_bit;
  logic [LFSR_W-1:0] lfsr_state;

  sobol_gen #(.B(B), .DIM(1)) u_sobol_x (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .r(r_x));
  sobol_gen #(.B(B), .DIM(2)) u_sobol_wh (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .r(r_wh));
  sobol_gen #(.B(B), .DIM(3)) u_sobol_wo (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .r(r_wo));

  lfsr_sng #(.W(LFSR_W)) u_ref (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .seed(lfsr_seed),
    .bit_o(ref_bit), .state(lfsr_state));

  // ------------------------------------------------------------- input layer
  logic [N_IN-1:0] x_bits;

  sng_bank #(.W(B), .NUM(N_IN)) u_sng_x (
    .r(r_x), .val(x_in), .bits(x_bits));

  // ------------------------------------------------------------ hidden layer
  logic [N_HID-1:0] g_bits;
  logic [N_HID-1:0] z_bits;

  for (genvar i = 0; i < N_HID; i++) begin : g_hid
    logic [N_IN-1:0] w_bits;

    sng_bank #(.W(B), .NUM(N_IN)) u_sng_w (
      .r(r_wh), .val(w_hid[i]), .bits(w_bits));

    scsd_neuron #(
      .K       (N_IN),
      .USE_BIAS(1'b0),
      .M_BITS  (M_BITS),
      .MP      (MP)
    ) u_neuron (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .en     (en),
      .x      (x_bits),
      .w      (w_bits),
      .bias   (1'b0),
      .ref_bit(ref_bit),
      .z      (z_bits[i]),
      .g      (g_bits[i])
    );
  end

  // ------------------------------------------------------------ output layer
  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    logic [N_HID-1:0] w_bits;

    sng_bank #(.W(B), .NUM(N_HID)) u_sng_w (
      .r(r_wo), .val(w_out[o]), .bits(w_bits));

    out_mac #(
      .L    (N_HID),
      .B    (B),
      .ACC_W(ACC_W)
    ) u_mac (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (clr),
      .en   (en),
      .g    (g_bits),
      .w    (w_bits),
      .acc  (score[o])
    );
  end

endmodule
