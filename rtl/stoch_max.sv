// stoch_max: stochastic MAX of two bit streams, used as the neuron's
// single-bit-in, single-bit-out activation.
//
// An MP-bit saturating up/down counter T holds the ones that input Y2 has
// emitted in excess of Y1. It counts up when Y2 = 1 and Y1 = 0, down when
// Y1 = 1 and Y2 = 0, holds otherwise, and stays inside [0, 2^MP - 1].
// A flip-flop holds J = (T > 0). The output is
//   A_n = Y2_n OR (Y1_n AND NOT J_{n-1})
// so every one of Y2 passes, and a one of Y1 passes only when no excess of
// Y2 is pending to cancel it: the output's rate approximates max(p1, p2).
// With Y2 a bipolar-zero stream (p = 0.5) the output is the clipped ReLU
// min(max(0, x), 1) of the bipolar value x carried by Y1.
//
// Interface: y1/y2 are this cycle's bits, a is combinational from them and
// J; clr (synchronous) empties the counter; en advances one step.
// Counter, comparator, flip-flop and output equation follow the published
// description; the counting direction follows its state-update equation.
module stoch_max #(
  parameter int unsigned MP = 4  // counter width m'
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic y1,
  input  logic y2,
  output logic a
);

  localparam logic [MP-1:0] T_TOP = '1;

  logic [MP-1:0] t_q;
  logic [MP-1:0] t_n;
  logic          j_q;  // J_{n-1}

  always_comb begin
    t_n = t_q;
    if (y2 && !y1 && t_q != T_TOP) t_n = t_q + 1'b1;
    else if (y1 && !y2 && t_q != '0) t_n = t_q - 1'b1;
  end

  assign a = y2 | (y1 & ~j_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q <= '0;
      j_q <= 1'b0;
    end else if (clr) begin
      t_q <= '0;
      j_q <= 1'b0;
    end else if (en) begin
      t_q <= t_n;
      j_q <= (t_n != '0);
    end
  end

endmodule
