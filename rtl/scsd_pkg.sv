// scsd_pkg: widths, constants and helper functions shared by the stochastic
// computing sigma-delta (SCSD) blocks.
//
// sum_width(k)  : c  = floor(log2 k) + 1, the width of the popcount of k
//                 product bits (this equals $clog2(k+1)).
// sobol_dir(..) : direction number v_i of a one-dimensional Sobol sequence
//                 with b-bit outputs. Dimension 1 is the van der Corput
//                 sequence (m_i = 1); dimensions 2 and 3 use the primitive
//                 polynomials x+1 and x^2+x+1 with initial values m = {1}
//                 and m = {1, 3}. The choice of Sobol dimensions is this
//                 design's own; the generator itself is only named by the
//                 published design.
package scsd_pkg;

  // Popcount width c for k single-bit inputs.
  function automatic int unsigned sum_width(input int unsigned k);
    return $clog2(k + 1);
  endfunction

  // Direction number v_i (i = 1..b) of Sobol dimension dim, scaled to b bits:
  // v_i = m_i * 2^(b-i), with m_i the odd integers of the Bratley-Fox
  // recurrence for the dimension's primitive polynomial.
  function automatic longint unsigned sobol_dir(input int unsigned dim,
                                                input int unsigned b,
                                                input int unsigned i);
    longint unsigned m1, m2, mi;
    m1 = 1;  // m_{i-1}
    m2 = 1;  // m_{i-2}
    mi = 1;
    for (int unsigned n = 1; n <= i; n++) begin
      case (dim)
        2: mi = (n == 1) ? 1 : ((m1 << 1) ^ m1);
        3: mi = (n == 1) ? 1 : (n == 2) ? 3 : ((m1 << 1) ^ (m2 << 2) ^ m2);
        default: mi = 1;
      endcase
      m2 = m1;
      m1 = mi;
    end
    return mi << (b - i);
  endfunction

  // Sequencing states of the MLP inference controller.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_CLEAR = 2'd1,
    ST_RUN   = 2'd2,
    ST_DONE  = 2'd3
  } mlp_state_e;

endpackage
