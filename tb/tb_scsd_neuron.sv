// tb_scsd_neuron: self-checking testbench for scsd_neuron.
//
// K = 8 products plus the bias (9 adder terms, m = 6 bits), MAX counter
// m' = 4. Phase 1 drives random bits and checks the adder output Z and the
// activation output G every cycle against a reference modelled here: the
// sigma-delta update with saturation, then G = REF OR (Z AND NOT J).
// Phase 2 drives streams whose weighted sum plus bias is positive, negative
// or above 1, with a p = 0.5 reference, and checks the bipolar average of G
// against the clipped ReLU min(max(0, s), 1) within 0.08.
module tb_scsd_neuron;
  localparam int unsigned K = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic [K-1:0] x, w;
  logic bias, ref_bit, z, g;
  int checks = 0;
  int failures = 0;

  scsd_neuron #(.K(K), .USE_BIAS(1'b1), .MP(4)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .w(w), .bias(bias),
    .ref_bit(ref_bit), .z(z), .g(g));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic sbit(real xv);
    return (real'($urandom % 100000) / 100000.0) < (1.0 + xv) / 2.0;
  endfunction

  task automatic run_relu(real xv, real wv, real bv, int nterms);
    int ones = 0;
    real avg, s, expect_g;
    s = xv * wv * real'(nterms) + bv;
    expect_g = (s < 0.0) ? 0.0 : (s > 1.0) ? 1.0 : s;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int n = 0; n < 4096; n++) begin
      x = '0;
      w = '0;
      for (int j = 0; j < K; j++) begin
        // Terms beyond nterms carry bipolar 0 (random x, w = 0 value).
        x[j] = sbit(j < nterms ? xv : 0.0);
        w[j] = sbit(j < nterms ? wv : 0.0);
      end
      bias = sbit(bv);
      ref_bit = sbit(0.0);
      #1;
      ones += int'(g);
      @(negedge clk);
    end
    avg = 2.0 * real'(ones) / 4096.0 - 1.0;
    check(avg > expect_g - 0.08 && avg < expect_g + 0.08,
          $sformatf("sum %f: G average %f expected %f", s, avg, expect_g));
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, zq, y, s, mt, mj, zn;
    x = '0;
    w = '0;
    bias = 1'b0;
    ref_bit = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    t = 32;
    zq = 1;
    mt = 0;
    mj = 0;
    for (int n = 0; n < 3000; n++) begin
      x = K'($urandom);
      w = K'($urandom);
      bias = 1'($urandom);
      ref_bit = 1'($urandom);
      y = $countones(~(x ^ w)) + int'(bias);
      s = t + 2 * y - (K + 1) - (zq ? 1 : -1);
      if (s < 0) s = 0;
      if (s > 63) s = 63;
      zn = s[5];
      #1;
      check(z == zn[0], $sformatf("n=%0d z=%0b exp %0b", n, z, zn[0]));
      check(g == (ref_bit | (zn[0] & !mj)), $sformatf("n=%0d g=%0b", n, g));
      if (ref_bit && !zn[0] && mt < 15) mt++;
      else if (zn[0] && !ref_bit && mt > 0) mt--;
      mj = (mt > 0);
      t = s;
      zq = zn;
      @(negedge clk);
    end
    run_relu(0.5, 0.4, 0.1, 2);     // 0.4 + 0.1 = 0.5
    run_relu(0.6, -0.5, -0.1, 2);   // -0.7 -> 0
    run_relu(0.9, 0.9, 0.3, 4);     // > 1 -> 1
    run_relu(0.25, 0.5, 0.0, 4);    // 0.5
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
