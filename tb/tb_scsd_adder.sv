// tb_scsd_adder: self-checking testbench for scsd_adder.
//
// K = 4 inputs, register m = 5 bits (the default c' + 1). Phase 1 drives
// random bits and checks Z every cycle against a reference computed here:
// the XNOR products are counted, V = 2Y - K, and the saturating state
// update T = max(0, min(T + V - (+1/-1), 31)) with Z = MSB(T).
// Phase 2 drives bipolar streams with chosen values and checks that the
// bipolar time average of Z over 2048 cycles is within 0.05 of the sum of
// the products, and that a sum above 1 is clipped to about 1.
module tb_scsd_adder;
  localparam int unsigned K = 4;
  localparam int unsigned M = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic [K-1:0] x, w;
  logic z;
  int checks = 0;
  int failures = 0;

  scsd_adder #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
                           .x(x), .w(w), .z(z));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Bit with bipolar value xv: P(1) = (1 + xv) / 2.
  function automatic logic sbit(real xv);
    real p = (1.0 + xv) / 2.0;
    return (real'($urandom % 100000) / 100000.0) < p;
  endfunction

  task automatic run_avg(real xs[K], real ws[K], real expect_v, string what);
    int ones = 0;
    real avg;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int n = 0; n < 2048; n++) begin
      for (int j = 0; j < K; j++) begin
        x[j] = sbit(xs[j]);
        w[j] = sbit(ws[j]);
      end
      #1;
      ones += int'(z);
      @(negedge clk);
    end
    avg = 2.0 * real'(ones) / 2048.0 - 1.0;
    check(avg > expect_v - 0.05 && avg < expect_v + 0.05,
          $sformatf("%s: average %f expected %f", what, avg, expect_v));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, zq, y, vv, s;
    x = '0;
    w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    t = 16;
    zq = 1;
    for (int n = 0; n < 2000; n++) begin
      x = K'($urandom);
      w = K'($urandom);
      y = $countones(~(x ^ w));
      vv = 2 * y - K;
      s = t + vv - (zq ? 1 : -1);
      if (s < 0) s = 0;
      if (s > 31) s = 31;
      #1;
      check(z == s[4], $sformatf("n=%0d z=%0b exp %0b", n, z, s[4]));
      t = s;
      zq = s[4];
      @(negedge clk);
    end
    run_avg('{0.5, -0.5, 0.8, 0.0}, '{0.6, 0.4, -0.5, 0.9}, 0.3 - 0.2 - 0.4 + 0.0, "mixed");
    run_avg('{0.9, 0.2, -0.7, 0.3}, '{0.5, -1.0, 0.5, 0.5}, 0.45 - 0.2 - 0.35 + 0.15, "small");
    run_avg('{1.0, 1.0, 1.0, 0.0}, '{1.0, 1.0, 1.0, 0.0}, 1.0, "clipped high");
    run_avg('{1.0, 1.0, 1.0, 0.0}, '{-1.0, -1.0, -1.0, 0.0}, -1.0, "clipped low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
