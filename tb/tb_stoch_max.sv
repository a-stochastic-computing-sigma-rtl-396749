// tb_stoch_max: self-checking testbench for stoch_max.
//
// Phase 1 checks every output bit against A = Y2 OR (Y1 AND NOT J), with J
// the previous "counter above zero" and the counter modelled here (up on
// Y2 & ~Y1, down on Y1 & ~Y2, 4 bits, saturating). Phase 2 checks that the
// output rate approximates max(p1, p2) for several input probabilities,
// and the clipped ReLU with p2 = 0.5. Both the counter's full-scale
// saturation and its cancelling of Y1 ones must occur.
module tb_stoch_max;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic y1, y2, a;
  int checks = 0;
  int failures = 0;
  int n_cancel = 0;
  int n_sat = 0;

  stoch_max #(.MP(4)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
                           .y1(y1), .y2(y2), .a(a));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic pbit(real p);
    return (real'($urandom % 100000) / 100000.0) < p;
  endfunction

  task automatic run_rate(real p1, real p2);
    int ones = 0;
    real rate, expect_r;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    for (int n = 0; n < 8192; n++) begin
      y1 = pbit(p1);
      y2 = pbit(p2);
      #1;
      ones += int'(a);
      @(negedge clk);
    end
    rate = real'(ones) / 8192.0;
    expect_r = (p1 > p2) ? p1 : p2;
    check(rate > expect_r - 0.04 && rate < expect_r + 0.04,
          $sformatf("p1=%f p2=%f rate %f expected %f", p1, p2, rate, expect_r));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, j;
    y1 = 1'b0;
    y2 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    t = 0;
    j = 0;
    for (int n = 0; n < 4000; n++) begin
      // Stretches where Y2 dominates drive the counter to full scale.
      if ((n / 250) % 2 == 0) begin
        y1 = pbit(0.2);
        y2 = pbit(0.8);
      end else begin
        y1 = pbit(0.6);
        y2 = pbit(0.3);
      end
      #1;
      check(a == (y2 | (y1 & !j)), $sformatf("n=%0d a=%0b", n, a));
      if (y1 && !y2 && j) n_cancel++;
      if (y2 && !y1) begin
        if (t == 15) n_sat++;
        else t++;
      end else if (y1 && !y2 && t > 0) t--;
      j = (t > 0);
      @(negedge clk);
    end
    check(n_cancel > 0, "Y1 ones cancelled");
    check(n_sat > 0, "counter saturated");
    run_rate(0.7, 0.3);
    run_rate(0.2, 0.6);
    run_rate(0.9, 0.4);
    // Clipped ReLU: bipolar x on Y1, bipolar 0 on Y2.
    run_rate(0.85, 0.5);  // x = 0.7  -> 0.7
    run_rate(0.2, 0.5);   // x = -0.6 -> 0
    $display("cancelled=%0d saturated=%0d", n_cancel, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
