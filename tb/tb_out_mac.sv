// tb_out_mac: self-checking testbench for out_mac.
//
// L = 10 inputs, B = 6 (N = 64 cycles). Random hidden-output and weight
// bits are driven for N enabled cycles, with a few idle cycles (en = 0)
// mixed in; the accumulator must then equal the sum of the per-cycle
// counts of XNOR(g, w) computed here, one cycle after the last enabled
// cycle. Then clr must zero it. The all-agree case must give L * N, which
// needs the widened accumulator.
module tb_out_mac;
  localparam int unsigned L = 10;
  localparam int unsigned B = 6;
  localparam int unsigned N = 1 << B;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic [L-1:0] g, w;
  logic [B+3:0] acc;
  int checks = 0;
  int failures = 0;

  out_mac #(.L(L), .B(B)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
                               .g(g), .w(w), .acc(acc));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum, k;
    g = '0;
    w = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      check(acc == 0, "clr zeroes accumulator");
      exp_sum = 0;
      k = 0;
      while (k < N) begin
        g = L'($urandom);
        w = L'($urandom);
        en = ($urandom % 5 != 0);
        if (rep == 2) begin
          w = g;
          en = 1'b1;
        end
        if (en) begin
          exp_sum += $countones(~(g ^ w));
          k++;
        end
        @(negedge clk);
      end
      en = 1'b0;
      check(int'(acc) == exp_sum, $sformatf("rep %0d acc %0d expected %0d", rep, acc, exp_sum));
      if (rep == 2) check(int'(acc) == L * N, "full-scale sum L*N");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
