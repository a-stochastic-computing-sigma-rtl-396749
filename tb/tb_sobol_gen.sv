// tb_sobol_gen: self-checking testbench for sobol_gen.
//
// Runs 6-bit generators of dimensions 1, 2 and 3 over two full periods and
// compares every output with the direct (non-Gray) definition
// x_n = XOR of m_i * 2^(b-i) over the set bits i of gray(n), using direction
// integers m_i written out by hand. It also checks that each period is a
// permutation of 0..63, that en = 0 holds the value and that clr restarts.
module tb_sobol_gen;
  localparam int unsigned B = 6;
  localparam int unsigned N = 1 << B;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic [B-1:0] r1, r2, r3;
  int checks = 0;
  int failures = 0;

  // Direction integers m_i, i = 1..6.
  int m_tab [3][6] = '{'{1, 1, 1, 1, 1, 1},
                       '{1, 3, 5, 15, 17, 51},
                       '{1, 3, 3, 9, 29, 23}};

  sobol_gen #(.B(B), .DIM(1)) dut1 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .r(r1));
  sobol_gen #(.B(B), .DIM(2)) dut2 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .r(r2));
  sobol_gen #(.B(B), .DIM(3)) dut3 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .r(r3));

  always #5 clk = ~clk;

  function automatic int expect_x(int d, int n);
    int m = n % N;  // the generator repeats with period N
    int g = m ^ (m >> 1);
    int x = 0;
    for (int i = 1; i <= B; i++) begin
      if (g[i-1]) x = x ^ (m_tab[d][i-1] << (B - i));
    end
    return x;
  endfunction

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
    bit seen [3][N];
    int got [3];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 2 * N; n++) begin
      got = '{int'(r1), int'(r2), int'(r3)};
      for (int d = 0; d < 3; d++) begin
        check(got[d] == expect_x(d, n), $sformatf("dim %0d n=%0d got %0d exp %0d", d + 1, n, got[d], expect_x(d, n)));
        if (n < N) begin
          check(!seen[d][got[d]], $sformatf("dim %0d repeats %0d", d + 1, got[d]));
          seen[d][got[d]] = 1'b1;
        end
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
    end
    // Hold with en = 0.
    got = '{int'(r1), int'(r2), int'(r3)};
    repeat (3) @(negedge clk);
    check(r1 == got[0] && r2 == got[1] && r3 == got[2], "hold with en=0");
    // Restart with clr.
    en = 1'b1;
    repeat (5) @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    en = 1'b0;
    check(r1 == 0 && r2 == 0 && r3 == 0, "clr restarts at zero");
    en = 1'b1;
    for (int n = 1; n < 10; n++) begin
      @(negedge clk);
      check(r2 == expect_x(1, n), $sformatf("after clr dim 2 n=%0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
