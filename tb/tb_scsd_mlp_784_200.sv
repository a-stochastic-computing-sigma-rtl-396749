// tb_scsd_mlp_784_200: one inference of the wider MNIST network, 784-200-10,
// with the shortest evaluated sequence length N = 256 (B = 8), self-checking.
//
// Same method as the default-size test: random image and weights, a
// cycle-accurate reference of the whole network computed here, identical
// scores required, done exactly N + 1 clock edges after the edge that
// samples start, and the adders' bipolar averages required to correlate
// (Pearson > 0.9) with the exact 784-term sums. The mean absolute errors
// against exact arithmetic are printed.
module tb_scsd_mlp_784_200;
  localparam int unsigned N_IN   = 784;
  localparam int unsigned N_HID  = 200;
  localparam int unsigned N_OUT  = 10;
  localparam int unsigned B      = 8;
  localparam int unsigned M_BITS = $clog2(N_IN + 1) + 2;
  localparam int unsigned MP     = 4;
  localparam int unsigned LW     = 16;
  localparam int unsigned ACC_W  = B + $clog2(N_HID + 1);
  localparam int unsigned N      = 1 << B;
  localparam int unsigned RUNS   = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [B-1:0] x_in [N_IN];
  logic [B-1:0] w_hid [N_HID][N_IN];
  logic [B-1:0] w_out [N_OUT][N_HID];
  logic [LW-1:0] seed;
  logic busy, done;
  logic [ACC_W-1:0] score [N_OUT];

  int checks = 0;
  int failures = 0;
  int ev_sat_hi = 0, ev_sat_lo = 0, ev_cancel = 0, ev_max_full = 0;
  int ev_clipped = 0, ev_back2back = 0;
  int gsum_last [N_HID];
  int zsum_last [N_HID];
  real hid_mae = 0.0, out_mae = 0.0, z_corr = 0.0;

  scsd_mlp #(
    .N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .B(B), .M_BITS(M_BITS), .MP(MP),
    .LFSR_W(LW), .ACC_W(ACC_W)
  ) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x_in(x_in), .w_hid(w_hid),
    .w_out(w_out), .lfsr_seed(seed), .busy(busy), .done(done), .score(score));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Direction integer m_i (i >= 1) of Sobol dimension d: d = 1 all ones,
  // d = 2 from x + 1, d = 3 from x^2 + x + 1 with m1 = 1, m2 = 3.
  function automatic longint sob_m(int d, int i);
    longint m [0:31];
    m[1] = 1;
    m[2] = (d == 1) ? 1 : 3;
    for (int k = 3; k <= i; k++) begin
      if (d == 1)      m[k] = 1;
      else if (d == 2) m[k] = (m[k-1] * 2) ^ m[k-1];
      else             m[k] = (m[k-1] * 2) ^ (m[k-2] * 4) ^ m[k-2];
    end
    return m[i];
  endfunction

  // n-th b-bit Sobol value (period N) from the Gray code of n.
  function automatic int sob(int d, int n);
    int g = (n % N) ^ ((n % N) >> 1);
    longint xv = 0;
    for (int i = 1; i <= B; i++) begin
      if (g[i-1]) xv = xv ^ (sob_m(d, i) << (B - i));
    end
    return int'(xv);
  endfunction

  // Reference scores for the current inputs.
  task automatic reference(output longint ref_score [N_OUT]);
    int t [N_HID];
    int zq [N_HID];
    int mt [N_HID];
    int mj [N_HID];
    int gsum [N_HID];
    int lf, rx, rwh, rwo, y, s, z, g, rb, cnt;
    int gbit [N_HID];
    for (int o = 0; o < N_OUT; o++) ref_score[o] = 0;
    for (int i = 0; i < N_HID; i++) begin
      t[i] = 1 << (M_BITS - 1);
      zq[i] = 1;
      mt[i] = 0;
      mj[i] = 0;
      gsum[i] = 0;
      zsum_last[i] = 0;
    end
    lf = (seed == 0) ? 1 : int'(seed);
    for (int n = 0; n < N; n++) begin
      rx = sob(1, n);
      rwh = sob(2, n);
      rwo = sob(3, n);
      rb = (lf < (1 << (LW - 1))) ? 1 : 0;
      for (int i = 0; i < N_HID; i++) begin
        y = 0;
        for (int j = 0; j < N_IN; j++) begin
          if ((rx < int'(x_in[j])) == (rwh < int'(w_hid[i][j]))) y++;
        end
        s = t[i] + 2 * y - N_IN - (zq[i] ? 1 : -1);
        if (s < 0) begin
          s = 0;
          ev_sat_lo++;
        end
        if (s > (1 << M_BITS) - 1) begin
          s = (1 << M_BITS) - 1;
          ev_sat_hi++;
        end
        z = (s >> (M_BITS - 1)) & 1;
        g = rb | (z & (mj[i] ^ 1));
        if (z && !rb && mj[i]) ev_cancel++;
        if (rb && !z) begin
          if (mt[i] < (1 << MP) - 1) mt[i]++;
          else ev_max_full++;
        end else if (z && !rb && mt[i] > 0) mt[i]--;
        mj[i] = (mt[i] > 0);
        t[i] = s;
        zq[i] = z;
        gbit[i] = g;
        gsum[i] += g;
        zsum_last[i] += z;
      end
      for (int o = 0; o < N_OUT; o++) begin
        cnt = 0;
        for (int i = 0; i < N_HID; i++) begin
          if (gbit[i] == ((rwo < int'(w_out[o][i])) ? 1 : 0)) cnt++;
        end
        ref_score[o] += cnt;
      end
      lf = ((lf << 1) & 16'hFFFF) | (((lf >> 15) ^ (lf >> 13) ^ (lf >> 12) ^ (lf >> 10)) & 1);
    end
    // A neuron whose stream carries bipolar 0 or less after the ReLU.
    for (int i = 0; i < N_HID; i++) begin
      if (gsum[i] <= N / 2 + N / 16) ev_clipped++;
      gsum_last[i] = gsum[i];
    end
  endtask

  // Bipolar value v in [-1, 1] to a B-bit SNG input.
  function automatic logic [B-1:0] enc(real v);
    int q = int'((v + 1.0) * real'(N) / 2.0);
    if (q > N - 1) q = N - 1;
    if (q < 0) q = 0;
    return B'(q);
  endfunction

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
  endfunction

  task automatic load_data(int run);
    real scale = 0.06;
    for (int j = 0; j < N_IN; j++) x_in[j] = enc(urand(-1.0, 1.0));
    for (int i = 0; i < N_HID; i++)
      for (int j = 0; j < N_IN; j++) w_hid[i][j] = enc(urand(-scale, scale));
    for (int o = 0; o < N_OUT; o++)
      for (int i = 0; i < N_HID; i++) w_out[o][i] = enc(urand(-1.0, 1.0));
    seed = LW'($urandom);
  endtask

  function automatic real dec(logic [B-1:0] q);
    return 2.0 * real'(q) / real'(N) - 1.0;
  endfunction

  // Exact-arithmetic comparison of the last inference.
  task automatic exact_compare();
    real h [N_HID];
    real hs [N_HID];
    real zs [N_HID];
    real acc, est, ma, mb, sab, saa, sbb;
    hid_mae = 0.0;
    out_mae = 0.0;
    for (int i = 0; i < N_HID; i++) begin
      acc = 0.0;
      for (int j = 0; j < N_IN; j++) acc += dec(x_in[j]) * dec(w_hid[i][j]);
      hs[i] = acc;
      zs[i] = 2.0 * real'(zsum_last[i]) / real'(N) - 1.0;
      h[i] = (acc < 0.0) ? 0.0 : (acc > 1.0) ? 1.0 : acc;
      est = 2.0 * real'(gsum_last[i]) / real'(N) - 1.0;
      hid_mae += ((est > h[i]) ? est - h[i] : h[i] - est) / real'(N_HID);
    end
    for (int o = 0; o < N_OUT; o++) begin
      acc = 0.0;
      for (int i = 0; i < N_HID; i++) acc += h[i] * dec(w_out[o][i]);
      est = 2.0 * real'(score[o]) / real'(N) - real'(N_HID);
      $display("output %0d: score %0d -> %f, exact %f", o, score[o], est, acc);
      out_mae += ((est > acc) ? est - acc : acc - est) / real'(N_OUT);
    end
    // Pearson correlation of the adder outputs with the exact sums.
    ma = 0.0;
    mb = 0.0;
    for (int i = 0; i < N_HID; i++) begin
      ma += zs[i] / real'(N_HID);
      mb += hs[i] / real'(N_HID);
    end
    sab = 0.0;
    saa = 0.0;
    sbb = 0.0;
    for (int i = 0; i < N_HID; i++) begin
      sab += (zs[i] - ma) * (hs[i] - mb);
      saa += (zs[i] - ma) * (zs[i] - ma);
      sbb += (hs[i] - mb) * (hs[i] - mb);
    end
    z_corr = sab / $sqrt(saa * sbb);
    $display("hidden MAE %f, output MAE %f, adder/exact correlation %f", hid_mae, out_mae, z_corr);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_score [N_OUT];
    int cycles;
    load_data(0);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int run = 0; run < RUNS; run++) begin
      if (run > 0) load_data(run);
      reference(ref_score);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cycles = 0;
      while (!done && cycles < 4 * N) begin
        check(busy, "busy while running");
        @(posedge clk);
        #1 cycles++;
      end
      check(cycles == N + 1, $sformatf("run %0d: done after %0d cycles, expected %0d", run, cycles, N + 1));
      for (int o = 0; o < N_OUT; o++) begin
        check(longint'(score[o]) == ref_score[o],
              $sformatf("run %0d score[%0d] = %0d, reference %0d", run, o, score[o], ref_score[o]));
      end
      // The next run's start is raised during this done cycle.
      if (run < RUNS - 1) ev_back2back++;
    end
    exact_compare();
    @(posedge clk);
    #1 check(!busy && !done, "idle after the last run");
    $display("events: sat_hi=%0d sat_lo=%0d cancel=%0d max_full=%0d clipped=%0d back2back=%0d",
             ev_sat_hi, ev_sat_lo, ev_cancel, ev_max_full, ev_clipped, ev_back2back);
    check(z_corr > 0.9, $sformatf("adder outputs correlate %f with the exact sums", z_corr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
