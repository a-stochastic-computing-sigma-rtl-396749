// tb_dsdm: self-checking testbench for dsdm.
//
// Uses the k = 3, M = 8 (m = 3 bits) configuration. V = 2Y - 3 takes the
// values -3, -1, 1, 3. The expected next state is taken from the transition
// rules of that case written out state by state:
//   lower half {0..3} (previous output 0, fed back as -1):
//     Y=0 -> max(0, S-2), Y=1 -> S, Y=2 -> S+2, Y=3 -> S+4
//   upper half {4..7} (previous output 1, fed back as +1):
//     Y=0 -> S-4, Y=1 -> S-2, Y=2 -> S, Y=3 -> min(7, S+2)
// and the output must be the MSB of the new state; saturation at both ends
// must occur. A second phase drives a 5-bit modulator with a random +1/-1
// input of mean 0.4 and checks that Z is 1 for about 70 % of the cycles.
module tb_dsdm;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic signed [2:0] v;
  logic z;
  logic [2:0] t_q;
  int checks = 0;
  int failures = 0;
  int sat_lo = 0;
  int sat_hi = 0;

  dsdm #(.CP(3), .M_BITS(3)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
                                  .v(v), .z(z), .t_q(t_q));

  // Wider modulator for the averaging check: input in {-1, +1} per cycle.
  logic signed [2:0] v2;
  logic z2;
  logic [4:0] t2;
  dsdm #(.CP(3), .M_BITS(5)) dut2 (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
                                   .v(v2), .z(z2), .t_q(t2));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int next_state(int s, int y);
    if (s < 4) begin
      case (y)
        0: return (s - 2 < 0) ? 0 : s - 2;
        1: return s;
        2: return s + 2;
        default: return s + 4;
      endcase
    end else begin
      case (y)
        0: return s - 4;
        1: return s - 2;
        2: return s;
        default: return (s + 2 > 7) ? 7 : s + 2;
      endcase
    end
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, y, ns, ones;
    v = '0;
    v2 = 3'sd1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(t_q == 3'd4, "reset state mid-scale");
    en = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      s = int'(t_q);
      // Bias the input to visit both rails.
      if ((n / 200) % 3 == 0)      y = ($urandom % 4 == 0) ? 3 : 0;
      else if ((n / 200) % 3 == 1) y = ($urandom % 4 == 0) ? 0 : 3;
      else                          y = $urandom % 4;
      v = 3'(2 * y - 3);
      ns = next_state(s, y);
      #1;
      check(z == ns[2], $sformatf("n=%0d s=%0d y=%0d z=%0b", n, s, y, z));
      @(negedge clk);
      check(int'(t_q) == ns, $sformatf("n=%0d s=%0d y=%0d got %0d exp %0d", n, s, y, t_q, ns));
      if (ns == 0 && s - 2 < 0 && y == 0) sat_lo++;
      if (ns == 7 && s + 2 > 7 && y == 3 && s >= 4) sat_hi++;
    end
    check(sat_lo > 0, "lower saturation exercised");
    check(sat_hi > 0, "upper saturation exercised");
    // Averaging: random +-1 input with P(+1) = 0.7 gives mean V = 0.4,
    // so Z must be 1 for about 70 % of the cycles.
    en = 1'b0;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    en = 1'b1;
    ones = 0;
    for (int n = 0; n < 4000; n++) begin
      v2 = ($urandom % 10 < 7) ? 3'sd1 : -3'sd1;
      #1;
      ones += int'(z2);
      @(negedge clk);
    end
    check(ones > 2650 && ones < 2950, $sformatf("ones rate %0d / 4000", ones));
    $display("saturations: low=%0d high=%0d", sat_lo, sat_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
