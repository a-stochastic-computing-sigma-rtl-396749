// tb_lfsr_sng: self-checking testbench for lfsr_sng.
//
// Checks every state against a reference LFSR written from the polynomial
// x^16+x^14+x^13+x^11+1 (feedback from bits 15, 13, 12 and 10), that the
// period is 2^16 - 1, that a period holds exactly 32767 ones below the
// default threshold (probability 0.5), that clr loads the seed, that an
// all-zero seed is replaced by 1 and that en = 0 holds the state.
module tb_lfsr_sng;
  localparam int unsigned W = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic [W-1:0] seed = 16'hACE1;
  logic bit_o;
  logic [W-1:0] state;
  int checks = 0;
  int failures = 0;

  lfsr_sng #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .seed(seed),
                         .bit_o(bit_o), .state(state));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ref_s;
    int ones;
    int period;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(state == 16'hACE1, "seed load");
    ref_s = state;
    ones = 0;
    period = 0;
    en = 1'b1;
    for (int n = 0; n < 65535; n++) begin
      check(state == ref_s, $sformatf("state n=%0d got %h exp %h", n, state, ref_s));
      check(bit_o == (ref_s < 16'h8000), "output bit");
      ones += int'(bit_o);
      ref_s = {ref_s[14:0], ref_s[15] ^ ref_s[13] ^ ref_s[12] ^ ref_s[10]};
      @(negedge clk);
      if (period == 0 && state == 16'hACE1) period = n + 1;
    end
    check(period == 65535, $sformatf("period %0d", period));
    check(ones == 32767, $sformatf("ones per period %0d", ones));
    en = 1'b0;
    ref_s = state;
    repeat (4) @(negedge clk);
    check(state == ref_s, "hold with en=0");
    seed = '0;
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(state == 16'h0001, "zero seed replaced by 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
