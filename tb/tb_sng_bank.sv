// tb_sng_bank: self-checking testbench for sng_bank.
//
// Part 1 drives random source values and channel values and checks every
// bit against R < B. Part 2 feeds the bank from a Sobol generator for one
// full period of N = 2^b cycles and checks that each channel emitted
// exactly B ones, the deterministic-precision property of that pairing.
module tb_sng_bank;
  localparam int unsigned W   = 8;
  localparam int unsigned NUM = 12;
  localparam int unsigned N   = 1 << W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [W-1:0] r_rand;
  logic [W-1:0] r_sob;
  logic [W-1:0] r;
  logic use_sobol = 1'b0;
  logic [W-1:0] val [NUM];
  logic [NUM-1:0] bits;
  int checks = 0;
  int failures = 0;
  int ones [NUM];

  sobol_gen #(.B(W), .DIM(2)) u_src (.clk(clk), .rst_n(rst_n), .clr(1'b0), .en(en), .r(r_sob));
  sng_bank #(.W(W), .NUM(NUM)) dut (.r(r), .val(val), .bits(bits));

  assign r = use_sobol ? r_sob : r_rand;
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_rand = '0;
    for (int j = 0; j < NUM; j++) val[j] = '0;
    for (int t = 0; t < 300; t++) begin
      r_rand = W'($urandom);
      for (int j = 0; j < NUM; j++) val[j] = W'($urandom);
      if (t % 10 == 0) val[0] = r_rand;  // equality edge case
      #1;
      for (int j = 0; j < NUM; j++) begin
        checks++;
        if (bits[j] != (int'(r_rand) < int'(val[j]))) begin
          failures++;
          $display("FAIL: r=%0d val=%0d bit=%0b", r_rand, val[j], bits[j]);
        end
      end
    end
    use_sobol = 1'b1;
    for (int j = 0; j < NUM; j++) begin
      val[j] = W'($urandom);
      ones[j] = 0;
    end
    val[1] = '0;
    val[2] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    for (int n = 0; n < N; n++) begin
      for (int j = 0; j < NUM; j++) ones[j] += int'(bits[j]);
      @(negedge clk);
    end
    for (int j = 0; j < NUM; j++) begin
      checks++;
      if (ones[j] != int'(val[j])) begin
        failures++;
        $display("FAIL: channel %0d ones %0d expected %0d", j, ones[j], val[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
