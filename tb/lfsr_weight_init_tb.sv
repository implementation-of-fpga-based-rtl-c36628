// lfsr_weight_init_tb: checks the weight generator against its own model of
// the Galois LFSR (x^32 + x^22 + x^2 + x + 1): the sequence after reset,
// holding without step, the weight format (magnitude in [0.125, 0.5),
// both signs occur) and that no state repeats within 100000 steps.
module lfsr_weight_init_tb;
  logic clk = 0, rst_n = 0, step = 0;
  logic [31:0] weight;
  int checks = 0, failures = 0;

  lfsr_weight_init #(.SEED(32'hACE1_2468)) dut (.clk, .rst_n, .step, .weight);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [31:0] s, first;
    logic [31:0] exp_w;
    int neg, pos;
    real mag;
    s = 32'hACE1_2468;
    neg = 0;
    pos = 0;
    first = s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(weight == {s[31], 7'b0111110, s[30], s[22:0]}, "weight after reset");
    repeat (5) @(negedge clk);
    check(weight == {s[31], 7'b0111110, s[30], s[22:0]}, "holds without step");
    step = 1;
    for (int n = 1; n <= 100000; n++) begin
      @(negedge clk);
      s = s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
      exp_w = {s[31], 7'b0111110, s[30], s[22:0]};
      if (n % 100 == 0 || n < 50) begin
        check(weight == exp_w, $sformatf("step %0d: %h, expected %h", n, weight, exp_w));
        mag = $bitstoreal({1'b0, 11'(weight[30:23]) - 11'd127 + 11'd1023, weight[22:0], 29'd0});
        check(mag >= 0.125 && mag < 0.5, $sformatf("weight magnitude %f", mag));
      end
      if (weight[31]) neg++; else pos++;
      if (s == first) begin
        checks++; failures++;
        $display("state repeated after %0d steps", n);
      end
    end
    check(neg > 40000 && pos > 40000, $sformatf("sign balance %0d/%0d", neg, pos));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
