// sigmoid_pla_tb: checks the piecewise-linear sigmoid bit for bit against a
// reference that applies the same segments with double-precision arithmetic
// rounded after each step, and checks that it stays within 0.02 of the true
// logistic function and is monotonic (the published segments step down by
// 0.004 at |x| = 2.375, which the check tolerates).
module sigmoid_pla_tb;
  import fp_ref_pkg::*;

  logic [31:0] x, y;
  int checks = 0, failures = 0;
  real prev_y;

  sigmoid_pla dut (.x(x), .y(y));

  function automatic logic [31:0] ref_sig(logic [31:0] v);
    real z, f;
    logic [31:0] fb;
    z = fp2real({1'b0, v[30:0]});
    if (z >= 5.0) return v[31] ? 32'h0 : 32'h3F80_0000;
    if (z >= 2.375)   fb = real2fp(real2fp_val(z / 32.0) + 0.84375);
    else if (z >= 1.0) fb = real2fp(real2fp_val(z / 8.0) + 0.625);
    else               fb = real2fp(real2fp_val(z / 4.0) + 0.5);
    f = fp2real(fb);
    if (v[31]) return real2fp(1.0 - f);
    return fb;
  endfunction

  function automatic real real2fp_val(real r);
    return fp2real(real2fp(r));
  endfunction

  task automatic check(logic [31:0] v);
    real truth;
    x = v;
    #1;
    checks++;
    if (y !== ref_sig(v)) begin
      failures++;
      if (failures < 10) $display("MISMATCH sig(%h) = %h, expected %h", v, y, ref_sig(v));
    end
    truth = 1.0 / (1.0 + $exp(-fp2real(v)));
    checks++;
    if (fp2real(y) - truth > 0.02 || truth - fp2real(y) > 0.02) begin
      failures++;
      if (failures < 10) $display("ACCURACY sig(%f) = %f, true %f", fp2real(v), fp2real(y), truth);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0000);            // 0 -> 0.5
    checks++; if (y !== 32'h3F00_0000) failures++;
    check(32'h40C0_0000);            // 6 -> 1
    checks++; if (y !== 32'h3F80_0000) failures++;
    check(32'hC0C0_0000);            // -6 -> 0
    checks++; if (y !== 32'h0000_0000) failures++;
    check(32'h3F80_0000);            // 1 -> 0.75
    checks++; if (y !== 32'h3F40_0000) failures++;
    for (int i = 0; i < 5000; i++) check(rand_fp(100, 130));
    // Sweep -8 .. 8 and check monotonicity.
    prev_y = -1.0;
    for (int i = -800; i <= 800; i++) begin
      check(real2fp(i / 100.0));
      checks++;
      if (fp2real(y) < prev_y - 0.005) begin
        failures++;
        $display("NOT MONOTONIC at %f", i / 100.0);
      end
      prev_y = fp2real(y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
