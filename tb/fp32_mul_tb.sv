// fp32_mul_tb: checks the single-precision multiplier against double-
// precision reference arithmetic on random and special operands.
module fp32_mul_tb;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] te);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== te) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h * %h = %h, expected %h", ta, tb_, y, te);
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
    logic [31:0] ra, rb;
    // Special cases.
    check(32'h3F80_0000, 32'h4000_0000, 32'h4000_0000);   // 1 * 2
    check(32'h0000_0000, 32'h4000_0000, 32'h0000_0000);   // 0 * 2
    check(32'h8000_0000, 32'h4000_0000, 32'h8000_0000);   // -0 * 2
    check(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);   // inf * 2
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);   // inf * 0
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);   // overflow
    check(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);   // underflow flush
    check(32'hBF00_0000, 32'h3E80_0000, 32'hBE00_0000);   // -0.5 * 0.25
    for (int i = 0; i < 20000; i++) begin
      ra = rand_fp(64, 190);
      rb = rand_fp(64, 190);
      check(ra, rb, real2fp(fp2real(ra) * fp2real(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
