// fp32_add_tb: checks the single-precision adder against double-precision
// reference arithmetic: random operands, operands of close exponent (which
// exercise cancellation and renormalisation) and special values.
module fp32_add_tb;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] te);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== te) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH %h + %h = %h, expected %h", ta, tb_, y, te);
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
    check(32'h3F80_0000, 32'h3F80_0000, 32'h4000_0000);   // 1 + 1
    check(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);   // 1 - 1
    check(32'h0000_0000, 32'h4040_0000, 32'h4040_0000);   // 0 + 3
    check(32'h4040_0000, 32'h0000_0000, 32'h4040_0000);   // 3 + 0
    check(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);   // inf - inf
    check(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);   // 1 + 2^-24: tie to even
    check(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);   // tie rounds up to even
    check(32'h3F80_0000, 32'hB380_0000, 32'h3F7F_FFFF);   // 1 - 2^-24
    for (int i = 0; i < 20000; i++) begin
      ra = rand_fp(90, 160);
      if (i % 2 == 0) rb = rand_fp(90, 160);
      else begin
        rb = rand_fp(0, 3);
        rb[30:23] = 8'(int'(ra[30:23]) + int'(rb[30:23]) - 1);
      end
      check(ra, rb, real2fp(fp2real(ra) + fp2real(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
