// fp32_mac_tb: checks c + a*b (product rounded, then sum rounded) against
// double-precision reference arithmetic, including accumulation chains.
module fp32_mac_tb;
  import fp_ref_pkg::*;

  logic [31:0] a, b, c, y, expy, prod;
  int checks = 0, failures = 0;

  fp32_mac dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      c = 32'h0;
      for (int i = 0; i < 17; i++) begin
        a = rand_fp(118, 128);
        b = ($urandom_range(3) == 0) ? 32'h0 : (($urandom_range(1) == 0) ? 32'h3F80_0000 : rand_fp(118, 128));
        #1;
        prod = real2fp(fp2real(a) * fp2real(b));
        expy = real2fp(fp2real(c) + fp2real(prod));
        checks++;
        if (y !== expy) begin
          failures++;
          if (failures < 10) $display("MISMATCH %h + %h*%h = %h, expected %h", c, a, b, y, expy);
        end
        c = y;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
