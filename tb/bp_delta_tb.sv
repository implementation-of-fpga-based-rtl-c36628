// bp_delta_tb: checks err*y*(1-y) against double-precision reference
// arithmetic rounded after each of the three steps, for outputs y in (0,1)
// and errors of both signs.
module bp_delta_tb;
  import fp_ref_pkg::*;

  logic [31:0] y, err, delta, expd, t, p;
  int checks = 0, failures = 0;

  bp_delta dut (.y(y), .err(err), .delta(delta));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // y = 0.5, err = 1 -> 0.25
    y = 32'h3F00_0000; err = 32'h3F80_0000; #1;
    checks++; if (delta !== 32'h3E80_0000) failures++;
    for (int i = 0; i < 10000; i++) begin
      y   = real2fp($urandom_range(999999) / 1000000.0);
      err = rand_fp(110, 128);
      #1;
      t    = real2fp(1.0 - fp2real(y));
      p    = real2fp(fp2real(y) * fp2real(t));
      expd = real2fp(fp2real(err) * fp2real(p));
      checks++;
      if (delta !== expd) begin
        failures++;
        if (failures < 10) $display("MISMATCH y=%h err=%h delta=%h expected %h", y, err, delta, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
