// switch_input_tb: checks the switch synchroniser: the grid follows the
// switches two clocks later, a change gives exactly one change pulse, and
// an unchanged grid gives none.
module switch_input_tb;
  logic clk = 0, rst_n = 0;
  logic [15:0] sw = '0, grid;
  logic changed;
  int checks = 0, failures = 0;

  switch_input #(.N(16)) dut (.clk, .rst_n, .sw, .grid, .changed);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    logic [15:0] v, prev;
    int pulses;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(grid == 16'd0 && !changed, "quiet after reset");
    for (int n = 0; n < 200; n++) begin
      v = (n % 5 == 4) ? sw : 16'($urandom);   // every fifth: no change
      prev = grid;
      @(negedge clk) sw = v;
      @(negedge clk);
      check(grid == prev, "grid must not follow after one clock");
      @(negedge clk);
      check(grid == v, $sformatf("grid %h after two clocks, expected %h", grid, v));
      pulses = 0;
      for (int k = 0; k < 6; k++) begin
        if (changed) pulses++;
        @(negedge clk);
      end
      check(pulses == ((n % 5 == 4) ? 0 : 1), $sformatf("%0d change pulses", pulses));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
