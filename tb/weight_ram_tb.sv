// weight_ram_tb: checks the weight RAM against an array model: random
// writes and reads with the one-clock read latency, and a read of the
// address being written in the same clock, which must return the old word.
module weight_ram_tb;
  localparam int DEPTH = 272;
  logic clk = 0;
  logic we = 0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  weight_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_q;
    // Fill every word.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk) we = 0;
    // Random mixed traffic.
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      raddr = 9'($urandom_range(DEPTH - 1));
      we    = 1'($urandom_range(1));
      waddr = ($urandom_range(3) == 0) ? raddr : 9'($urandom_range(DEPTH - 1));
      wdata = $urandom;
      expect_q = model[raddr];                 // old word, even if written now
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("MISMATCH addr %0d: %h, expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
