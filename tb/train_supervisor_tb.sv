// train_supervisor_tb: runs the training supervisor with a real network core.
//
// Instance A trains to convergence. The testbench follows every command the
// supervisor sends: one weight fill first, then per epoch the 29 classes in
// order, each as a training command; it counts the misclassified patterns
// itself and compares the count with the supervisor's epoch_errors, and
// checks that training stops exactly at the first error-free epoch. It then
// asks the trained core to recognise each stored pattern. Instance B has an
// epoch limit of 2 and must stop there, unconverged.
module train_supervisor_tb;
  import ann_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // Instance A: default limit.
  logic        start_a = 0;
  logic        s_init, s_start, s_train;
  logic [15:0] s_x;
  logic [4:0]  s_target;
  logic        busy, done;
  logic [4:0]  cls;
  logic [31:0] score;
  phase_e      phase;
  logic        training, trained;
  logic [15:0] epoch;
  logic [4:0]  epoch_errors;
  // Recognition commands from the testbench after training.
  logic        tb_start = 0;
  logic [15:0] tb_x = '0;

  train_supervisor dut (
    .clk, .rst_n, .start(start_a),
    .core_init(s_init), .core_start(s_start), .core_train(s_train),
    .core_x(s_x), .core_target(s_target),
    .core_busy(busy), .core_done(done), .core_class(cls),
    .training, .trained, .epoch, .epoch_errors);

  ann_core core (
    .clk, .rst_n, .init_start(training ? s_init : 1'b0),
    .start(training ? s_start : tb_start), .train(training ? s_train : 1'b0),
    .x(training ? s_x : tb_x), .target(s_target),
    .busy, .done, .class_out(cls), .class_score(score), .phase);

  // Instance B: stops after two epochs.
  logic        b_init, b_start, b_train, b_busy, b_done, b_training, b_trained;
  logic [15:0] b_x, b_epoch;
  logic [4:0]  b_target, b_cls, b_errors;
  logic [31:0] b_score;
  phase_e      b_phase;

  train_supervisor #(.MAX_EPOCHS(2)) dut_b (
    .clk, .rst_n, .start(start_a),
    .core_init(b_init), .core_start(b_start), .core_train(b_train),
    .core_x(b_x), .core_target(b_target),
    .core_busy(b_busy), .core_done(b_done), .core_class(b_cls),
    .training(b_training), .trained(b_trained), .epoch(b_epoch), .epoch_errors(b_errors));

  ann_core core_b (
    .clk, .rst_n, .init_start(b_init), .start(b_start), .train(b_train),
    .x(b_x), .target(b_target), .busy(b_busy), .done(b_done),
    .class_out(b_cls), .class_score(b_score), .phase(b_phase));

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Command monitor for instance A.
  int n_init = 0, n_cmd = 0, my_errors = 0, my_epoch = 0, order_bad = 0, last_err = -1;
  int first_clean = -1;
  logic [4:0] cur_target;
  always @(posedge clk) if (training) begin
    if (s_init && !busy) n_init++;
    if (s_start && !busy) begin
      if (!s_train || int'(s_target) != n_cmd % 29) order_bad++;
      cur_target = s_target;
      n_cmd++;
    end
    if (done && core.phase == PH_IDLE && n_cmd > 0 && !s_init) begin
      if (cls != cur_target) my_errors++;
      if (n_cmd % 29 == 0) begin
        my_epoch++;
        last_err = my_errors;
        if (my_errors == 0 && first_clean < 0) first_clean = my_epoch;
        my_errors = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start_a = 1;
    @(negedge clk) start_a = 0;
    check(training && b_training, "training started");
    wait (!training);
    @(negedge clk);
    $display("converged=%0d after %0d epochs", trained, epoch);
    check(trained, "instance A converged");
    check(n_init == 1, $sformatf("%0d weight fills", n_init));
    check(order_bad == 0, $sformatf("%0d commands out of order", order_bad));
    check(n_cmd == 29 * int'(epoch), $sformatf("%0d commands for %0d epochs", n_cmd, epoch));
    check(my_epoch == int'(epoch), "epoch count");
    check(last_err == int'(epoch_errors), $sformatf("epoch errors %0d, counted %0d", epoch_errors, last_err));
    check(first_clean == int'(epoch), "stopped at the first error-free epoch");
    // Every stored pattern is now recognised.
    for (int p = 0; p < 29; p++) begin
      tb_x = pattern_of(p);
      @(negedge clk) tb_start = 1;
      @(negedge clk) tb_start = 0;
      wait (done);
      @(negedge clk);
      check(int'(cls) == p, $sformatf("pattern %0d recognised as %0d", p, cls));
    end
    wait (!b_training);
    @(negedge clk);
    check(!b_trained && b_epoch == 16'd2, $sformatf("limited instance: trained=%0d epoch=%0d", b_trained, b_epoch));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The 29 training bitmaps, rows top to bottom, bit 15 = top left.
  function automatic logic [15:0] pattern_of(int p);
    logic [15:0] t [29] = '{
      16'h69F9, 16'hEF9E, 16'h7887, 16'hE99E, 16'hFE8F, 16'hF8E8, 16'h78B7, 16'h9F99,
      16'hE44E, 16'h72A4, 16'h9AE9, 16'h888F, 16'h9FF9, 16'h9DB9, 16'hF99F, 16'hE9E8,
      16'hF9BF, 16'hE9E9, 16'h7C3E, 16'hF444, 16'h4444, 16'h09F4, 16'hA09F, 16'h4A9F,
      16'hE2C7, 16'hE2C3, 16'h2E43, 16'h422E, 16'h822E};
    return t[p];
  endfunction
endmodule
