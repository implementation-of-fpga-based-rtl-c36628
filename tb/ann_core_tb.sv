// ann_core_tb: checks the network core against a reference model of the same
// network written with double-precision arithmetic rounded to single
// precision after every operation.
//
// After the LFSR fill, the model takes its starting weights from the core's
// weight RAMs. Then a mix of training and recognition commands runs on
// random grids; after each one the testbench compares the winning class and
// its score, every weight of both layers bit for bit, and the command's
// length in clocks with the phase schedule
// (one clock to accept the command, rows*cols+1 per phase, one clock to
// complete).
module ann_core_tb;
  import ann_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_I = 16, N_H = 16, N_O = 29;
  localparam logic [31:0] ETA = 32'h3F80_0000;
  localparam int D1 = N_H * (N_I + 1), D2 = N_O * (N_H + 1);

  logic clk = 0, rst_n = 0;
  logic init_start = 0, start = 0, train = 0;
  logic [N_I-1:0] x = '0;
  logic [4:0] target = '0;
  logic busy, done;
  logic [4:0] class_out;
  logic [31:0] class_score;
  phase_e phase;

  int checks = 0, failures = 0;
  int cycles;

  logic [31:0] w1 [N_H][N_I+1];
  logic [31:0] w2 [N_O][N_H+1];
  logic [31:0] h [N_H];
  logic [31:0] o [N_O];
  logic [31:0] d1 [N_H];
  logic [31:0] d2 [N_O];

  ann_core #(.N_I(N_I), .N_H(N_H), .N_O(N_O), .ETA(ETA)) dut (
    .clk, .rst_n, .init_start, .start, .train, .x, .target,
    .busy, .done, .class_out, .class_score, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic logic [31:0] in_bit(logic [N_I-1:0] xv, int i);
    if (i == N_I) return 32'h3F80_0000;
    return xv[i] ? 32'h3F80_0000 : 32'h0;
  endfunction

  // Reference forward pass; returns the winning class.
  function automatic int model_forward(logic [N_I-1:0] xv, output logic [31:0] score);
    logic [31:0] s, hin;
    int best;
    for (int j = 0; j < N_H; j++) begin
      s = 32'h0;
      for (int i = 0; i <= N_I; i++) s = fadd(s, fmul(w1[j][i], in_bit(xv, i)));
      h[j] = fsig(s);
    end
    best = 0;
    for (int k = 0; k < N_O; k++) begin
      s = 32'h0;
      for (int j = 0; j <= N_H; j++) begin
        hin = (j == N_H) ? 32'h3F80_0000 : h[j];
        s = fadd(s, fmul(w2[k][j], hin));
      end
      o[k] = fsig(s);
      if (k > 0 && fp2real(o[k]) > fp2real(o[best])) best = k;
    end
    score = o[best];
    return best;
  endfunction

  task automatic model_train(logic [N_I-1:0] xv, int tgt);
    logic [31:0] s, t, ed, hin;
    for (int k = 0; k < N_O; k++) begin
      t = (k == tgt) ? real2fp(0.9) : real2fp(0.1);
      d2[k] = fdelta(o[k], fadd(t, {~o[k][31], o[k][30:0]}));
    end
    for (int j = 0; j < N_H; j++) begin
      s = 32'h0;
      for (int k = 0; k < N_O; k++) s = fadd(s, fmul(w2[k][j], d2[k]));
      d1[j] = fdelta(h[j], s);
    end
    for (int k = 0; k < N_O; k++) begin
      ed = fmul(ETA, d2[k]);
      for (int j = 0; j <= N_H; j++) begin
        hin = (j == N_H) ? 32'h3F80_0000 : h[j];
        w2[k][j] = fadd(w2[k][j], fmul(ed, hin));
      end
    end
    for (int j = 0; j < N_H; j++) begin
      ed = fmul(ETA, d1[j]);
      for (int i = 0; i <= N_I; i++) w1[j][i] = fadd(w1[j][i], fmul(ed, in_bit(xv, i)));
    end
  endtask

  task automatic run_cmd(bit is_init, bit trn, logic [N_I-1:0] xv, int tgt);
    @(negedge clk);
    init_start = is_init;
    start = !is_init;
    train = trn;
    x = xv;
    target = 5'(tgt);
    @(negedge clk);
    init_start = 0;
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic compare_weights(string tag);
    int bad = 0;
    for (int j = 0; j < N_H; j++)
      for (int i = 0; i <= N_I; i++)
        if (dut.u_w1.mem[j*(N_I+1)+i] !== w1[j][i]) bad++;
    for (int k = 0; k < N_O; k++)
      for (int j = 0; j <= N_H; j++)
        if (dut.u_w2.mem[k*(N_H+1)+j] !== w2[k][j]) bad++;
    check(bad == 0, $sformatf("%s: %0d weights differ from the model", tag, bad));
  endtask

  initial begin
    int exp_cls, fwd_cycles, trn_cycles, n_trained, n_recog;
    logic [31:0] exp_score;
    logic [N_I-1:0] xv;
    int tgt;
    fwd_cycles = 1 + (N_H*(N_I+1)+1) + (N_O*(N_H+1)+1) + 1;
    trn_cycles = fwd_cycles + (N_H*N_O+1) + (N_O*(N_H+1)+1) + (N_H*(N_I+1)+1);
    n_trained = 0;
    n_recog = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    run_cmd(1, 0, '0, 0);
    check(cycles == D1 + D2 + 2, $sformatf("init took %0d clocks", cycles));
    for (int j = 0; j < N_H; j++)
      for (int i = 0; i <= N_I; i++) w1[j][i] = dut.u_w1.mem[j*(N_I+1)+i];
    for (int k = 0; k < N_O; k++)
      for (int j = 0; j <= N_H; j++) w2[k][j] = dut.u_w2.mem[k*(N_H+1)+j];
    // Starting weights: magnitude in [0.125, 0.5), not all equal.
    check(fp2real({1'b0, w1[0][0][30:0]}) >= 0.125 && fp2real({1'b0, w1[0][0][30:0]}) < 0.5,
          "initial weight range");
    check(w1[0][0] != w1[0][1] && w2[3][2] != w2[3][3], "initial weights vary");

    for (int n = 0; n < 60; n++) begin
      xv  = N_I'($urandom);
      tgt = $urandom_range(N_O - 1);
      if (n % 4 == 3) begin
        run_cmd(0, 0, xv, tgt);
        exp_cls = model_forward(xv, exp_score);
        n_recog++;
        check(cycles == fwd_cycles, $sformatf("recognition took %0d clocks, expected %0d", cycles, fwd_cycles));
      end else begin
        run_cmd(0, 1, xv, tgt);
        exp_cls = model_forward(xv, exp_score);
        model_train(xv, tgt);
        n_trained++;
        check(cycles == trn_cycles, $sformatf("training took %0d clocks, expected %0d", cycles, trn_cycles));
      end
      check(int'(class_out) == exp_cls, $sformatf("class %0d, expected %0d", class_out, exp_cls));
      check(class_score === exp_score, $sformatf("score %h, expected %h", class_score, exp_score));
      compare_weights($sformatf("command %0d", n));
    end
    // Repeated training on one pattern must make it the winner.
    xv = 16'hA5C3;
    for (int n = 0; n < 30; n++) begin
      run_cmd(0, 1, xv, 7);
      exp_cls = model_forward(xv, exp_score);
      model_train(xv, 7);
    end
    run_cmd(0, 0, xv, 0);
    check(class_out == 5'd7, $sformatf("after training class %0d, expected 7", class_out));
    compare_weights("final");
    check(n_trained > 0 && n_recog > 0, "both command kinds ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
