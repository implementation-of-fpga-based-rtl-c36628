// ann_char_rec_top_tb: end-to-end test of the character recogniser.
//
// Instance A (network at its default size, LCD delays shortened) trains
// after reset, then every stored character is set on the switches; the
// green LEDs and the LCD text (decoded by a display model) must name that
// class. A press of the train button must retrain from new random weights
// and converge again. Instance B has an epoch limit of 1 and must report a
// training run that did not converge. The testbench counts how often each
// mechanism happened (weight fill, back-propagation update, epoch with
// errors, converged run, unconverged run, switch-triggered recognition,
// recognition at the end of training, LCD frame, retraining by button) and
// fails any that never did.
module ann_char_rec_top_tb;
  import ann_pkg::*;

  localparam int T_PWR = 100, T_EN = 2, T_CMD = 20, T_CLR = 40;

  logic clk = 0, rst_n = 0, train_btn = 0;
  logic [15:0] sw = '0;
  logic [15:0] ledr, ledr_b;
  logic [7:0]  ledg, ledg_b;
  logic [7:0]  lcd_data, lcd_data_b;
  logic lcd_rs, lcd_rw, lcd_en, lcd_on, lcd_blon;
  logic lcd_rs_b, lcd_rw_b, lcd_en_b, lcd_on_b, lcd_blon_b;
  logic [127:0] line1, line2, line1_b, line2_b;
  int frames, writes, frames_b, writes_b;
  int checks = 0, failures = 0;

  ann_char_rec_top #(.T_PWR(T_PWR), .T_EN(T_EN), .T_CMD(T_CMD), .T_CLR(T_CLR)) dut (
    .clk, .rst_n, .train_btn, .sw, .ledr, .ledg,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_on, .lcd_blon);
  hd44780_model lcd (
    .data(lcd_data), .rs(lcd_rs), .rw(lcd_rw), .en(lcd_en),
    .line1, .line2, .frames, .writes);

  ann_char_rec_top #(.MAX_EPOCHS(1), .T_PWR(T_PWR), .T_EN(T_EN), .T_CMD(T_CMD), .T_CLR(T_CLR)) dut_b (
    .clk, .rst_n, .train_btn(1'b0), .sw, .ledr(ledr_b), .ledg(ledg_b),
    .lcd_data(lcd_data_b), .lcd_rs(lcd_rs_b), .lcd_rw(lcd_rw_b), .lcd_en(lcd_en_b),
    .lcd_on(lcd_on_b), .lcd_blon(lcd_blon_b));
  hd44780_model lcd_b (
    .data(lcd_data_b), .rs(lcd_rs_b), .rw(lcd_rw_b), .en(lcd_en_b),
    .line1(line1_b), .line2(line2_b), .frames(frames_b), .writes(writes_b));

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
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

  // ---------------------------------------------------------- mechanism counters
  int n_fill = 0, n_bp = 0, n_err_epoch = 0, n_conv = 0, n_unconv = 0;
  int n_rec_switch = 0, n_rec_after_train = 0, n_retrain = 0;
  logic train_d = 0, train_b_d = 0;
  logic sw_cause = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.phase == PH_IDLE && dut.u_core.init_start) n_fill++;
    if (dut.u_core.phase == PH_UW1 && dut.u_core.v1) n_bp++;
    if (dut.u_sup.state == dut.u_sup.S_WAIT && dut.u_core.done &&
        dut.u_sup.pat == 5'd28 && (dut.u_sup.errors != 0 || dut.u_core.class_out != 5'd28))
      n_err_epoch++;
    if (train_d && !ledg[6]) begin
      if (ledg[7]) n_conv++; else n_unconv++;
    end
    if (train_b_d && !ledg_b[6]) begin
      if (ledg_b[7]) n_conv++; else n_unconv++;
    end
    if (dut.grid_changed) sw_cause = 1;
    if (dut.rec_start) begin
      if (sw_cause) n_rec_switch++; else n_rec_after_train++;
      sw_cause = 0;
    end
    train_d   <= ledg[6];
    train_b_d <= ledg_b[6];
  end

  // ---------------------------------------------------------- reference data
  function automatic logic [15:0] pattern_of(int p);
    logic [15:0] t [29] = '{
      16'h69F9, 16'hEF9E, 16'h7887, 16'hE99E, 16'hFE8F, 16'hF8E8, 16'h78B7, 16'h9F99,
      16'hE44E, 16'h72A4, 16'h9AE9, 16'h888F, 16'h9FF9, 16'h9DB9, 16'hF99F, 16'hE9E8,
      16'hF9BF, 16'hE9E9, 16'h7C3E, 16'hF444, 16'h4444, 16'h09F4, 16'hA09F, 16'h4A9F,
      16'hE2C7, 16'hE2C3, 16'h2E43, 16'h422E, 16'h822E};
    return t[p];
  endfunction

  function automatic string name_of(int p);
    string n [29] = '{"A", "B", "C", "D", "E", "F", "G", "H", "I", "J", "K", "L", "M",
                      "N", "O", "P", "Q", "R", "S", "T", "ALIF", "BA", "TA", "THA",
                      "JIM", "HA", "KHA", "DAL", "DHAL"};
    return n[p];
  endfunction

  function automatic logic [127:0] text16(string s);
    logic [127:0] r = {16{8'h20}};
    for (int i = 0; i < s.len() && i < 16; i++) r[127 - 8*i -: 8] = s[i];
    return r;
  endfunction

  task automatic wait_frames(int n);
    int f0 = frames;
    while (frames < f0 + n) @(posedge clk);
  endtask

  task automatic recognise_all(string tag);
    for (int p = 0; p < 29; p++) begin
      sw = pattern_of(p);
      repeat (1700) @(posedge clk);   // up to two recognitions of 768 clocks
      check(ledg[5] && int'(ledg[4:0]) == p,
            $sformatf("%s: pattern %0d shown as class %0d (valid %0b)", tag, p, ledg[4:0], ledg[5]));
      check(ledr == pattern_of(p), "grid echo on red LEDs");
      if (p % 7 == 0 || p >= 20) begin
        wait_frames(2);
        check(line1 == text16("RECOGNISED:") &&
              line2 == text16($sformatf("CLASS %02d: %s", p, name_of(p))),
              $sformatf("%s: LCD shows '%s' / '%s' for class %0d", tag, line1, line2, p));
      end
    end
  endtask

  initial begin
    int e1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(ledg[6] && ledg_b[6], "training starts after reset");
    wait_frames(1);
    check(line1 == text16("TRAINING..."), $sformatf("LCD during training: '%s'", line1));
    wait (!ledg[6]);
    e1 = int'(dut.epoch);
    $display("first training: converged=%0b after %0d epochs", ledg[7], e1);
    check(ledg[7], "first training converged");
    recognise_all("after training");

    // Retrain by the button.
    @(negedge clk) train_btn = 1;
    repeat (4) @(negedge clk);
    train_btn = 0;
    check(ledg[6], "button starts training");
    if (ledg[6]) n_retrain++;
    wait (!ledg[6]);
    $display("second training: converged=%0b after %0d epochs", ledg[7], dut.epoch);
    check(ledg[7], "second training converged");
    repeat (1000) @(posedge clk);
    check(ledg[5] && int'(ledg[4:0]) == 28, "grid classified again after retraining");
    recognise_all("after retraining");

    // Instance B gave up after one epoch.
    wait (!ledg_b[6]);
    wait_frames(1);
    check(!ledg_b[7] && dut_b.epoch == 16'd1, "epoch-limited instance stopped unconverged");
    check(line1_b == text16("NOT CONVERGED"), $sformatf("LCD of limited instance: '%s'", line1_b));

    check(n_fill == 2, $sformatf("weight fills: %0d", n_fill));
    check(n_bp > 0, "back-propagation updates");
    check(n_err_epoch > 0, "epochs with errors");
    check(n_conv >= 2, "converged runs");
    check(n_unconv >= 1, "unconverged runs");
    check(n_rec_switch > 0, "switch-triggered recognitions");
    check(n_rec_after_train >= 2, "recognitions at end of training");
    check(frames > 0, "LCD frames");
    check(n_retrain == 1, "retraining by button");
    $display("mechanisms: fill=%0d bp=%0d err_epochs=%0d conv=%0d unconv=%0d rec_sw=%0d rec_end=%0d frames=%0d retrain=%0d",
             n_fill, n_bp, n_err_epoch, n_conv, n_unconv, n_rec_switch, n_rec_after_train, frames, n_retrain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
