// lcd_ctrl_tb: checks the LCD controller with a bus monitor in place of the
// display.
//
// The monitor records every byte latched on a falling edge of lcd_en and
// checks the bus timing: power-on wait, set-up time of rs/data before the
// enable pulse, pulse width, data stable while enabled, and the pause after
// each transfer (longer after the clear command). The recorded stream must
// be the four set-up commands followed by refresh frames of line 1 and
// line 2; after the text buffer changes, a later frame must show the new
// text.
module lcd_ctrl_tb;
  localparam int T_PWR = 50, T_EN = 3, T_CMD = 20, T_CLR = 60;

  logic clk = 0, rst_n = 0;
  logic [255:0] text;
  logic [7:0] lcd_data;
  logic lcd_rs, lcd_rw, lcd_en, lcd_on, lcd_blon;
  int checks = 0, failures = 0;

  lcd_ctrl #(.T_PWR(T_PWR), .T_EN(T_EN), .T_CMD(T_CMD), .T_CLR(T_CLR)) dut (
    .clk, .rst_n, .text, .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_on, .lcd_blon);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Bus monitor.
  logic [8:0] rx [$];
  int cyc = 0, bus_change = 0, en_rise = -1, en_fall = -1, first_rise = -1;
  logic [8:0] last_word = '0, prev_bus = '0;
  logic prev_en = 0;
  int timing_bad = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if ({lcd_rs, lcd_data} != prev_bus) begin
      bus_change = cyc;
      if (lcd_en) timing_bad++;                 // bus changed while enabled
    end
    prev_bus = {lcd_rs, lcd_data};
    if (lcd_en && !prev_en) begin
      if (first_rise < 0) first_rise = cyc;
      if (cyc - bus_change < T_EN) timing_bad++;  // set-up time
      if (en_fall >= 0 && cyc - en_fall < ((last_word == 9'h001) ? T_CLR : T_CMD))
        timing_bad++;                            // pause after previous transfer
      en_rise = cyc;
    end
    if (!lcd_en && prev_en) begin
      if (cyc - en_rise < T_EN) timing_bad++;     // pulse width
      last_word = {lcd_rs, lcd_data};
      rx.push_back(last_word);
      en_fall = cyc;
    end
    prev_en = lcd_en;
  end

  function automatic logic [255:0] pad32(string s);
    logic [255:0] r = {32{8'h20}};
    for (int i = 0; i < s.len() && i < 32; i++) r[255 - 8*i -: 8] = s[i];
    return r;
  endfunction

  task automatic check_frame(int base, logic [255:0] t, string tag);
    int bad = 0;
    if (rx[base] != 9'h080) bad++;
    for (int i = 0; i < 16; i++) if (rx[base + 1 + i] != {1'b1, t[255 - 8*i -: 8]}) bad++;
    if (rx[base + 17] != 9'h0C0) bad++;
    for (int i = 0; i < 16; i++) if (rx[base + 18 + i] != {1'b1, t[127 - 8*i -: 8]}) bad++;
    check(bad == 0, $sformatf("%s: %0d wrong bytes", tag, bad));
  endtask

  initial begin
    logic [255:0] t1, t2;
    t1 = pad32("RECOGNISED:     CLASS 00: A     ");
    t2 = pad32("TRAINING...     EPOCH 004F      ");
    text = t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rx.size() >= 4 + 34 * 2);
    check(first_rise >= T_PWR, $sformatf("first enable after %0d clocks", first_rise));
    check(rx[0] == 9'h038 && rx[1] == 9'h00C && rx[2] == 9'h001 && rx[3] == 9'h006, "set-up commands");
    check_frame(4, t1, "frame 1");
    check_frame(4 + 34, t1, "frame 2");
    text = t2;
    wait (rx.size() >= 4 + 34 * 4);
    check_frame(4 + 34 * 3, t2, "frame after text change");
    check(timing_bad == 0, $sformatf("%0d bus timing violations", timing_bad));
    check(lcd_rw == 0 && lcd_on == 1 && lcd_blon == 1, "static pins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
