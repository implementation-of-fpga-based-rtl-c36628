// ann_char_rec_top_full_tb: one complete operation of the character
// recogniser with every parameter at its default (network size, epoch
// limit, 50 MHz LCD timing): training after reset until convergence, then
// recognition of each of the 29 stored characters from the switches,
// checked on the green LEDs, and for a few of them on the LCD text decoded
// by a display model. Also checks the recognition latency: the LEDs must
// show the class 773 clocks after the switches change (3 clocks of
// synchronisation and change detection, 768 for the forward pass, 2 to
// start and to register the result).
module ann_char_rec_top_full_tb;
  import ann_pkg::*;

  logic clk = 0, rst_n = 0, train_btn = 0;
  logic [15:0] sw = '0;
  logic [15:0] ledr;
  logic [7:0]  ledg;
  logic [7:0]  lcd_data;
  logic lcd_rs, lcd_rw, lcd_en, lcd_on, lcd_blon;
  logic [127:0] line1, line2;
  int frames, writes;
  int checks = 0, failures = 0;

  ann_char_rec_top dut (
    .clk, .rst_n, .train_btn, .sw, .ledr, .ledg,
    .lcd_data, .lcd_rs, .lcd_rw, .lcd_en, .lcd_on, .lcd_blon);
  hd44780_model lcd (
    .data(lcd_data), .rs(lcd_rs), .rw(lcd_rw), .en(lcd_en),
    .line1, .line2, .frames, .writes);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (30_000_000) @(posedge clk);
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

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(ledg[6], "training starts after reset");
    wait (!ledg[6]);
    $display("training: converged=%0b after %0d epochs", ledg[7], dut.epoch);
    check(ledg[7], "training converged");
    repeat (2000) @(posedge clk);
    for (int p = 0; p < 29; p++) begin
      sw = pattern_of(p);
      lat = 0;
      while (!(ledg[5] && int'(ledg[4:0]) == p) && lat < 2000) begin
        @(posedge clk);
        lat++;
      end
      check(int'(ledg[4:0]) == p, $sformatf("pattern %0d shown as class %0d", p, ledg[4:0]));
      check(lat == 773, $sformatf("pattern %0d: result after %0d clocks", p, lat));
      if (p == 0 || p == 19 || p == 28) begin
        wait_frames(2);
        check(line1 == text16("RECOGNISED:") &&
              line2 == text16($sformatf("CLASS %02d: %s", p, name_of(p))),
              $sformatf("LCD shows '%s' / '%s' for class %0d", line1, line2, p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
