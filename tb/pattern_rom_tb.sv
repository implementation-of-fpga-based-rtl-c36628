// pattern_rom_tb: checks the 29 stored character bitmaps and names against
// a table kept in the testbench, that all bitmaps differ, and that indices
// beyond the last class return an empty grid and a blank name.
module pattern_rom_tb;
  logic [4:0] idx;
  logic [15:0] pattern;
  logic [63:0] name;
  int checks = 0, failures = 0;

  pattern_rom dut (.idx, .pattern, .name);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] t [29] = '{
    16'h69F9, 16'hEF9E, 16'h7887, 16'hE99E, 16'hFE8F, 16'hF8E8, 16'h78B7, 16'h9F99,
    16'hE44E, 16'h72A4, 16'h9AE9, 16'h888F, 16'h9FF9, 16'h9DB9, 16'hF99F, 16'hE9E8,
    16'hF9BF, 16'hE9E9, 16'h7C3E, 16'hF444, 16'h4444, 16'h09F4, 16'hA09F, 16'h4A9F,
    16'hE2C7, 16'hE2C3, 16'h2E43, 16'h422E, 16'h822E};
  string n [29] = '{"A", "B", "C", "D", "E", "F", "G", "H", "I", "J", "K", "L", "M",
                    "N", "O", "P", "Q", "R", "S", "T", "ALIF", "BA", "TA", "THA",
                    "JIM", "HA", "KHA", "DAL", "DHAL"};

  function automatic logic [63:0] pad8(string s);
    logic [63:0] r = {8{8'h20}};
    for (int i = 0; i < s.len(); i++) r[63 - 8*i -: 8] = s[i];
    return r;
  endfunction

  initial begin
    logic [15:0] seen [29];
    for (int p = 0; p < 29; p++) begin
      idx = 5'(p);
      #1;
      checks++;
      if (pattern !== t[p] || name !== pad8(n[p])) begin
        failures++;
        $display("class %0d: %h '%s', expected %h '%s'", p, pattern, name, t[p], n[p]);
      end
      seen[p] = pattern;
      for (int q = 0; q < p; q++) begin
        checks++;
        if (seen[q] == pattern) begin
          failures++;
          $display("classes %0d and %0d share a bitmap", q, p);
        end
      end
    end
    for (int p = 29; p < 32; p++) begin
      idx = 5'(p);
      #1;
      checks++;
      if (pattern !== 16'd0 || name !== pad8("")) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
