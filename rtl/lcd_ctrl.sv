// lcd_ctrl: writes a 2x16 character text buffer to an HD44780-type
// character LCD (the kind fitted to Altera DE2 boards), 8-bit bus, write
// only.
//
// After a power-on wait of T_PWR clocks it sends the set-up commands
// 0x38 (8-bit bus, two lines, 5x8 font), 0x0C (display on, no cursor),
// 0x01 (clear) and 0x06 (increment, no shift). It then refreshes the
// display for ever: 0x80 (cursor to line 1), the 16 characters of line 1,
// 0xC0 (cursor to line 2), the 16 characters of line 2. Characters are
// taken from text when they are sent, so the display follows changes of the
// buffer within one refresh. Each transfer holds lcd_rs/lcd_data stable for
// T_EN clocks, raises lcd_en for T_EN clocks, lowers it and then waits
// T_CMD clocks (T_CLR after the clear command) for the display to finish.
// The defaults are for a 50 MHz clock: 320 ns enable pulse, 50 us per
// transfer, 2 ms after a clear, 20 ms power-on wait. Only the fact that the
// recognised class is shown on an LCD comes from the design description;
// the controller is this design's own.
//
// Interface: text[255:248] is the first character of line 1,
// text[127:120] the first of line 2. lcd_rw is always 0, lcd_on and
// lcd_blon always 1.
module lcd_ctrl #(
  parameter int unsigned T_PWR = 1_000_000,
  parameter int unsigned T_EN  = 16,
  parameter int unsigned T_CMD = 2_500,
  parameter int unsigned T_CLR = 100_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [255:0] text,
  output logic [7:0]   lcd_data,
  output logic         lcd_rs,
  output logic         lcd_rw,
  output logic         lcd_en,
  output logic         lcd_on,
  output logic         lcd_blon
);

  typedef enum logic [1:0] {L_PWR, L_SETUP, L_PULSE, L_WAIT} lstate_e;

  localparam int unsigned SEQ_LOOP = 4;    // first step of the refresh loop
  localparam int unsigned SEQ_LAST = 37;

  lstate_e     state;
  logic [5:0]  seq;
  logic [31:0] cnt;
  logic [5:0]  seq_next;
  logic [8:0]  word_now, word_next;   // {rs, data} of steps seq and seq_next
  logic        wait_over;

  // Register select and data byte sent by step s.
  function automatic logic [8:0] step_word(logic [5:0] s, logic [255:0] t);
    unique case (s)
      6'd0:    return {1'b0, 8'h38};
      6'd1:    return {1'b0, 8'h0C};
      6'd2:    return {1'b0, 8'h01};
      6'd3:    return {1'b0, 8'h06};
      6'd4:    return {1'b0, 8'h80};
      6'd21:   return {1'b0, 8'hC0};
      default: begin
        if (s < 6'd21) return {1'b1, t[8'd255 - 8'(s - 6'd5) * 8'd8 -: 8]};
        else           return {1'b1, t[8'd127 - 8'(s - 6'd22) * 8'd8 -: 8]};
      end
    endcase
  endfunction

  always_comb begin
    seq_next  = (32'(seq) == SEQ_LAST) ? 6'(SEQ_LOOP) : seq + 6'd1;
    word_now  = step_word(seq, text);
    word_next = step_word(seq_next, text);
    wait_over = cnt >= ((seq == 6'd2) ? T_CLR : T_CMD) - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_PWR;
      seq      <= '0;
      cnt      <= '0;
      lcd_data <= '0;
      lcd_rs   <= 1'b0;
      lcd_en   <= 1'b0;
    end else begin
      cnt <= cnt + 32'd1;
      unique case (state)
        L_PWR: if (cnt >= T_PWR - 1) begin
          state              <= L_SETUP;
          cnt                <= '0;
          {lcd_rs, lcd_data} <= word_now;
        end
        L_SETUP: if (cnt >= T_EN - 1) begin
          state  <= L_PULSE;
          cnt    <= '0;
          lcd_en <= 1'b1;
        end
        L_PULSE: if (cnt >= T_EN - 1) begin
          state  <= L_WAIT;
          cnt    <= '0;
          lcd_en <= 1'b0;
        end
        L_WAIT: if (wait_over) begin
          state              <= L_SETUP;
          cnt                <= '0;
          seq                <= seq_next;
          {lcd_rs, lcd_data} <= word_next;
        end
        default: state <= L_PWR;
      endcase
    end
  end

  assign lcd_rw   = 1'b0;
  assign lcd_on   = 1'b1;
  assign lcd_blon = 1'b1;

endmodule
