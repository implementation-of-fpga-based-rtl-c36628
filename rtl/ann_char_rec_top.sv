// ann_char_rec_top: character recogniser for a 4x4 grid drawn on 16 toggle
// switches, built around a single-precision three-layer neural network.
//
// After reset (and again whenever train_btn is pressed) the training
// supervisor fills the network with random weights and trains it by back
// propagation on the 29 stored characters (20 English, 9 Arabic letters)
// until it recognises all of them or gives up after MAX_EPOCHS epochs.
// From then on every change of the switches starts a forward pass on the
// grid, and the most probable class is shown on the character LCD (class
// number and letter name) and on the green LEDs. During training the LCD
// shows the number of epochs run and the errors of the last one (hex).
//
// Blocks: switch_input (synchroniser, change detect), train_supervisor
// (with the pattern ROM), ann_core (network, weight RAMs, LFSR), a second
// pattern_rom for the class names, lcd_ctrl. The core takes commands from
// the supervisor while training and from the recognition logic here
// otherwise. The overall function (switches in, trained network, LCD out)
// follows the design description; the board-level details are this
// design's own.
//
// Ports: clk is the 50 MHz board clock, rst_n an active-low reset,
// train_btn an active-high request to retrain (synchronised here).
// sw[15:12] is the top row of the grid, sw[15] its left cell. ledr echoes
// the grid; ledg[4:0] = recognised class, ledg[5] = a result is shown,
// ledg[6] = training, ledg[7] = last training converged. lcd_* go to the
// display. A recognition takes 768 clocks (about 15 us at 50 MHz) from the
// switch change seen by the core; one training epoch takes 29*2001 clocks.
module ann_char_rec_top
  import ann_pkg::*;
#(
  parameter int unsigned N_H        = 16,
  parameter fp32_t       ETA        = 32'h3F80_0000,
  parameter int unsigned MAX_EPOCHS = 1000,
  parameter int unsigned T_PWR      = 1_000_000,
  parameter int unsigned T_EN       = 16,
  parameter int unsigned T_CMD      = 2_500,
  parameter int unsigned T_CLR      = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        train_btn,
  input  logic [15:0] sw,
  output logic [15:0] ledr,
  output logic [7:0]  ledg,
  output logic [7:0]  lcd_data,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_en,
  output logic        lcd_on,
  output logic        lcd_blon
);

  // ------------------------------------------------------------ inputs
  logic [15:0] grid;
  logic        grid_changed;

  switch_input #(.N(16)) u_sw (
    .clk(clk), .rst_n(rst_n), .sw(sw), .grid(grid), .changed(grid_changed));

  logic [2:0] btn_sync;
  logic       boot;          // one training run right after reset
  logic       train_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_sync <= '0;
      boot     <= 1'b1;
    end else begin
      btn_sync <= {btn_sync[1:0], train_btn};
      boot     <= 1'b0;
    end
  end
  assign train_req = boot || (btn_sync[1] && !btn_sync[2]);

  // ------------------------------------------------------------ training
  logic        sup_init, sup_start, sup_train;
  logic [15:0] sup_x;
  logic [4:0]  sup_target;
  logic        training, trained;
  logic [15:0] epoch;
  logic [4:0]  epoch_errors;

  logic        core_busy, core_done;
  logic [4:0]  core_class;
  fp32_t       core_score;
  phase_e      core_phase;

  train_supervisor #(.N_PAT(N_CLASSES), .MAX_EPOCHS(MAX_EPOCHS)) u_sup (
    .clk(clk), .rst_n(rst_n), .start(train_req),
    .core_init(sup_init), .core_start(sup_start), .core_train(sup_train),
    .core_x(sup_x), .core_target(sup_target),
    .core_busy(core_busy), .core_done(core_done), .core_class(core_class),
    .training(training), .trained(trained), .epoch(epoch),
    .epoch_errors(epoch_errors));

  // ------------------------------------------------------------ recognition
  logic        pending;      // the grid has not been classified yet
  logic        in_flight;    // a recognition command is running
  logic        rec_start;
  logic        result_valid;
  logic [4:0]  result_class;
  logic        training_d;

  assign rec_start = !training && pending && !core_busy && !in_flight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= 1'b0;
      in_flight    <= 1'b0;
      result_valid <= 1'b0;
      result_class <= '0;
      training_d   <= 1'b0;
    end else begin
      training_d <= training;
      if (training) begin
        result_valid <= 1'b0;
        in_flight    <= 1'b0;
      end
      if (rec_start) begin
        pending   <= 1'b0;
        in_flight <= 1'b1;
      end
      // A new grid, or the end of training, asks for a classification.
      if (grid_changed || (training_d && !training)) pending <= 1'b1;
      if (in_flight && core_done) begin
        in_flight    <= 1'b0;
        result_valid <= 1'b1;
        result_class <= core_class;
      end
    end
  end

  ann_core #(.N_I(N_INPUTS), .N_H(N_H), .N_O(N_CLASSES), .ETA(ETA)) u_core (
    .clk(clk), .rst_n(rst_n),
    .init_start(training ? sup_init : 1'b0),
    .start(training ? sup_start : rec_start),
    .train(training ? sup_train : 1'b0),
    .x(training ? sup_x : grid),
    .target(sup_target),
    .busy(core_busy), .done(core_done),
    .class_out(core_class), .class_score(core_score), .phase(core_phase));

  // ------------------------------------------------------------ display
  logic [15:0] unused_pattern;
  logic [63:0] class_name;

  pattern_rom #(.N_PAT(N_CLASSES)) u_names (
    .idx(result_class), .pattern(unused_pattern), .name(class_name));

  function automatic logic [7:0] hex_char(logic [3:0] v);
    return (v < 4'd10) ? 8'h30 + 8'(v) : 8'h37 + 8'(v);
  endfunction

  logic [127:0] line1, line2;
  logic [7:0]   tens, ones;

  always_comb begin
    tens = 8'h30 + 8'(result_class / 5'd10);
    ones = 8'h30 + 8'(result_class % 5'd10);
    if (training)      line1 = "TRAINING...     ";
    else if (trained)  line1 = "RECOGNISED:     ";
    else               line1 = "NOT CONVERGED   ";
    if (training)
      line2 = {"EPOCH ", hex_char(epoch[15:12]), hex_char(epoch[11:8]),
               hex_char(epoch[7:4]), hex_char(epoch[3:0]), " E=",
               hex_char({3'b000, epoch_errors[4]}), hex_char(epoch_errors[3:0]), " "};
    else if (result_valid)
      line2 = {"CLASS ", tens, ones, ": ", class_name[63:16]};
    else
      line2 = "                ";
  end

  lcd_ctrl #(.T_PWR(T_PWR), .T_EN(T_EN), .T_CMD(T_CMD), .T_CLR(T_CLR)) u_lcd (
    .clk(clk), .rst_n(rst_n), .text({line1, line2}),
    .lcd_data(lcd_data), .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_en(lcd_en),
    .lcd_on(lcd_on), .lcd_blon(lcd_blon));

  assign ledr = grid;
  assign ledg = {trained, training, result_valid, result_class};

endmodule
