// train_supervisor: trains the network on the 29 stored characters.
//
// On start it has the core fill its weights with random values, then runs
// epochs: in each epoch every stored pattern, in class order, is sent to the
// core as a training command (forward pass, then back propagation towards
// its class). The core reports the class it found in the forward pass before
// the update; a pattern whose class was wrong counts as an error of the
// epoch. Training ends after the first epoch without errors (trained = 1),
// or after MAX_EPOCHS epochs (trained = 0). A training supervisor is part
// of the design description; the epoch loop, pattern order and stopping
// rule are this design's choice.
//
// Interface: start is a one-clock request, ignored while training. The
// core_* outputs are the core's command inputs and are meant to be
// connected while training = 1. epoch counts completed epochs and
// epoch_errors holds the error count of the last completed epoch.
module train_supervisor #(
  parameter int unsigned N_PAT      = 29,
  parameter int unsigned MAX_EPOCHS = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  // core command port
  output logic        core_init,
  output logic        core_start,
  output logic        core_train,
  output logic [15:0] core_x,
  output logic [4:0]  core_target,
  input  logic        core_busy,
  input  logic        core_done,
  input  logic [4:0]  core_class,
  // status
  output logic        training,
  output logic        trained,
  output logic [15:0] epoch,
  output logic [4:0]  epoch_errors
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_INIT_WAIT, S_ISSUE, S_WAIT} state_e;

  state_e      state;
  logic [4:0]  pat;
  logic [4:0]  errors;
  logic [63:0] unused_name;

  pattern_rom #(.N_PAT(N_PAT)) u_rom (.idx(pat), .pattern(core_x), .name(unused_name));

  assign core_target = pat;
  assign core_train  = 1'b1;
  assign core_init   = (state == S_INIT) && !core_busy;
  assign core_start  = (state == S_ISSUE) && !core_busy;
  assign training    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      pat          <= '0;
      errors       <= '0;
      epoch        <= '0;
      epoch_errors <= '0;
      trained      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_INIT;
          trained <= 1'b0;
          epoch   <= '0;
        end
        S_INIT: if (!core_busy) state <= S_INIT_WAIT;
        S_INIT_WAIT: if (core_done) begin
          pat    <= '0;
          errors <= '0;
          state  <= S_ISSUE;
        end
        S_ISSUE: if (!core_busy) state <= S_WAIT;
        S_WAIT: if (core_done) begin
          logic [4:0] errs;
          errs = errors + 5'(core_class != pat);
          if (32'(pat) == N_PAT - 1) begin
            epoch        <= epoch + 16'd1;
            epoch_errors <= errs;
            pat          <= '0;
            errors       <= '0;
            if (errs == '0) begin
              trained <= 1'b1;
              state   <= S_IDLE;
            end else if (32'(epoch) + 1 >= MAX_EPOCHS) begin
              state   <= S_IDLE;
            end else begin
              state   <= S_ISSUE;
            end
          end else begin
            pat    <= pat + 5'd1;
            errors <= errs;
            state  <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
