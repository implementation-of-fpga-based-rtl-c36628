// ann_core: three-layer perceptron (input, hidden, output) in IEEE-754 single
// precision, with forward propagation, arg-max classification and one step
// of on-line back-propagation training.
//
// How it works. All arithmetic goes through one multiply-add unit,
// y = c + a*b, stepped once per clock, so every neuron of both layers is
// computed in turn (time multiplexed). Weights live in two RAMs with a
// registered read: W1 holds N_H rows of N_I+1 words (input weights, then the
// bias weight), W2 holds N_O rows of N_H+1 words. A two-stage loop issues one
// RAM address per clock (stage 0) and consumes the word one clock later
// (stage 1); at the end of each row the activation or the delta of that
// neuron is stored. A command runs these phases:
//   PH_FH   hidden net inputs, h = sigmoid(W1 * [x,1])           N_H*(N_I+1) clocks
//   PH_FO   output net inputs, o = sigmoid(W2 * [h,1]); running arg-max;
//           when training, output deltas d2 = (t-o)*o*(1-o)       N_O*(N_H+1)
//   PH_BH   hidden deltas d1 = (W2^T d2) * h*(1-h)                N_H*N_O
//   PH_UW2  W2 += ETA * d2 * [h,1]   (read-modify-write)          N_O*(N_H+1)
//   PH_UW1  W1 += ETA * d1 * [x,1]                                N_H*(N_I+1)
// Each phase adds one clock to drain the pipeline, and PH_DONE one more.
// The target vector t is 0.9 for the target class and 0.1 elsewhere.
// The hidden deltas use W2 before its update. A recognition command runs
// PH_FH and PH_FO only. PH_INIT fills W1 then W2 with LFSR weights, one word
// per clock.
//
// From the design description: 16 binary inputs, a three-layer network,
// 29 classes, single-precision arithmetic, the most probable class as the
// answer, training by back propagation, random initial weights from an
// LFSR. This design's own choices: the hidden size N_H, one output neuron
// per class, bias weights, learning rate ETA, the logistic activation in a
// piecewise-linear form, per-pattern (on-line) updates and the single shared
// multiply-add.
//
// Interface. Commands are accepted only while busy = 0: init_start runs
// PH_INIT; start runs a forward pass on x, followed by training towards class
// target when train = 1. done pulses for one clock when a command ends;
// class_out / class_score then hold the winning output neuron and its value
// (the forward pass before any update), and stay until the next pass.
module ann_core
  import ann_pkg::*;
#(
  parameter int unsigned N_I = 16,
  parameter int unsigned N_H = 16,
  parameter int unsigned N_O = 29,
  parameter fp32_t       ETA = 32'h3F80_0000,          // learning rate 1.0
  parameter logic [31:0] SEED = 32'hACE1_2468,
  localparam int unsigned CW  = (N_O > 1) ? $clog2(N_O) : 1,
  localparam int unsigned D1  = N_H * (N_I + 1),
  localparam int unsigned D2  = N_O * (N_H + 1),
  localparam int unsigned A1W = $clog2(D1),
  localparam int unsigned A2W = $clog2(D2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init_start,
  input  logic           start,
  input  logic           train,
  input  logic [N_I-1:0] x,
  input  logic [CW-1:0]  target,
  output logic           busy,
  output logic           done,
  output logic [CW-1:0]  class_out,
  output fp32_t          class_score,
  output phase_e         phase
);

  // ---------------------------------------------------------------- state
  logic [N_I-1:0] x_q;
  logic [CW-1:0]  target_q;
  logic           train_q;
  fp32_t          hvec [N_H];
  fp32_t          d1   [N_H];
  fp32_t          d2   [N_O];
  fp32_t          acc;
  fp32_t          best;
  logic [CW-1:0]  best_idx;

  // Stage 0: issue counters.
  logic [7:0]     r, c;
  logic           issuing;
  logic [15:0]    init_n;
  // Stage 1: the element whose RAM word is arriving.
  logic           v1;
  logic [7:0]     r1, c1;
  logic           row_end1, phase_end1;
  logic [A1W-1:0] addr1_q;
  logic [A2W-1:0] addr2_q;

  // Rows and columns of the current phase.
  logic [7:0] rows, cols;
  always_comb begin
    unique case (phase)
      PH_FH, PH_UW1: begin rows = 8'(N_H); cols = 8'(N_I + 1); end
      PH_FO, PH_UW2: begin rows = 8'(N_O); cols = 8'(N_H + 1); end
      PH_BH:         begin rows = 8'(N_H); cols = 8'(N_O);     end
      default:       begin rows = 8'd1;    cols = 8'd1;        end
    endcase
  end

  // ---------------------------------------------------------------- RAMs
  logic           we1, we2;
  logic [A1W-1:0] raddr1, waddr1;
  logic [A2W-1:0] raddr2, waddr2;
  fp32_t          q1, q2, wdata, lfsr_w;

  always_comb begin
    raddr1 = A1W'(32'(r) * (N_I + 1) + 32'(c));
    if (phase == PH_BH) raddr2 = A2W'(32'(c) * (N_H + 1) + 32'(r));
    else                raddr2 = A2W'(32'(r) * (N_H + 1) + 32'(c));
  end

  weight_ram #(.DEPTH(D1), .WIDTH(32)) u_w1 (
    .clk(clk), .we(we1), .waddr(waddr1), .wdata(wdata),
    .raddr(raddr1), .rdata(q1));
  weight_ram #(.DEPTH(D2), .WIDTH(32)) u_w2 (
    .clk(clk), .we(we2), .waddr(waddr2), .wdata(wdata),
    .raddr(raddr2), .rdata(q2));

  logic lfsr_step;
  assign lfsr_step = (phase == PH_INIT);
  lfsr_weight_init #(.SEED(SEED)) u_lfsr (
    .clk(clk), .rst_n(rst_n), .step(lfsr_step), .weight(lfsr_w));

  // ---------------------------------------------------------------- datapath
  fp32_t mac_a, mac_b, mac_c, mac_y;
  fp32_t eta_d, delta_src;
  fp32_t act_y;
  fp32_t dl_y, dl_err, dl_out;
  fp32_t target_val, neg_o_err;

  fp32_mac u_mac (.a(mac_a), .b(mac_b), .c(mac_c), .y(mac_y));
  fp32_mul u_eta (.a(ETA), .b(delta_src), .y(eta_d));
  sigmoid_pla u_act (.x(mac_y), .y(act_y));
  fp32_add u_err (.a(target_val), .b({~act_y[31], act_y[30:0]}), .y(neg_o_err));
  bp_delta u_delta (.y(dl_y), .err(dl_err), .delta(dl_out));

  always_comb begin
    mac_a      = q1;
    mac_b      = FP_ZERO;
    mac_c      = (c1 == 8'd0) ? FP_ZERO : acc;
    delta_src  = (phase == PH_UW2) ? d2[32'(r1) % N_O] : d1[32'(r1) % N_H];
    target_val = (32'(r1) == 32'(target_q)) ? FP_T_HI : FP_T_LO;
    dl_y       = act_y;
    dl_err     = neg_o_err;
    unique case (phase)
      PH_FH: begin
        mac_a = q1;
        mac_b = (32'(c1) >= N_I) ? FP_ONE : (x_q[32'(c1) % N_I] ? FP_ONE : FP_ZERO);
      end
      PH_FO: begin
        mac_a = q2;
        mac_b = (32'(c1) >= N_H) ? FP_ONE : hvec[32'(c1) % N_H];
      end
      PH_BH: begin
        mac_a  = q2;
        mac_b  = d2[32'(c1) % N_O];
        dl_y   = hvec[32'(r1) % N_H];
        dl_err = mac_y;
      end
      PH_UW2: begin
        mac_a = eta_d;
        mac_b = (32'(c1) >= N_H) ? FP_ONE : hvec[32'(c1) % N_H];
        mac_c = q2;
      end
      PH_UW1: begin
        mac_a = eta_d;
        mac_b = (32'(c1) >= N_I) ? FP_ONE : (x_q[32'(c1) % N_I] ? FP_ONE : FP_ZERO);
        mac_c = q1;
      end
      default: ;
    endcase
  end

  // Write ports: initial fill, or write-back of updated weights in stage 1.
  always_comb begin
    we1    = 1'b0;
    we2    = 1'b0;
    waddr1 = addr1_q;
    waddr2 = addr2_q;
    wdata  = mac_y;
    if (phase == PH_INIT) begin
      wdata  = lfsr_w;
      waddr1 = A1W'(init_n);
      waddr2 = A2W'(32'(init_n) - D1);
      we1    = 32'(init_n) < D1;
      we2    = !we1;
    end else if (v1) begin
      we1 = (phase == PH_UW1);
      we2 = (phase == PH_UW2);
    end
  end

  // ---------------------------------------------------------------- control
  function automatic phase_e next_phase(phase_e p, logic trn);
    unique case (p)
      PH_FH:   return PH_FO;
      PH_FO:   return trn ? PH_BH : PH_DONE;
      PH_BH:   return PH_UW2;
      PH_UW2:  return PH_UW1;
      default: return PH_DONE;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      x_q         <= '0;
      target_q    <= '0;
      train_q     <= 1'b0;
      acc         <= FP_ZERO;
      best        <= FP_ZERO;
      best_idx    <= '0;
      class_out   <= '0;
      class_score <= FP_ZERO;
      r           <= '0;
      c           <= '0;
      issuing     <= 1'b0;
      init_n      <= '0;
      v1          <= 1'b0;
      r1          <= '0;
      c1          <= '0;
      row_end1    <= 1'b0;
      phase_end1  <= 1'b0;
      addr1_q     <= '0;
      addr2_q     <= '0;
      done        <= 1'b0;
      for (int i = 0; i < N_H; i++) begin
        hvec[i] <= FP_ZERO;
        d1[i]   <= FP_ZERO;
      end
      for (int k = 0; k < N_O; k++) d2[k] <= FP_ZERO;
    end else begin
      done <= 1'b0;

      // Stage 0: issue one address per clock.
      v1 <= issuing;
      if (issuing) begin
        r1         <= r;
        c1         <= c;
        addr1_q    <= raddr1;
        addr2_q    <= raddr2;
        row_end1   <= (c == cols - 8'd1);
        phase_end1 <= (c == cols - 8'd1) && (r == rows - 8'd1);
        if (c == cols - 8'd1) begin
          c <= '0;
          if (r == rows - 8'd1) begin
            r       <= '0;
            issuing <= 1'b0;
          end else begin
            r <= r + 8'd1;
          end
        end else begin
          c <= c + 8'd1;
        end
      end

      // Stage 1: consume the RAM word.
      if (v1) begin
        acc <= mac_y;
        if (row_end1) begin
          unique case (phase)
            PH_FH: hvec[32'(r1) % N_H] <= act_y;
            PH_FO: begin
              if (r1 == 8'd0 || fp_gt(act_y, best)) begin
                best     <= act_y;
                best_idx <= CW'(r1);
              end
              if (train_q) d2[32'(r1) % N_O] <= dl_out;
            end
            PH_BH: d1[32'(r1) % N_H] <= dl_out;
            default: ;
          endcase
        end
        if (phase_end1) begin
          if (phase == PH_FO) begin
            // The last output may still win the arg-max in this cycle.
            if (fp_gt(act_y, best)) begin
              class_out   <= CW'(r1);
              class_score <= act_y;
            end else begin
              class_out   <= best_idx;
              class_score <= best;
            end
          end
          phase   <= next_phase(phase, train_q);
          issuing <= next_phase(phase, train_q) != PH_DONE;
        end
      end

      unique case (phase)
        PH_IDLE: begin
          if (init_start) begin
            phase  <= PH_INIT;
            init_n <= '0;
          end else if (start) begin
            phase    <= PH_FH;
            x_q      <= x;
            target_q <= target;
            train_q  <= train;
            issuing  <= 1'b1;
            r        <= '0;
            c        <= '0;
          end
        end
        PH_INIT: begin
          init_n <= init_n + 16'd1;
          if (32'(init_n) == D1 + D2 - 1) phase <= PH_DONE;
        end
        PH_DONE: begin
          done  <= 1'b1;
          phase <= PH_IDLE;
        end
        default: ;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

  // A training target must name an existing class.
  a_target_range: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_IDLE && start && train && !init_start) |-> (32'(target) < N_O));
  // Commands are only taken while idle; the stage-1 pipeline is empty then.
  a_idle_empty: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_IDLE) |-> (!v1 && !issuing));

endmodule
