// lfsr_weight_init: pseudo-random starting weights for the network.
//
// A 32-bit Galois linear-feedback shift register (polynomial
// x^32 + x^22 + x^2 + x + 1, maximal length) advances once per step. Its
// state is turned into a single-precision weight with a random sign, an
// exponent of 124 or 125 and a random 23-bit fraction, i.e. a magnitude in
// [0.125, 0.5). Using an LFSR for initial weights follows the design's list
// of parts; the polynomial, seed and weight range are this design's choice.
//
// Timing: the state resets to SEED; weight reflects the current state and
// changes on the clock edge after step = 1.
module lfsr_weight_init #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [31:0] weight
);

  localparam logic [31:0] TAPS = 32'h8020_0003;  // x^32 + x^22 + x^2 + x + 1

  logic [31:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= (SEED == '0) ? 32'd1 : SEED;
    else if (step)
      state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
  end

  assign weight = {state[31], 7'b0111_110, state[30], state[22:0]};

endmodule
