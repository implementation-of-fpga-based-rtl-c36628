// switch_input: brings the 16 toggle switches that draw the 4x4 grid into
// the clock domain and reports every change of the grid.
//
// Two flip-flop stages per switch remove metastability; a third register
// holds the previous grid so that a change gives a one-cycle pulse. Toggle
// switch bounce only produces extra change pulses, each of which simply
// starts a new classification. The synchroniser is this design's choice.
//
// Timing: grid follows sw two clocks later; changed is high in the cycle
// in which grid differs from its value one cycle before.
module switch_input #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] sw,
  output logic [N-1:0] grid,
  output logic         changed
);

  logic [N-1:0] meta, prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      grid <= '0;
      prev <= '0;
    end else begin
      meta <= sw;
      grid <= meta;
      prev <= grid;
    end
  end

  assign changed = (grid != prev);

endmodule
