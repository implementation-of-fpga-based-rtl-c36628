// weight_ram: weight memory of one network layer, a simple dual-port RAM with
// one write port and one registered read port.
//
// Written as an array so that FPGA tools map it to block RAM. A read returns
// the word at raddr on the clock edge after raddr is presented. A write to
// the address being read in the same cycle returns the old word. Storing each
// layer's weights in its own RAM is this design's choice.
//
// Timing: write at the rising edge when we = 1; rdata valid one cycle after
// raddr.
module weight_ram #(
  parameter int unsigned DEPTH = 272,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
