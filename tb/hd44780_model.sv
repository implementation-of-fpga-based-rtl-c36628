// hd44780_model: behavioural model of a 2x16 HD44780-type character LCD,
// enough for the testbenches: it latches rs/data on each falling edge of
// en, executes clear (0x01) and set-address commands (0x80 | addr, line 2
// starting at 0x40), ignores other commands, and writes data bytes at the
// cursor, which then advances. line1/line2 hold the displayed text,
// first character in the top byte. frames counts writes to the last cell
// of line 2, i.e. completed refreshes by a controller that writes in order.
module hd44780_model (
  input  logic [7:0] data,
  input  logic       rs,
  input  logic       rw,
  input  logic       en,
  output logic [127:0] line1,
  output logic [127:0] line2,
  output int           frames,
  output int           writes
);
  logic [6:0] addr = '0;

  initial begin
    line1  = {16{8'h20}};
    line2  = {16{8'h20}};
    frames = 0;
    writes = 0;
  end

  always @(negedge en) if (!rw) begin
    writes++;
    if (!rs) begin
      if (data == 8'h01) begin
        line1 = {16{8'h20}};
        line2 = {16{8'h20}};
        addr  = '0;
      end else if (data[7]) begin
        addr = data[6:0];
      end
    end else begin
      if (addr < 7'd16)                       line1[127 - 8*addr -: 8] = data;
      else if (addr >= 7'h40 && addr < 7'h50) line2[127 - 8*(addr - 7'h40) -: 8] = data;
      if (addr == 7'h4F) frames++;
      addr = addr + 7'd1;
    end
  end
endmodule
