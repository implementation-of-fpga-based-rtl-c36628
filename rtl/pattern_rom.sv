// pattern_rom: the training set of the recogniser, 29 character bitmaps on a
// 4x4 grid, and the name of each class as shown on the display.
//
// Classes 0..19 are the English letters A..T, classes 20..28 the Arabic
// letters alif, ba, ta, tha, jim, ha, kha, dal and dhal. The grid is packed
// row by row, top row first: pattern[15:12] is the top row with bit 15 at the
// left, pattern[3:0] the bottom row. The numbers of letters follow the
// design description; which letters and their bitmaps are this design's own.
// The names are eight ASCII characters, left aligned and padded with spaces
// (Arabic letters are spelled out, the display has no Arabic glyphs).
//
// Interface: combinational lookup; an index of N_PAT or above returns an
// empty grid and a blank name.
module pattern_rom #(
  parameter int unsigned N_PAT = 29
) (
  input  logic [4:0]    idx,
  output logic [15:0]   pattern,
  output logic [63:0]   name
);

  always_comb begin
    pattern = 16'd0;
    name    = "        ";
    if (32'(idx) < N_PAT) begin
      unique case (idx)
      5'd0 : begin pattern = 16'b0110_1001_1111_1001; name = "A       "; end
      5'd1 : begin pattern = 16'b1110_1111_1001_1110; name = "B       "; end
      5'd2 : begin pattern = 16'b0111_1000_1000_0111; name = "C       "; end
      5'd3 : begin pattern = 16'b1110_1001_1001_1110; name = "D       "; end
      5'd4 : begin pattern = 16'b1111_1110_1000_1111; name = "E       "; end
      5'd5 : begin pattern = 16'b1111_1000_1110_1000; name = "F       "; end
      5'd6 : begin pattern = 16'b0111_1000_1011_0111; name = "G       "; end
      5'd7 : begin pattern = 16'b1001_1111_1001_1001; name = "H       "; end
      5'd8 : begin pattern = 16'b1110_0100_0100_1110; name = "I       "; end
      5'd9 : begin pattern = 16'b0111_0010_1010_0100; name = "J       "; end
      5'd10: begin pattern = 16'b1001_1010_1110_1001; name = "K       "; end
      5'd11: begin pattern = 16'b1000_1000_1000_1111; name = "L       "; end
      5'd12: begin pattern = 16'b1001_1111_1111_1001; name = "M       "; end
      5'd13: begin pattern = 16'b1001_1101_1011_1001; name = "N       "; end
      5'd14: begin pattern = 16'b1111_1001_1001_1111; name = "O       "; end
      5'd15: begin pattern = 16'b1110_1001_1110_1000; name = "P       "; end
      5'd16: begin pattern = 16'b1111_1001_1011_1111; name = "Q       "; end
      5'd17: begin pattern = 16'b1110_1001_1110_1001; name = "R       "; end
      5'd18: begin pattern = 16'b0111_1100_0011_1110; name = "S       "; end
      5'd19: begin pattern = 16'b1111_0100_0100_0100; name = "T       "; end
      5'd20: begin pattern = 16'b0100_0100_0100_0100; name = "ALIF    "; end
      5'd21: begin pattern = 16'b0000_1001_1111_0100; name = "BA      "; end
      5'd22: begin pattern = 16'b1010_0000_1001_1111; name = "TA      "; end
      5'd23: begin pattern = 16'b0100_1010_1001_1111; name = "THA     "; end
      5'd24: begin pattern = 16'b1110_0010_1100_0111; name = "JIM     "; end
      5'd25: begin pattern = 16'b1110_0010_1100_0011; name = "HA      "; end
      5'd26: begin pattern = 16'b0010_1110_0100_0011; name = "KHA     "; end
      5'd27: begin pattern = 16'b0100_0010_0010_1110; name = "DAL     "; end
      5'd28: begin pattern = 16'b1000_0010_0010_1110; name = "DHAL    "; end
        default: begin pattern = 16'd0; name = "        "; end
      endcase
    end
  end

endmodule
