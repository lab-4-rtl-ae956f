// dec247: BCD to 7-segment decoder with active-low outputs, with the
// behaviour of the 74LS247; drives the ACC and PC displays.
//
// seg_n = {g, f, e, d, c, b, a}, a low bit lights the segment. Digits 0-9
// use the 247's style (6 and 9 with tails); codes 10-14 give the family's
// fixed special glyphs and 15 is blank, so every 4-bit ACC or PC value has
// a distinct pattern. lt_n low lights every segment, bi_n low blanks the
// display (blanking wins). Ripple blanking is not modelled. Combinational.
module dec247 (
  input  logic [3:0] bcd,
  input  logic       lt_n,
  input  logic       bi_n,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (bcd)
      4'd0:  seg = 7'b011_1111;
      4'd1:  seg = 7'b000_0110;
      4'd2:  seg = 7'b101_1011;
      4'd3:  seg = 7'b100_1111;
      4'd4:  seg = 7'b110_0110;
      4'd5:  seg = 7'b110_1101;
      4'd6:  seg = 7'b111_1101;
      4'd7:  seg = 7'b000_0111;
      4'd8:  seg = 7'b111_1111;
      4'd9:  seg = 7'b110_1111;
      4'd10: seg = 7'b101_1000;  // d e g
      4'd11: seg = 7'b100_1100;  // c d g
      4'd12: seg = 7'b110_0010;  // b f g
      4'd13: seg = 7'b110_1001;  // a d f g
      4'd14: seg = 7'b111_1000;  // d e f g
      default: seg = 7'b000_0000; // 15: blank
    endcase
    if (!bi_n)      seg = 7'b000_0000;
    else if (!lt_n) seg = 7'b111_1111;
    seg_n = ~seg;
  end

endmodule
