// csd_w32_bank: multiplies one real operand d by the eight constants
// Re{W32^m} = cos(pi*m/16), m = 0..7, with shifts and adders only.
//
// The constants are the canonic signed digit (CSD) forms of cos(pi*m/16)
// truncated to 11 fractional bits (2048, 2008, 1892, 1702, 1448, 1137, 783 and
// 399 over 2048). Three common subexpressions are formed once and shared:
//   CSE1 = d + d/4,  CSE2 = d - d/4,  CSE3 = d - d/16
// and the products are
//   p0 = d
//   p1 = d - CSE1>>6
//   p2 = d - CSE1>>4 + d>>9
//   p3 = CSE2 + CSE1>>4 + CSE2>>8
//   p4 = CSE2 - d>>4 + CSE1>>6
//   p5 = d>>1 + d>>4 - CSE3>>7
//   p6 = CSE2>>1 + CSE3>>7
//   p7 = CSE2>>2 + CSE3>>7
// which are the article's shift-add equations. Counted one adder per + or -,
// they take 14 adders (the article quotes 13 additions and 16 shifters). Every
// shift is arithmetic and truncates; no guard bits are kept, which is this
// design's choice. p4 alone serves the W8 multiplier, p0/p2/p4/p6 the W16
// multiplier. Purely combinational.
module csd_w32_bank #(
  parameter int W = 16   // operand bits
) (
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] p [8]   // p[m] = d * Re{W32^m}
);
  localparam int IW = W + 2;

  logic signed [IW-1:0] dx, cse1, cse2, cse3;
  logic signed [IW-1:0] q [8];

  assign dx   = IW'(d);
  assign cse1 = dx + (dx >>> 2);
  assign cse2 = dx - (dx >>> 2);
  assign cse3 = dx - (dx >>> 4);

  assign q[0] = dx;
  assign q[1] = dx - (cse1 >>> 6);
  assign q[2] = dx - (cse1 >>> 4) + (dx >>> 9);
  assign q[3] = cse2 + (cse1 >>> 4) + (cse2 >>> 8);
  assign q[4] = cse2 - (dx >>> 4) + (cse1 >>> 6);
  assign q[5] = (dx >>> 1) + (dx >>> 4) - (cse3 >>> 7);
  assign q[6] = (cse2 >>> 1) + (cse3 >>> 7);
  assign q[7] = (cse2 >>> 2) + (cse3 >>> 7);

  // |p[m]| <= |d| for every m, so the top two bits carry no information.
  always_comb begin
    for (int m = 0; m < 8; m++) p[m] = q[m][W-1:0];
  end
endmodule
