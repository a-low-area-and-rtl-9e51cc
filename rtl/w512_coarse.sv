// w512_coarse: coarse stage of the cascade W512 multiplier, multiplies both
// parts a and b of d = a + jb by W512^(8*i1), i1 = 0..8 (angles 0..45 deg in
// steps of 5.625 deg).
//
// The real operands a and b are kept apart: the outputs are the complex
// numbers A = a * W512^(8*i1) and B = b * W512^(8*i1), so that the final
// mapping block can still apply the octant symmetry (which needs a and b
// separately). Each operand has one csd_sel_mult, which forms its shared
// subexpressions once and gives operand*cos and operand*sin of the angle
// selected by i1; with W512^(8*i1) = cos - j*sin:
//   A = a*cos - j*a*sin,  B = b*cos - j*b*sin.
// The constants are round(cos/sin(2*pi*8*i1/512) * 2^12). Purely
// combinational.
module w512_coarse #(
  parameter int W = 16   // operand bits
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic [3:0]          i1,      // 0..8
  output logic signed [W:0]   ar, ai,  // A = a * W512^(8*i1)
  output logic signed [W:0]   br, bi   // B = b * W512^(8*i1)
);
  logic signed [W:0] ac, as_, bc, bs;

  csd_sel_mult #(.W(W), .SET(0)) u_a (.d(a), .idx(i1), .pc(ac), .ps(as_));
  csd_sel_mult #(.W(W), .SET(0)) u_b (.d(b), .idx(i1), .pc(bc), .ps(bs));

  assign ar = ac;
  assign ai = -as_;
  assign br = bc;
  assign bi = -bs;
endmodule
