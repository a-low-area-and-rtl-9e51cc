// w512_fine: fine stage of the cascade W512 multiplier, multiplies the two
// complex partial products A and B of the coarse stage by W512^i2, i2 = 0..7
// (angles 0..4.92 deg in steps of 0.703 deg).
//
// For a complex y = yr + j*yi and W512^i2 = c - j*s:
//   y * W512^i2 = (yr*c + yi*s) + j(yi*c - yr*s).
// Each of the four real inputs has one csd_sel_mult (shared subexpressions,
// multiplexed terms) giving input*c and input*s, with
// c = round(cos(2*pi*i2/512)*2^12) and s = round(sin(...)*2^12); two adders
// per complex output combine them. Purely combinational.
module w512_fine #(
  parameter int W = 17   // bits per part of A and B
) (
  input  logic signed [W-1:0] ar, ai,
  input  logic signed [W-1:0] br, bi,
  input  logic [2:0]          i2,
  output logic signed [W:0]   zar, zai,   // A * W512^i2
  output logic signed [W:0]   zbr, zbi    // B * W512^i2
);
  logic signed [W:0] arc, ars, aic, ais, brc, brs, bic, bis;
  logic [3:0] idx;
  assign idx = {1'b0, i2};

  csd_sel_mult #(.W(W), .SET(1)) u_ar (.d(ar), .idx, .pc(arc), .ps(ars));
  csd_sel_mult #(.W(W), .SET(1)) u_ai (.d(ai), .idx, .pc(aic), .ps(ais));
  csd_sel_mult #(.W(W), .SET(1)) u_br (.d(br), .idx, .pc(brc), .ps(brs));
  csd_sel_mult #(.W(W), .SET(1)) u_bi (.d(bi), .idx, .pc(bic), .ps(bis));

  // Each sum is bounded by |input part pair| <= 2^(W-1)*sqrt(2) in magnitude,
  // so W+1 bits hold it.
  logic signed [W+1:0] t0, t1, t2, t3;
  assign t0  = (W+2)'(arc) + (W+2)'(ais);
  assign t1  = (W+2)'(aic) - (W+2)'(ars);
  assign t2  = (W+2)'(brc) + (W+2)'(bis);
  assign t3  = (W+2)'(bic) - (W+2)'(brs);
  assign zar = t0[W:0];
  assign zai = t1[W:0];
  assign zbr = t2[W:0];
  assign zbi = t3[W:0];
endmodule
