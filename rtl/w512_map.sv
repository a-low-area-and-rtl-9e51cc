// w512_map: mapping block of the cascade W512 multiplier. It turns the
// partial products A = a*W512^k and B = b*W512^k (k = 0..64, d = a + jb) into
// d * W512^i for any exponent i = 0..511, using the eighth-of-circle symmetry.
//
// With i = 128*q + 64*h + r (q quadrant, h half of the quadrant, r = 0..63):
//   h = 0: k = r,        d*W^i = (-j)^q * d*W^k
//                        d*W^k = (Ar - Bi) + j(Ai + Br)
//   h = 1: k = 64 - r,   d*W^i = (-j)^q * (-j) * d*conj(W^k)
//                        (-j)*d*conj(W^k) = (Br - Ai) + j(-Ar - Bi)
// so the block is sign changes, swaps of the real and imaginary part and two
// adders, selected by q and h. The exact multiplexer wiring of the original article is
// not reproduced; the function is. Purely combinational.
module w512_map #(
  parameter int W = 18   // bits per part of the partial products
) (
  input  logic signed [W-1:0] ar, ai,
  input  logic signed [W-1:0] br, bi,
  input  logic [1:0]          q,      // quadrant, i[8:7]
  input  logic                h,      // upper half of the quadrant, i[6]
  output logic signed [W:0]   y_re,
  output logic signed [W:0]   y_im
);
  logic signed [W:0] ar_x, ai_x, br_x, bi_x;
  logic signed [W:0] u_re, u_im;

  always_comb begin
    ar_x = (W+1)'(ar);
    ai_x = (W+1)'(ai);
    br_x = (W+1)'(br);
    bi_x = (W+1)'(bi);
    if (!h) begin
      u_re = ar_x - bi_x;
      u_im = ai_x + br_x;
    end else begin
      u_re = br_x - ai_x;
      u_im = -ar_x - bi_x;
    end
    unique case (q)
      2'd0: begin y_re =  u_re; y_im =  u_im; end
      2'd1: begin y_re =  u_im; y_im = -u_re; end
      2'd2: begin y_re = -u_re; y_im = -u_im; end
      default: begin y_re = -u_im; y_im =  u_re; end
    endcase
  end
endmodule
