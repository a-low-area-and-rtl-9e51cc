// cmul_w32: constant complex multiplier d * W32^e (W32 = exp(-j*2*pi/32)),
// used for the W32, W16 and W8 twiddle factors of the FFT.
//
// Each part of d = a + jb goes through its own csd_w32_bank, which yields the
// operand times cos(pi*m/16) for m = 0..7. The exponent is split as
// e = 8*q + m: m selects (sel1) the products a*c_m, a*s_m, b*c_m, b*s_m, where
// c_m = Re{W32^m} and s_m = Re{W32^(8-m)} = sin(pi*m/16) (s_0 = 0), and
//   d * W32^m = (a*c_m + b*s_m) + j(b*c_m - a*s_m).
// The quadrant q (sel2) then multiplies by (-j)^q in a mapping block that only
// swaps parts and negates them, so no twiddle ROM is needed.
// STEP scales the exponent input: STEP=1 takes e in units of W32, STEP=2
// in units of W16 (W16^i = W32^(2i)), STEP=4 in units of W8; with STEP 2 or 4
// only the even, resp. multiple-of-four, products are ever selected. The input
// exponent must keep STEP*e below 32.
// Timing: one register at the output, latency one enabled clock.
module cmul_w32 #(
  parameter int W    = 14,   // bits per real/imag part (in and out)
  parameter int STEP = 1     // 1: W32^e, 2: W16^e, 4: W8^e
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [4:0]          e,       // twiddle exponent in units of W(32/STEP)
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  logic signed [W-1:0] pa [8];   // a * c_m
  logic signed [W-1:0] pb [8];   // b * c_m

  csd_w32_bank #(.W(W)) u_bank_re (.d(in_re), .p(pa));
  csd_w32_bank #(.W(W)) u_bank_im (.d(in_im), .p(pb));

  logic [4:0] e32;
  logic [2:0] m;        // sel1
  logic [1:0] q;        // sel2
  assign e32 = 5'(e * STEP);
  assign m   = e32[2:0];
  assign q   = e32[4:3];

  logic signed [W:0] ac, as_, bc, bs;
  logic signed [W:0] r_re, r_im;      // d * W32^m
  logic signed [W:0] y_re, y_im;      // after the mapping block

  always_comb begin
    ac  = (W+1)'(pa[m]);
    bc  = (W+1)'(pb[m]);
    as_ = (m == 3'd0) ? '0 : (W+1)'(pa[3'd0 - m]);   // index 8-m mod 8
    bs  = (m == 3'd0) ? '0 : (W+1)'(pb[3'd0 - m]);
    r_re = ac + bs;
    r_im = bc - as_;
    unique case (q)
      2'd0: begin y_re =  r_re; y_im =  r_im; end
      2'd1: begin y_re =  r_im; y_im = -r_re; end   // * -j
      2'd2: begin y_re = -r_re; y_im = -r_im; end   // * -1
      default: begin y_re = -r_im; y_im =  r_re; end // * +j
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= y_re[W-1:0];
      out_im <= y_im[W-1:0];
    end
  end
endmodule
