// cmul_w512: cascade canonic-signed-digit complex multiplier d * W512^e,
// e = 0..511, W512 = exp(-j*2*pi/512), with no twiddle ROM.
//
// The exponent is folded into the first eighth of the circle:
// e = 128*q + 64*h + r, k = r (h = 0) or 64 - r (h = 1), so k = 0..64, and k is
// split as k = 8*i1 + i2 (i1 = 0..8, i2 = 0..7), since
// W512^k = W512^(8*i1) * W512^i2. Only 9 + 8 constant pairs are then needed.
//   coarse (w512_coarse): a, b  -> A = a*W512^(8*i1), B = b*W512^(8*i1)
//   pipeline register
//   fine   (w512_fine):   A, B  -> A*W512^i2, B*W512^i2
//   mapping(w512_map):    quadrant/half symmetry -> d*W512^e
//   output register
// Latency two enabled clocks. Partial products carry two extra bits; the
// result is cut back to W bits (|d*W^e| = |d|).
module cmul_w512 #(
  parameter int W = 16   // bits per real/imag part (in and out)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [8:0]          e,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  // Exponent folding.
  logic [1:0] q;
  logic       h;
  logic [6:0] k;
  logic [3:0] i1;
  logic [2:0] i2;
  always_comb begin
    q  = e[8:7];
    h  = e[6];
    k  = h ? (7'd64 - {1'b0, e[5:0]}) : {1'b0, e[5:0]};
    i1 = k[6:3];
    i2 = k[2:0];
  end

  logic signed [W:0] c_ar, c_ai, c_br, c_bi;
  w512_coarse #(.W(W)) u_coarse (
    .a(in_re), .b(in_im), .i1,
    .ar(c_ar), .ai(c_ai), .br(c_br), .bi(c_bi)
  );

  // Pipeline register between coarse and fine multiplication.
  logic signed [W:0] p_ar, p_ai, p_br, p_bi;
  logic [1:0]        p_q;
  logic              p_h;
  logic [2:0]        p_i2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_ar, p_ai, p_br, p_bi} <= '0;
      {p_q, p_h, p_i2}         <= '0;
    end else if (en) begin
      {p_ar, p_ai, p_br, p_bi} <= {c_ar, c_ai, c_br, c_bi};
      {p_q, p_h, p_i2}         <= {q, h, i2};
    end
  end

  logic signed [W+1:0] f_ar, f_ai, f_br, f_bi;
  w512_fine #(.W(W + 1)) u_fine (
    .ar(p_ar), .ai(p_ai), .br(p_br), .bi(p_bi), .i2(p_i2),
    .zar(f_ar), .zai(f_ai), .zbr(f_br), .zbi(f_bi)
  );

  logic signed [W+2:0] m_re, m_im;
  w512_map #(.W(W + 2)) u_map (
    .ar(f_ar), .ai(f_ai), .br(f_br), .bi(f_bi), .q(p_q), .h(p_h),
    .y_re(m_re), .y_im(m_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= m_re[W-1:0];
      out_im <= m_im[W-1:0];
    end
  end
endmodule
