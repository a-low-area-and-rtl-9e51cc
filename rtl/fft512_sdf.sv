// fft512_sdf: 512-point pipelined FFT, radix-2^4-2^3 single-path delay
// feedback (SDF) architecture, for OFDM receivers and transmitters.
//
// The stream passes nine radix-2 butterfly stages with feedback buffers of
// 256, 128, ..., 1 words, alternating type I (plain) and type II (with the
// trivial -j factor) as the radix-2^4-2^3 algorithm orders them:
//   BFI(256) BFII(128) xW16 BFI(64) BFII(32) xW512 BFI(16) BFII(8) xW8
//   BFI(4) xW32 BFI(2) BFII(1)
// The four non-trivial twiddle multipliers are constant multipliers built from
// canonic signed digit shift-add networks (cmul_w32 for W16, W8, W32;
// the cascade cmul_w512 for W512), so there is no twiddle ROM. fft_ctrl
// counts samples and drives every stage mode and twiddle exponent.
//
// Interface: one complex sample per clock with in_valid high; with in_valid
// low the whole pipeline holds (a stall). Frames of 512 samples follow each
// other without gaps in the sample count; the first sample after reset is
// sample 0 of a frame. Results leave in bit-reversed order: out_index is the
// frequency index k of (out_re, out_im), valid while out_valid is high.
// Latency: the output for a sample position p appears 525 accepted samples
// after the input sample at position p (511 in the buffers, 9 stage registers,
// 5 multiplier registers), so the last frame needs 525 more input samples
// (of the next frame, or of zeros) to come out.
// Word lengths: 12-bit input, one bit of growth per butterfly stage
// (21 bits after stage 9), multipliers keep the width; the 20-bit output is
// the last stage's result divided by two (the least significant bit is
// dropped), i.e. out = X(k)/2. The growth per stage and the final scaling
// are this design's choice; the 12/20-bit word lengths follow the original article.
module fft512_sdf
  import fft_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic [LOGN-1:0]         out_index,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);
  ctrl_t c;
  logic  en;
  assign en = in_valid;

  fft_ctrl u_ctrl (.clk, .rst_n, .in_valid, .c, .out_valid, .out_index);

  logic signed [12:0] s1_re, s1_im;
  logic signed [13:0] s2_re, s2_im, m16_re, m16_im;
  logic signed [14:0] s3_re, s3_im;
  logic signed [15:0] s4_re, s4_im, m512_re, m512_im;
  logic signed [16:0] s5_re, s5_im;
  logic signed [17:0] s6_re, s6_im, m8_re, m8_im;
  logic signed [18:0] s7_re, s7_im, m32_re, m32_im;
  logic signed [19:0] s8_re, s8_im;
  logic signed [20:0] s9_re, s9_im;

  bf1 #(.W(12), .D(256)) u_s1 (.clk, .rst_n, .en, .pos(c.pos_s1),
    .in_re(in_re), .in_im(in_im), .out_re(s1_re), .out_im(s1_im));
  bf2 #(.W(13), .D(128)) u_s2 (.clk, .rst_n, .en, .pos(c.pos_s2),
    .in_re(s1_re), .in_im(s1_im), .out_re(s2_re), .out_im(s2_im));
  cmul_w32 #(.W(14), .STEP(2)) u_w16 (.clk, .rst_n, .en, .e({1'b0, c.e16}),
    .in_re(s2_re), .in_im(s2_im), .out_re(m16_re), .out_im(m16_im));
  bf1 #(.W(14), .D(64)) u_s3 (.clk, .rst_n, .en, .pos(c.pos_s3),
    .in_re(m16_re), .in_im(m16_im), .out_re(s3_re), .out_im(s3_im));
  bf2 #(.W(15), .D(32)) u_s4 (.clk, .rst_n, .en, .pos(c.pos_s4),
    .in_re(s3_re), .in_im(s3_im), .out_re(s4_re), .out_im(s4_im));
  cmul_w512 #(.W(16)) u_w512 (.clk, .rst_n, .en, .e(c.e512),
    .in_re(s4_re), .in_im(s4_im), .out_re(m512_re), .out_im(m512_im));
  bf1 #(.W(16), .D(16)) u_s5 (.clk, .rst_n, .en, .pos(c.pos_s5),
    .in_re(m512_re), .in_im(m512_im), .out_re(s5_re), .out_im(s5_im));
  bf2 #(.W(17), .D(8)) u_s6 (.clk, .rst_n, .en, .pos(c.pos_s6),
    .in_re(s5_re), .in_im(s5_im), .out_re(s6_re), .out_im(s6_im));
  cmul_w32 #(.W(18), .STEP(4)) u_w8 (.clk, .rst_n, .en, .e({3'b0, c.e8}),
    .in_re(s6_re), .in_im(s6_im), .out_re(m8_re), .out_im(m8_im));
  bf1 #(.W(18), .D(4)) u_s7 (.clk, .rst_n, .en, .pos(c.pos_s7),
    .in_re(m8_re), .in_im(m8_im), .out_re(s7_re), .out_im(s7_im));
  cmul_w32 #(.W(19), .STEP(1)) u_w32 (.clk, .rst_n, .en, .e(c.e32),
    .in_re(s7_re), .in_im(s7_im), .out_re(m32_re), .out_im(m32_im));
  bf1 #(.W(19), .D(2)) u_s8 (.clk, .rst_n, .en, .pos(c.pos_s8),
    .in_re(m32_re), .in_im(m32_im), .out_re(s8_re), .out_im(s8_im));
  bf2 #(.W(20), .D(1)) u_s9 (.clk, .rst_n, .en, .pos(c.pos_s9),
    .in_re(s8_re), .in_im(s8_im), .out_re(s9_re), .out_im(s9_im));

  assign out_re = s9_re[20:1];
  assign out_im = s9_im[20:1];
endmodule
