// bf1: butterfly stage of type I (BFI) of the single-path delay feedback FFT,
// with its feedback buffer of D words (see fft512_sdf).
//
// The stage works on blocks of 2*D consecutive samples. While the first D
// samples of a block arrive (pos bit log2(D) = 0) they are written into the
// buffer, and the buffer's previous contents (the differences of the last
// block) leave the stage. While the second D samples arrive, each is combined
// with its partner D samples earlier: the sum leaves the stage at once and the
// difference goes into the buffer. Output = input delayed by D samples, then
// one register: the element at the output has frame position pos - D - 1.
// The word grows by one bit (W in, W+1 out) so that no sum can overflow.
// The switching rule is the standard radix-2 SDF butterfly; the original article names
// the stage and its buffer length, the timing and word growth are this
// design's choice.
module bf1 #(
  parameter int W    = 12,   // input bits per real/imag part
  parameter int D    = 256,  // feedback buffer length
  parameter int LOGN = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,       // advance one sample
  input  logic [LOGN-1:0]     pos,      // frame position of the input sample
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im
);
  localparam int B = $clog2(D);

  logic signed [W:0] fb_re, fb_im;     // buffer output
  logic signed [W:0] wr_re, wr_im;     // buffer input
  logic signed [W:0] y_re, y_im;       // stage output before the register
  logic signed [W:0] x_re, x_im;

  assign x_re = {in_re[W-1], in_re};
  assign x_im = {in_im[W-1], in_im};

  always_comb begin
    if (pos[B]) begin
      y_re  = fb_re + x_re;
      y_im  = fb_im + x_im;
      wr_re = fb_re - x_re;
      wr_im = fb_im - x_im;
    end else begin
      y_re  = fb_re;
      y_im  = fb_im;
      wr_re = x_re;
      wr_im = x_im;
    end
  end

  delay_buf #(.W(W + 1), .D(D)) u_buf (
    .clk, .rst_n, .en,
    .wr_re, .wr_im, .rd_re(fb_re), .rd_im(fb_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= y_re;
      out_im <= y_im;
    end
  end
endmodule
