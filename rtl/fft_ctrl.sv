// fft_ctrl: controller of the 512-point SDF FFT.
//
// A 9-bit counter (ctrl) counts the accepted input samples modulo 512; its
// value is the frame position of the sample at the FFT input. Every unit of
// the pipeline sees its own sample a fixed number of accepted samples later
// (fft_pkg OFF_*), so the controller hands each unit (ctrl - lag) mod 512.
// The butterfly stages pick their mode from one bit of that position (the
// counter bit drawn against each stage), and the twiddle exponents come from
// the index algebra of the radix-2^4-2^3 decomposition, n = 32*n1 + n2,
// k = k1 + 16*k2:
//   after stage 2 (W16):  e16  = pos[6:5] * bitrev2(pos[8:7])   (0..9)
//   after stage 4 (W512): e512 = pos[4:0] * bitrev4(pos[8:5])   (0..465)
//   after stage 6 (W8):   e8   = pos[2]   * bitrev2(pos[4:3])   (0..3)
//   after stage 7 (W32):  e32  = pos[1:0] * bitrev3(pos[4:2])   (0..21)
// These small products replace the twiddle address counters; no ROM holds
// the factors. The controller also flags each new output sample
// (out_valid, one clock after the input handshake that produced it, once the
// pipeline holds a whole frame) and gives its frequency index: the results
// leave in bit-reversed order, out_index = bitrev9(ctrl - 525).
module fft_ctrl
  import fft_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,   // one sample accepted this clock
  output ctrl_t           c,
  output logic            out_valid,
  output logic [LOGN-1:0] out_index
);
  logic [LOGN-1:0] cnt;
  logic [9:0]      fill;   // accepted samples, saturating at LATENCY

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (fill >= 10'(LATENCY - 1));
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        if (fill < 10'(LATENCY)) fill <= fill + 1'b1;
      end
    end
  end

  function automatic logic [LOGN-1:0] lag(input logic [LOGN-1:0] v, input int off);
    return v - LOGN'(off % N);
  endfunction

  logic [LOGN-1:0] p16, p512, p8, p32;
  always_comb begin
    c.pos_s1 = lag(cnt, OFF_S1);
    c.pos_s2 = lag(cnt, OFF_S2);
    c.pos_s3 = lag(cnt, OFF_S3);
    c.pos_s4 = lag(cnt, OFF_S4);
    c.pos_s5 = lag(cnt, OFF_S5);
    c.pos_s6 = lag(cnt, OFF_S6);
    c.pos_s7 = lag(cnt, OFF_S7);
    c.pos_s8 = lag(cnt, OFF_S8);
    c.pos_s9 = lag(cnt, OFF_S9);
    p16  = lag(cnt, OFF_M16);
    p512 = lag(cnt, OFF_M512);
    p8   = lag(cnt, OFF_M8);
    p32  = lag(cnt, OFF_M32);
    c.e16  = 4'(p16[6:5] * {p16[7], p16[8]});
    c.e512 = 9'(p512[4:0] * {p512[5], p512[6], p512[7], p512[8]});
    c.e8   = 2'(p8[2] * {p8[3], p8[4]});
    c.e32  = 5'(p32[1:0] * {p32[2], p32[3], p32[4]});
    out_index = bitrev9(lag(cnt, LATENCY));
  end
endmodule
