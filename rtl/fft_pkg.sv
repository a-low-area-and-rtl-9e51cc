// fft_pkg: shared constants, types and functions of the 512-point
// radix-2^4-2^3 single-path delay feedback (SDF) FFT.
//
// Stream positions: the controller counts accepted input samples modulo 512.
// Every stage and multiplier of the pipeline sees the sample it is handed at a
// fixed lag behind the input; the OFF_* constants below give that lag, in
// accepted samples, for the input of each unit. A unit works out which element
// of the 512-sample frame it holds as (counter - lag) mod 512.
//
// Twiddle constants for W512 follow the formula round(cos/sin(2*pi*k/512)*2^12),
// twelve fractional bits, thirteen canonic signed digits. At elaboration each
// constant is turned into canonic signed digits (CSD, non-adjacent form) by
// csd_of() and split into shared-subexpression terms by csd_terms(), so the
// hardware is made of fixed shifts, multiplexers and adders only.
package fft_pkg;

  localparam int LOGN  = 9;
  localparam int N     = 1 << LOGN;
  localparam int IN_W  = 12;   // input word length
  localparam int OUT_W = 20;   // output word length


  // Registered latency of each unit, in accepted samples.
  localparam int LAT_BF   = 1;  // output register of a butterfly stage
  localparam int LAT_W32  = 1;  // W32/W16/W8 multiplier: output register
  localparam int LAT_W512 = 2;  // W512 multiplier: coarse | pipeline | fine+map | output

  // Lag of the input of each unit behind the FFT input.
  localparam int OFF_S1   = 0;
  localparam int OFF_S2   = OFF_S1  + 256 + LAT_BF;
  localparam int OFF_M16  = OFF_S2  + 128 + LAT_BF;
  localparam int OFF_S3   = OFF_M16 + LAT_W32;
  localparam int OFF_S4   = OFF_S3  + 64 + LAT_BF;
  localparam int OFF_M512 = OFF_S4  + 32 + LAT_BF;
  localparam int OFF_S5   = OFF_M512 + LAT_W512;
  localparam int OFF_S6   = OFF_S5  + 16 + LAT_BF;
  localparam int OFF_M8   = OFF_S6  + 8 + LAT_BF;
  localparam int OFF_S7   = OFF_M8  + LAT_W32;
  localparam int OFF_M32  = OFF_S7  + 4 + LAT_BF;
  localparam int OFF_S8   = OFF_M32 + LAT_W32;
  localparam int OFF_S9   = OFF_S8  + 2 + LAT_BF;
  localparam int LATENCY  = OFF_S9  + 1 + LAT_BF;   // 525 samples

  // Control bundle produced by fft_ctrl for the datapath.
  typedef struct packed {
    logic [LOGN-1:0] pos_s1, pos_s2, pos_s3, pos_s4, pos_s5,
                     pos_s6, pos_s7, pos_s8, pos_s9;   // frame position at each stage input
    logic [3:0]      e16;    // exponent of W16 after stage 2 (0..9)
    logic [8:0]      e512;   // exponent of W512 after stage 4 (0..465)
    logic [1:0]      e8;     // exponent of W8 after stage 6 (0..3)
    logic [4:0]      e32;    // exponent of W32 after stage 7 (0..21)
  } ctrl_t;

  // CSD constants: 14 digit positions, weight of position j is 2^(j-12).
  localparam int CSD_FRAC = 12;
  localparam int CSD_N    = 14;
  typedef struct packed {
    logic [CSD_N-1:0] pos;   // digit +1
    logic [CSD_N-1:0] neg;   // digit -1
  } csd_t;

  // Non-adjacent form of a non-negative integer k.
  function automatic csd_t csd_of(input int k);
    csd_t r;
    int   v;
    r = '0;
    v = k;
    for (int j = 0; j < CSD_N; j++) begin
      if (v % 2 != 0) begin
        if (v % 4 == 3) begin
          r.neg[j] = 1'b1;
          v = v + 1;
        end else begin
          r.pos[j] = 1'b1;
          v = v - 1;
        end
      end
      v = v / 2;
    end
    return r;
  endfunction

  // A constant is realised as a sum of at most MAXT terms. Each term is a
  // shared subexpression of the operand d, weighted 2^(pos-12) and signed:
  //   src 0: d             (digit pattern 1)
  //   src 1: d + d>>2      (101)      src 2: d - d>>2   (10-1)
  //   src 3: d + d>>3      (1001)     src 4: d - d>>3   (100-1)
  //   src 5: d - d>>4      (1000-1)
  localparam int MW   = 40;   // internal width of the shift-add arithmetic
  localparam int MAXT = 7;
  localparam int NSRC = 6;
  typedef struct packed {
    logic       en;
    logic       neg;
    logic [2:0] src;
    logic [4:0] pos;
  } term_t;
  typedef term_t [MAXT-1:0] terms_t;

  // Greedy split of the CSD digits of k, most significant first, into the
  // subexpression patterns above.
  function automatic terms_t csd_terms(input int k);
    csd_t   c;
    terms_t t;
    int     n;
    int     dg [CSD_N];
    c = csd_of(k);
    t = '0;
    n = 0;
    for (int j = 0; j < CSD_N; j++) dg[j] = c.pos[j] ? 1 : (c.neg[j] ? -1 : 0);
    for (int j = CSD_N - 1; j >= 0; j--) begin
      if (dg[j] != 0 && n < MAXT) begin
        t[n].en  = 1'b1;
        t[n].neg = (dg[j] < 0);
        t[n].pos = 5'(j);
        t[n].src = 3'd0;
        if (j >= 2 && dg[j-2] != 0) begin
          t[n].src = (dg[j-2] == dg[j]) ? 3'd1 : 3'd2;
          dg[j-2] = 0;
        end else if (j >= 3 && dg[j-3] != 0) begin
          t[n].src = (dg[j-3] == dg[j]) ? 3'd3 : 3'd4;
          dg[j-3] = 0;
        end else if (j >= 4 && dg[j-4] == -dg[j]) begin
          t[n].src = 3'd5;
          dg[j-4] = 0;
        end
        dg[j] = 0;
        n++;
      end
    end
    return t;
  endfunction

  // v * 2^(j-12), truncated towards minus infinity.
  function automatic logic signed [MW-1:0] scale2(input logic signed [MW-1:0] v, input int j);
    return (j >= CSD_FRAC) ? (v <<< (j - CSD_FRAC)) : (v >>> (CSD_FRAC - j));
  endfunction

  // W512^(8*i1), i1 = 0..8: cos and -sin, round(x*2^12)
  localparam int W512_C1 [9] = '{4096, 4076, 4017, 3920, 3784, 3612, 3406, 3166, 2896};
  localparam int W512_S1 [9] = '{   0,  401,  799, 1189, 1567, 1931, 2276, 2598, 2896};
  // W512^i2, i2 = 0..7: cos and -sin, round(x*2^12)
  localparam int W512_C2 [8] = '{4096, 4096, 4095, 4093, 4091, 4088, 4085, 4081};
  localparam int W512_S2 [8] = '{   0,   50,  101,  151,  201,  251,  301,  351};

  // Constant g of table sel: 0 cos coarse, 1 sin coarse, 2 cos fine, 3 sin fine.
  function automatic int w512_const(input int sel, input int g);
    case (sel)
      0: return (g < 9) ? W512_C1[g] : 0;
      1: return (g < 9) ? W512_S1[g] : 0;
      2: return (g < 8) ? W512_C2[g] : 0;
      default: return (g < 8) ? W512_S2[g] : 0;
    endcase
  endfunction

  function automatic logic [8:0] bitrev9(input logic [8:0] v);
    logic [8:0] r;
    for (int i = 0; i < 9; i++) r[i] = v[8-i];
    return r;
  endfunction

endpackage
