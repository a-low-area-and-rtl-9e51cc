// tb_fft512_sdf: end-to-end test of the 512-point SDF FFT at its default
// parameters.
//
// Streams NFRAMES frames back to back, then 525 flush samples, with random
// one-clock stalls (in_valid low). The frames are: uniform random noise, a
// single full-scale tone, a two-tone signal and random noise again. Every
// output is compared with a double-precision DFT of the same frame, scaled
// by 1/2 like the hardware output: each bin must be within
// TOL_ABS + TOL_REL * (largest bin of the frame) of it,
// and the error energy of a frame must stay below -50 dB of its signal energy.
// The output order (bit-reversed), out_index and the latency (525 accepted
// samples from input position p to output position p) are checked too.
// Counters confirm that each mechanism occurred: stalls, both butterfly
// modes, the -j swap of the type II stages, non-trivial W16/W8/W32 factors
// and all eight octants of the W512 multiplier.
module tb_fft512_sdf;
  import fft_pkg::*;

  localparam int NFRAMES = 4;
  localparam real PI = 3.14159265358979323846;
  // Per-bin tolerance: a few LSBs of rounding plus the error of the 11/12-bit
  // twiddle constants, which scales with the largest bin of the frame.
  localparam real TOL_ABS = 16.0;
  localparam real TOL_REL = 5.0e-4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [LOGN-1:0] out_index;
  logic signed [OUT_W-1:0] out_re, out_im;

  fft512_sdf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Stimulus and reference.
  int  xr [NFRAMES][N];
  int  xi [NFRAMES][N];
  real ref_re [NFRAMES][N];
  real ref_im [NFRAMES][N];
  real ctab [N], stab [N];
  real peak [NFRAMES];

  function automatic int clip12(input real v);
    int r;
    r = $rtoi(v);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      ctab[n] = $cos(2.0 * PI * n / N);
      stab[n] = $sin(2.0 * PI * n / N);
    end
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        case (f)
          1: begin   // single tone, bin 37
            xr[f][n] = clip12(2000.0 * ctab[(37 * n) % N]);
            xi[f][n] = clip12(2000.0 * stab[(37 * n) % N]);
          end
          2: begin   // two tones, bins 5 and 300
            xr[f][n] = clip12(900.0 * ctab[(5 * n) % N] + 700.0 * ctab[(300 * n) % N]);
            xi[f][n] = clip12(900.0 * stab[(5 * n) % N] + 700.0 * stab[(300 * n) % N]);
          end
          default: begin
            xr[f][n] = int'($urandom_range(4095)) - 2048;
            xi[f][n] = int'($urandom_range(4095)) - 2048;
          end
        endcase
      end
      for (int k = 0; k < N; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < N; n++) begin
          int t;
          t = (n * k) % N;
          // x * exp(-j*2*pi*n*k/N)
          sr += xr[f][n] * ctab[t] + xi[f][n] * stab[t];
          si += xi[f][n] * ctab[t] - xr[f][n] * stab[t];
        end
        ref_re[f][k] = sr / 2.0;
        ref_im[f][k] = si / 2.0;
        if (k == 0) peak[f] = 0.0;
        if ($sqrt(sr * sr + si * si) / 2.0 > peak[f]) peak[f] = $sqrt(sr * sr + si * si) / 2.0;
      end
    end
  end

  // Input driver with random stalls.
  int unsigned accepted = 0;   // accepted input samples so far
  int unsigned stalls = 0;
  int unsigned sent = 0;       // samples driven so far
  localparam int TOTAL_IN = NFRAMES * N + LATENCY - 1;
  bit done_in = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid) accepted <= accepted + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (sent < TOTAL_IN) begin
      if ($urandom_range(9) == 0) begin
        in_valid <= 1'b0;
        stalls++;
      end else begin
        int f, n;
        f = sent / N;
        n = sent % N;
        sent++;
        in_valid <= 1'b1;
        in_re <= (f < NFRAMES) ? IN_W'(xr[f][n]) : '0;
        in_im <= (f < NFRAMES) ? IN_W'(xi[f][n]) : '0;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    done_in = 1;
  end

  // Output checker.
  int unsigned out_count = 0;
  real err_e [NFRAMES], sig_e [NFRAMES];
  real max_err = 0.0;

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      err_e[f] = 0.0;
      sig_e[f] = 0.0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, p, k;
      real er, ei, e;
      f = out_count / N;
      p = out_count % N;
      k = int'(bitrev9(9'(p)));
      if (f < NFRAMES) begin
        // order and index
        checks++;
        if (out_index != 9'(k)) begin
          failures++;
          $display("FAIL index: out %0d expected %0d", out_index, k);
        end
        // latency: output position p of frame f leaves after the input of
        // sample f*N + p + LATENCY - 1 was accepted
        checks++;
        if (accepted != f * N + p + LATENCY) begin
          failures++;
          $display("FAIL latency: frame %0d pos %0d after %0d accepted samples", f, p, accepted);
        end
        er = real'(out_re) - ref_re[f][k];
        ei = real'(out_im) - ref_im[f][k];
        e  = $sqrt(er * er + ei * ei);
        if (e > max_err) max_err = e;
        err_e[f] += er * er + ei * ei;
        sig_e[f] += ref_re[f][k] * ref_re[f][k] + ref_im[f][k] * ref_im[f][k];
        checks++;
        if (e > TOL_ABS + TOL_REL * peak[f]) begin
          failures++;
          if (failures < 20)
            $display("FAIL frame %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                     f, k, out_re, out_im, ref_re[f][k], ref_im[f][k]);
        end
      end
      out_count++;
    end
  end

  // Mechanism counters, observed inside the design.
  int unsigned n_bf_sum = 0, n_bf_pass = 0, n_mj = 0;
  int unsigned n_w16 = 0, n_w8 = 0, n_w32 = 0;
  int unsigned n_oct [8];
  initial foreach (n_oct[i]) n_oct[i] = 0;

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (dut.c.pos_s1[8]) n_bf_sum++; else n_bf_pass++;
      if (dut.u_s2.mj || dut.u_s4.mj || dut.u_s6.mj || dut.u_s9.mj) n_mj++;
      if (dut.c.e16 != 0 && dut.c.e16 != 4) n_w16++;
      if (dut.c.e8 == 1 || dut.c.e8 == 3) n_w8++;
      if (dut.c.e32[2:0] != 0) n_w32++;
      n_oct[dut.c.e512[8:6]]++;
    end
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    wait (done_in);
    repeat (5) @(posedge clk);
    checks++;
    if (out_count != NFRAMES * N) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", out_count, NFRAMES * N);
    end
    for (int f = 0; f < NFRAMES; f++) begin
      real snr;
      snr = 10.0 * $log10(sig_e[f] / (err_e[f] + 1e-9));
      $display("frame %0d: SNR %0.1f dB", f, snr);
      checks++;
      if (snr < 50.0) begin
        failures++;
        $display("FAIL frame %0d SNR too low", f);
      end
    end
    $display("max |error| %0.2f LSB", max_err);
    need("stall cycles", stalls);
    need("butterfly sum/diff mode", n_bf_sum);
    need("butterfly pass/store mode", n_bf_pass);
    need("-j swap in type II stages", n_mj);
    need("non-trivial W16 factor", n_w16);
    need("non-trivial W8 factor", n_w8);
    need("non-trivial W32 factor", n_w32);
    for (int o = 0; o < 8; o++) need($sformatf("W512 octant %0d", o), n_oct[o]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
