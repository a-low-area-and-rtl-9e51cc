// tb_fft512_ofdm: OFDM demodulation workload for the 512-point FFT.
//
// Builds NSYM OFDM symbols of 512 subcarriers: 400 active carriers (bins
// 1..200 and 312..511) carry random 16-QAM points, the DC bin and the
// 111-bin band edge are empty. Each symbol is turned into time samples by an
// inverse DFT in floating point, scaled to an RMS of about 1/6 of full scale,
// rounded and clipped to 12 bits, and streamed through the FFT back to back
// (with random stalls). Every received bin is divided by the known gain,
// sliced to the nearest 16-QAM point and compared with the sent point; the
// error vector magnitude of each symbol must stay below -45 dB and the empty
// bins must stay near zero.
module tb_fft512_ofdm;
  import fft_pkg::*;

  localparam int NSYM = 3;
  localparam real PI = 3.14159265358979323846;
  localparam real AMP = 8.0;    // time-domain scale per unit QAM amplitude

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [LOGN-1:0] out_index;
  logic signed [OUT_W-1:0] out_re, out_im;

  fft512_sdf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int  sym_re [NSYM][N], sym_im [NSYM][N];   // QAM points, -3..3, 0 when unused
  int  xr [NSYM][N], xi [NSYM][N];
  real ctab [N], stab [N];
  int  clipped = 0;

  function automatic bit active(input int k);
    return (k >= 1 && k <= 200) || (k >= 312);
  endfunction

  function automatic int qam(input int u);
    return 2 * u - 3;   // 0..3 -> -3,-1,1,3
  endfunction

  function automatic int slice(input real v);
    if (v < -2.0) return -3;
    if (v < 0.0)  return -1;
    if (v < 2.0)  return 1;
    return 3;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      ctab[n] = $cos(2.0 * PI * n / N);
      stab[n] = $sin(2.0 * PI * n / N);
    end
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < N; k++) begin
        sym_re[s][k] = active(k) ? qam(int'($urandom_range(3))) : 0;
        sym_im[s][k] = active(k) ? qam(int'($urandom_range(3))) : 0;
      end
      for (int n = 0; n < N; n++) begin
        real vr, vi;
        int  t;
        vr = 0.0; vi = 0.0;
        for (int k = 0; k < N; k++) begin
          t = (n * k) % N;
          // S(k) * exp(+j*2*pi*n*k/N)
          vr += sym_re[s][k] * ctab[t] - sym_im[s][k] * stab[t];
          vi += sym_im[s][k] * ctab[t] + sym_re[s][k] * stab[t];
        end
        xr[s][n] = $rtoi(AMP * vr + (vr < 0.0 ? -0.5 : 0.5));
        xi[s][n] = $rtoi(AMP * vi + (vi < 0.0 ? -0.5 : 0.5));
        if (xr[s][n] > 2047) begin xr[s][n] = 2047; clipped++; end
        if (xr[s][n] < -2048) begin xr[s][n] = -2048; clipped++; end
        if (xi[s][n] > 2047) begin xi[s][n] = 2047; clipped++; end
        if (xi[s][n] < -2048) begin xi[s][n] = -2048; clipped++; end
      end
    end
  end

  int unsigned sent = 0;
  bit done_in = 0;
  localparam int TOTAL_IN = NSYM * N + LATENCY - 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (sent < TOTAL_IN) begin
      if ($urandom_range(7) == 0) begin
        in_valid <= 1'b0;
      end else begin
        int s, n;
        s = sent / N;
        n = sent % N;
        sent++;
        in_valid <= 1'b1;
        in_re <= (s < NSYM) ? IN_W'(xr[s][n]) : '0;
        in_im <= (s < NSYM) ? IN_W'(xi[s][n]) : '0;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    done_in = 1;
  end

  // Gain from a QAM point to the output: 512 * AMP / 2.
  localparam real GAIN = N * AMP / 2.0;
  int unsigned out_count = 0;
  real evm_err [NSYM], evm_ref [NSYM];
  int  sym_errors = 0;
  initial foreach (evm_err[i]) begin evm_err[i] = 0.0; evm_ref[i] = 0.0; end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int s, k;
      real yr, yi, er, ei;
      s = out_count / N;
      k = int'(out_index);
      if (s < NSYM) begin
        yr = real'(out_re) / GAIN;
        yi = real'(out_im) / GAIN;
        er = yr - sym_re[s][k];
        ei = yi - sym_im[s][k];
        if (active(k)) begin
          evm_err[s] += er * er + ei * ei;
          evm_ref[s] += real'(sym_re[s][k] * sym_re[s][k] + sym_im[s][k] * sym_im[s][k]);
          checks++;
          if (slice(yr) != sym_re[s][k] || slice(yi) != sym_im[s][k]) begin
            failures++;
            sym_errors++;
            if (sym_errors < 10) $display("FAIL symbol %0d bin %0d: (%0.2f,%0.2f) sent (%0d,%0d)",
                                          s, k, yr, yi, sym_re[s][k], sym_im[s][k]);
          end
        end else begin
          checks++;
          if (er * er + ei * ei > 0.01) begin
            failures++;
            $display("FAIL symbol %0d empty bin %0d: (%0.3f,%0.3f)", s, k, yr, yi);
          end
        end
      end
      out_count++;
    end
  end

  initial begin
    wait (done_in);
    repeat (5) @(posedge clk);
    checks++;
    if (out_count != NSYM * N) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", out_count, NSYM * N);
    end
    $display("clipped input samples: %0d", clipped);
    for (int s = 0; s < NSYM; s++) begin
      real evm;
      evm = 10.0 * $log10(evm_err[s] / evm_ref[s]);
      $display("symbol %0d: EVM %0.1f dB", s, evm);
      checks++;
      if (evm > -45.0) begin
        failures++;
        $display("FAIL symbol %0d EVM too high", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
