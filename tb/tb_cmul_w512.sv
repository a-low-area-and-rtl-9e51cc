// tb_cmul_w512: checks the cascade W512 multiplier for every exponent
// 0..511 (in order, then random) with random 16-bit operands of magnitude
// below 2^15. Two enabled clocks after an input, the output must be within
// 12 LSB + |d|*2^-11 of d*exp(-j*2*pi*e/512). Random stalls check that the
// pipeline holds while en is low.
module tb_cmul_w512;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [8:0] e = '0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic signed [15:0] out_re, out_im;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  cmul_w512 #(.W(16)) dut (.clk, .rst_n, .en, .e, .in_re, .in_im, .out_re, .out_im);

  always #5 clk = ~clk;

  int hr [$], hi [$], he [$];   // accepted inputs

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (en) begin
        int n;
        real dr, di, ang, xr, xi, tol;
        n = hr.size();
        if (n >= 2) begin
          dr = real'(hr[n - 2]); di = real'(hi[n - 2]);
          ang = 2.0 * PI * he[n - 2] / 512.0;
          xr = dr * $cos(ang) + di * $sin(ang);
          xi = di * $cos(ang) - dr * $sin(ang);
          tol = 12.0 + $sqrt(dr * dr + di * di) / 2048.0;
          checks++;
          if (rabs(real'(out_re) - xr) > tol || rabs(real'(out_im) - xi) > tol) begin
            failures++;
            if (failures < 10) $display("FAIL e=%0d: (%0d,%0d) expected (%0.1f,%0.1f)",
                                        he[n - 2], out_re, out_im, xr, xi);
          end
        end
      end
      en = ($urandom_range(5) != 0);
      in_re = 16'($signed($urandom_range(46340)) - 23170);
      in_im = 16'($signed($urandom_range(46340)) - 23170);
      e = (hr.size() < 512) ? 9'(hr.size()) : 9'($urandom);
      if (en) begin
        hr.push_back(int'(in_re));
        hi.push_back(int'(in_im));
        he.push_back(int'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
