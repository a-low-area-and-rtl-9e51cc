// tb_csd_w32_bank: checks the eight shift-add constant multipliers.
// For random 16-bit d, each p[m] must be within 3 LSB of d*K[m]/2048, with
// K[m] = floor(cos(pi*m/16)*2048) (2048, 2008, 1892, 1702, 1448, 1137, 783, 399),
// and within 3 LSB + |d|*2^-11 of d*cos(pi*m/16). Extreme operands included.
module tb_csd_w32_bank;
  localparam real PI = 3.14159265358979323846;
  logic signed [15:0] d;
  logic signed [15:0] p [8];
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  csd_w32_bank #(.W(16)) dut (.d, .p);

  task automatic check_one();
    real c, ex, tol;
    int  k;
    for (int m = 0; m < 8; m++) begin
      c  = $cos(PI * m / 16.0);
      k  = $rtoi($floor(c * 2048.0));
      ex = real'(d) * k / 2048.0;
      checks++;
      if (rabs(real'(p[m]) - ex) > 3.0) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d d=%0d: %0d expected %0.2f", m, d, p[m], ex);
      end
      tol = 3.0 + rabs(real'(d)) / 2048.0;
      checks++;
      if (rabs(real'(p[m]) - real'(d) * c) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d d=%0d: %0d vs exact %0.2f", m, d, p[m], real'(d) * c);
      end
    end
  endtask

  initial begin
    d = 16'sd32767; #1; check_one();
    d = -16'sd32768; #1; check_one();
    d = 16'sd0; #1; check_one();
    for (int t = 0; t < 2000; t++) begin
      d = 16'($urandom);
      #1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
