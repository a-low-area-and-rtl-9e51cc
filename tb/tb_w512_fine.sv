// tb_w512_fine: checks the fine multiplier by W512^i2, i2 = 0..7.
// Random complex A and B (17-bit parts, magnitude below 2^16) must come out
// within 12 LSB + |x|*2^-11 of x*exp(-j*2*pi*i2/512).
module tb_w512_fine;
  localparam real PI = 3.14159265358979323846;
  logic signed [16:0] ar, ai, br, bi;
  logic [2:0] i2;
  logic signed [17:0] zar, zai, zbr, zbi;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  w512_fine #(.W(17)) dut (.ar, .ai, .br, .bi, .i2, .zar, .zai, .zbr, .zbi);

  task automatic chk(input string nm, input real xr, input real xi,
                     input logic signed [17:0] re, input logic signed [17:0] im);
    real ang, er, ei, tol;
    ang = 2.0 * PI * i2 / 512.0;
    er = xr * $cos(ang) + xi * $sin(ang);
    ei = xi * $cos(ang) - xr * $sin(ang);
    tol = 12.0 + $sqrt(xr * xr + xi * xi) / 2048.0;
    checks++;
    if (rabs(real'(re) - er) > tol || rabs(real'(im) - ei) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s i2=%0d: (%0d,%0d) expected (%0.1f,%0.1f)", nm, i2, re, im, er, ei);
    end
  endtask

  function automatic logic signed [16:0] rnd();
    return 17'($signed($urandom_range(92680)) - 46340);
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      ar = rnd(); ai = rnd(); br = rnd(); bi = rnd();
      i2 = 3'(t);
      #1;
      chk("A", real'(ar), real'(ai), zar, zai);
      chk("B", real'(br), real'(bi), zbr, zbi);
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
