// tb_w512_coarse: checks the coarse multiplier by W512^(8*i1), i1 = 0..8.
// For random 16-bit a, b the outputs must be within 8 LSB + |x|*2^-11 of
// a*exp(-j*pi*i1/32) and b*exp(-j*pi*i1/32).
module tb_w512_coarse;
  localparam real PI = 3.14159265358979323846;
  logic signed [15:0] a, b;
  logic [3:0] i1;
  logic signed [16:0] ar, ai, br, bi;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  w512_coarse #(.W(16)) dut (.a, .b, .i1, .ar, .ai, .br, .bi);

  task automatic chk(input string nm, input real x, input logic signed [16:0] re,
                     input logic signed [16:0] im);
    real ang, er, ei, tol;
    ang = 2.0 * PI * 8.0 * i1 / 512.0;
    er = x * $cos(ang);
    ei = -x * $sin(ang);
    tol = 8.0 + rabs(x) / 2048.0;
    checks++;
    if (rabs(real'(re) - er) > tol || rabs(real'(im) - ei) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s i1=%0d x=%0.0f: (%0d,%0d) expected (%0.1f,%0.1f)",
                                  nm, i1, x, re, im, er, ei);
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      a  = (t < 9) ? 16'sd32767 : 16'($urandom);
      b  = (t < 9) ? -16'sd32768 : 16'($urandom);
      i1 = 4'(t % 9);
      #1;
      chk("A", real'(a), ar, ai);
      chk("B", real'(b), br, bi);
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
