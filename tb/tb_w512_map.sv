// tb_w512_map: checks the octant mapping of the W512 multiplier.
// For a random d = a + jb and a random exponent i = 0..511, the folded index
// k (k = i mod 64, or 64 - (i mod 64) in the upper half of a quadrant) gives
// the partial products A = a*W^k and B = b*W^k, worked out here in floating
// point and rounded. The block's output must be within 2 LSB of d*W^i
// computed directly from i, which checks every quadrant and half.
module tb_w512_map;
  localparam real PI = 3.14159265358979323846;
  logic signed [17:0] ar, ai, br, bi;
  logic [1:0] q;
  logic h;
  logic signed [18:0] y_re, y_im;
  int checks = 0, failures = 0;
  int seen [8];

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  w512_map #(.W(18)) dut (.ar, .ai, .br, .bi, .q, .h, .y_re, .y_im);

  initial begin
    foreach (seen[o]) seen[o] = 0;
    for (int t = 0; t < 4000; t++) begin
      int  i, r, k;
      real a, b, wk, er, ei;
      a = real'($signed($urandom_range(80000)) - 40000);
      b = real'($signed($urandom_range(80000)) - 40000);
      i = (t < 8) ? t * 64 + 63 : int'($urandom_range(511));
      r = i % 64;
      k = ((i / 64) % 2 == 1) ? 64 - r : r;
      wk = 2.0 * PI * k / 512.0;
      ar = 18'($rtoi(a * $cos(wk) + ((a * $cos(wk)) < 0 ? -0.5 : 0.5)));
      ai = 18'($rtoi(-a * $sin(wk) + ((-a * $sin(wk)) < 0 ? -0.5 : 0.5)));
      br = 18'($rtoi(b * $cos(wk) + ((b * $cos(wk)) < 0 ? -0.5 : 0.5)));
      bi = 18'($rtoi(-b * $sin(wk) + ((-b * $sin(wk)) < 0 ? -0.5 : 0.5)));
      q = 2'(i / 128);
      h = 1'((i / 64) % 2);
      seen[i / 64]++;
      #1;
      er = a * $cos(2.0 * PI * i / 512.0) + b * $sin(2.0 * PI * i / 512.0);
      ei = b * $cos(2.0 * PI * i / 512.0) - a * $sin(2.0 * PI * i / 512.0);
      checks++;
      if (rabs(real'(y_re) - er) > 2.0 || rabs(real'(y_im) - ei) > 2.0) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d: (%0d,%0d) expected (%0.1f,%0.1f)", i, y_re, y_im, er, ei);
      end
    end
    foreach (seen[o]) begin
      checks++;
      if (seen[o] == 0) failures++;
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
