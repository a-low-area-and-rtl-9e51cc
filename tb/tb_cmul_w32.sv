// tb_cmul_w32: checks the W32 / W16 / W8 constant complex multiplier.
// Three instances (STEP 1, 2, 4) get the same random 14-bit operand and each
// a random exponent of its own range (W32: 0..21 and the full 0..31 wrap,
// W16: 0..15, W8: 0..7). One enabled clock later each output must be within
// 4 LSB + |d|*2^-10 of d*exp(-j*2*pi*e/(32/STEP)). A disabled clock must hold
// the outputs.
module tb_cmul_w32;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [4:0] e1 = '0, e2 = '0, e4 = '0;
  logic signed [13:0] in_re = '0, in_im = '0;
  logic signed [13:0] o1_re, o1_im, o2_re, o2_im, o4_re, o4_im;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  cmul_w32 #(.W(14), .STEP(1)) u1 (.clk, .rst_n, .en, .e(e1), .in_re, .in_im, .out_re(o1_re), .out_im(o1_im));
  cmul_w32 #(.W(14), .STEP(2)) u2 (.clk, .rst_n, .en, .e(e2), .in_re, .in_im, .out_re(o2_re), .out_im(o2_im));
  cmul_w32 #(.W(14), .STEP(4)) u4 (.clk, .rst_n, .en, .e(e4), .in_re, .in_im, .out_re(o4_re), .out_im(o4_im));

  always #5 clk = ~clk;

  task automatic chk(input string nm, input int e, input int base, input real dr, input real di,
                     input logic signed [13:0] ore, input logic signed [13:0] oim);
    real ang, xr, xi, tol;
    ang = 2.0 * PI * e / base;
    xr = dr * $cos(ang) + di * $sin(ang);
    xi = di * $cos(ang) - dr * $sin(ang);
    tol = 4.0 + $sqrt(dr * dr + di * di) / 1024.0;
    checks++;
    if (rabs(real'(ore) - xr) > tol || rabs(real'(oim) - xi) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%0d d=(%0.0f,%0.0f): (%0d,%0d) expected (%0.1f,%0.1f)",
                                  nm, e, dr, di, ore, oim, xr, xi);
    end
  endtask

  initial begin
    real dr, di;
    int  x1, x2, x4;
    logic signed [13:0] h_re, h_im;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = 1'b1;
      // |d| stays below 2^13 so that no rotation can overflow 14 bits
      in_re = 14'($signed($urandom_range(11584)) - 5792);
      in_im = 14'($signed($urandom_range(11584)) - 5792);
      x1 = (t % 4 == 0) ? int'($urandom_range(31)) : int'($urandom_range(21));
      x2 = int'($urandom_range(15));
      x4 = int'($urandom_range(7));
      e1 = 5'(x1); e2 = 5'(x2); e4 = 5'(x4);
      dr = real'(in_re); di = real'(in_im);
      @(negedge clk);
      chk("W32", x1, 32, dr, di, o1_re, o1_im);
      chk("W16", x2, 16, dr, di, o2_re, o2_im);
      chk("W8",  x4, 8,  dr, di, o4_re, o4_im);
      // hold while disabled
      en = 1'b0;
      h_re = o1_re; h_im = o1_im;
      in_re = ~in_re;
      @(negedge clk);
      checks++;
      if (o1_re != h_re || o1_im != h_im) begin
        failures++;
        $display("FAIL output changed while disabled");
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
