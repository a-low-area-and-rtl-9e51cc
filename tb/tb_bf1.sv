// tb_bf1: checks the type I butterfly stage with D = 4 on 16-sample frames
// and with D = 256 on 512-sample frames, with random stalls.
// The reference is the radix-2 SDF rule written on the whole input history:
// with s = (accepted samples) - D - 1 the stage output must be
//   x[s] + x[s+D]   if s mod 2D <  D
//   x[s-D] - x[s]   if s mod 2D >= D
module tb_bf1;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [9:0] in_re = '0, in_im = '0;
  logic signed [10:0] a_re, a_im, b_re, b_im;
  logic [3:0] pos_a;
  logic [8:0] pos_b;
  int checks = 0, failures = 0;
  int unsigned cnt = 0;   // accepted samples

  assign pos_a = 4'(cnt);
  assign pos_b = 9'(cnt);

  bf1 #(.W(10), .D(4), .LOGN(4)) u_a (.clk, .rst_n, .en, .pos(pos_a),
    .in_re, .in_im, .out_re(a_re), .out_im(a_im));
  bf1 #(.W(10), .D(256), .LOGN(9)) u_b (.clk, .rst_n, .en, .pos(pos_b),
    .in_re, .in_im, .out_re(b_re), .out_im(b_im));

  always #5 clk = ~clk;

  int xr [$], xi [$];

  task automatic chk(input int d, input logic signed [10:0] re, input logic signed [10:0] im);
    int s, er, ei;
    s = int'(cnt) - d - 1;
    if (s < d) return;
    if (s % (2 * d) < d) begin
      er = xr[s] + xr[s + d];
      ei = xi[s] + xi[s + d];
    end else begin
      er = xr[s - d] - xr[s];
      ei = xi[s - d] - xi[s];
    end
    checks++;
    if (int'(re) != er || int'(im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL D=%0d s=%0d: (%0d,%0d) expected (%0d,%0d)", d, s, re, im, er, ei);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (en) begin
        cnt++;   // the sample offered at the last edge was taken
        chk(4, a_re, a_im);
        chk(256, b_re, b_im);
      end
      en    = ($urandom_range(4) != 0);
      in_re = 10'($urandom);
      in_im = 10'($urandom);
      if (en) begin
        xr.push_back(int'(in_re));
        xi.push_back(int'(in_im));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
