// tb_delay_buf: checks the feedback delay line at D = 1, 3 and 256 words.
// Random words are written on randomly enabled clocks; after D enabled
// clocks the word read back must be the one written D enabled clocks before.
module tb_delay_buf;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [9:0] wr_re = '0, wr_im = '0;
  logic signed [9:0] r1_re, r1_im, r3_re, r3_im, r256_re, r256_im;
  int checks = 0, failures = 0;

  delay_buf #(.W(10), .D(1))   u_d1   (.clk, .rst_n, .en, .wr_re, .wr_im, .rd_re(r1_re),   .rd_im(r1_im));
  delay_buf #(.W(10), .D(3))   u_d3   (.clk, .rst_n, .en, .wr_re, .wr_im, .rd_re(r3_re),   .rd_im(r3_im));
  delay_buf #(.W(10))          u_d256 (.clk, .rst_n, .en, .wr_re, .wr_im, .rd_re(r256_re), .rd_im(r256_im));

  always #5 clk = ~clk;

  logic [19:0] hist [$];   // words written, oldest first

  task automatic chk(input int d, input logic signed [9:0] re, input logic signed [9:0] im);
    int n;
    n = hist.size();
    if (n >= d) begin
      checks++;
      if ({re, im} != hist[n - d]) begin
        failures++;
        if (failures < 10) $display("FAIL D=%0d: read %h expected %h", d, {re, im}, hist[n - d]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en    = ($urandom_range(3) != 0);
      wr_re = 10'($urandom);
      wr_im = 10'($urandom);
      if (en) begin
        // value read now is the word written D enabled clocks ago
        chk(1, r1_re, r1_im);
        chk(3, r3_re, r3_im);
        chk(256, r256_re, r256_im);
        hist.push_back({wr_re, wr_im});
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
