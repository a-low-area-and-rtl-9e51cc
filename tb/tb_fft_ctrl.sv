// tb_fft_ctrl: checks the controller against the pipeline lags and the index
// algebra of the radix-2^4-2^3 decomposition, written out independently.
// With c accepted samples, each stage must see position (c - lag) mod 512 with
// lags 0, 257, 387, 452, 487, 504, 514, 520, 523 (stages 1..9), and the
// twiddle exponents, from the positions p at the multipliers (lags 386, 485,
// 513, 519), must be
//   W16:  (p/32 mod 4) * rev2(p/128)     W512: (p mod 32) * rev4(p/32)
//   W8:   (p/4 mod 2)  * rev2(p/8 mod 4) W32:  (p mod 4)  * rev3(p/4 mod 8)
// out_valid must rise once per accepted sample from the 525th on, never
// before, and never on a stalled clock; out_index = rev9((c - 525) mod 512).
module tb_fft_ctrl;
  import fft_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ctrl_t c;
  logic out_valid;
  logic [8:0] out_index;
  int checks = 0, failures = 0;

  fft_ctrl dut (.clk, .rst_n, .in_valid, .c, .out_valid, .out_index);

  always #5 clk = ~clk;

  function automatic int rev(input int v, input int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) if ((v >> i) & 1) r += 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic int at(input int cnt, input int lag);
    return ((cnt - lag) % 512 + 512) % 512;
  endfunction

  task automatic expect_eq(input string nm, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d expected %0d", nm, got, exp);
    end
  endtask

  int cnt = 0;
  int first_valid = -1;
  int n_valid = 0;
  bit was_en = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int p;
      @(negedge clk);
      if (was_en) cnt++;
      // out_valid follows the last clock edge
      expect_eq("out_valid", int'(out_valid), (was_en && cnt >= 525) ? 1 : 0);
      if (out_valid) begin
        n_valid++;
        if (first_valid < 0) first_valid = cnt;
        expect_eq("out_index", int'(out_index), rev(at(cnt, 525), 9));
      end
      expect_eq("pos_s1", int'(c.pos_s1), at(cnt, 0));
      expect_eq("pos_s2", int'(c.pos_s2), at(cnt, 257));
      expect_eq("pos_s3", int'(c.pos_s3), at(cnt, 387));
      expect_eq("pos_s4", int'(c.pos_s4), at(cnt, 452));
      expect_eq("pos_s5", int'(c.pos_s5), at(cnt, 487));
      expect_eq("pos_s6", int'(c.pos_s6), at(cnt, 504));
      expect_eq("pos_s7", int'(c.pos_s7), at(cnt, 514));
      expect_eq("pos_s8", int'(c.pos_s8), at(cnt, 520));
      expect_eq("pos_s9", int'(c.pos_s9), at(cnt, 523));
      p = at(cnt, 386);
      expect_eq("e16", int'(c.e16), ((p / 32) % 4) * rev(p / 128, 2));
      p = at(cnt, 485);
      expect_eq("e512", int'(c.e512), (p % 32) * rev(p / 32, 4));
      p = at(cnt, 513);
      expect_eq("e8", int'(c.e8), ((p / 4) % 2) * rev((p / 8) % 4, 2));
      p = at(cnt, 519);
      expect_eq("e32", int'(c.e32), (p % 4) * rev((p / 4) % 8, 3));
      in_valid = ($urandom_range(3) != 0);
      was_en = in_valid;
    end
    expect_eq("first valid output after accepted samples", first_valid, 525);
    checks++;
    if (n_valid == 0) failures++;
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
