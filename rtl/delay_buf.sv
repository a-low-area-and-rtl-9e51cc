// delay_buf: feedback delay line of an SDF butterfly stage.
//
// Holds D complex words. Every enabled clock it returns the word written D
// enabled clocks earlier (rd_re/rd_im, combinational from the storage) and
// stores the new word wr_re/wr_im in its place. It is built as a circular
// buffer (one array, one pointer) rather than a shift register, so that the
// long buffers (256 and 128 words) map onto memory; the original article gives only the
// buffer length, the storage style is this design's choice. Contents are not
// reset: a word is always written before it is read back for a valid output.
module delay_buf #(
  parameter int W = 13,   // bits per real/imag part
  parameter int D = 256   // delay in enabled clocks (>= 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] wr_re,
  input  logic signed [W-1:0] wr_im,
  output logic signed [W-1:0] rd_re,
  output logic signed [W-1:0] rd_im
);
  localparam int AW = (D > 1) ? $clog2(D) : 1;

  logic [2*W-1:0] mem [D];
  logic [AW-1:0]  ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= {wr_re, wr_im};
  end

  assign {rd_re, rd_im} = mem[ptr];
endmodule
