// csd_sel_mult: multiplies one real operand d by the cosine and the sine
// constant chosen by a run-time index from one of the W512 constant tables,
// using shared subexpressions, fixed shifts, multiplexers and adders only.
//
// The operand's five subexpressions d+d>>2, d-d>>2, d+d>>3, d-d>>3 and
// d-d>>4 are formed once and shared by both products. At elaboration every
// constant of the table is split (fft_pkg::csd_terms) into at most seven
// signed, shifted subexpression terms. Term slot s of the product is a
// multiplexer whose input g is the fixed-wired term s of constant g; the
// index picks one input per slot and the slots are summed. So changing the
// index costs no shifter, only the slot multiplexers.
//   SET = 0: coarse table, index i1 = 0..8, constants of W512^(8*i1)
//   SET = 1: fine table,   index i2 = 0..7, constants of W512^i2
// Outputs: pc = d*cos/2^12 and ps = d*sin/2^12 of the chosen angle, each
// shifted copy truncated towards minus infinity. Purely combinational.
module csd_sel_mult
  import fft_pkg::*;
#(
  parameter int W   = 16,   // operand bits
  parameter int SET = 0     // 0: coarse constants, 1: fine constants
) (
  input  logic signed [W-1:0] d,
  input  logic [3:0]          idx,
  output logic signed [W:0]   pc,
  output logic signed [W:0]   ps
);
  localparam int NC = (SET == 0) ? 9 : 8;

  logic signed [MW-1:0] dx;
  logic [NSRC-1:0][MW-1:0] cse;   // shared subexpressions, two's complement
  assign dx     = MW'(d);
  assign cse[0] = dx;
  assign cse[1] = dx + (dx >>> 2);
  assign cse[2] = dx - (dx >>> 2);
  assign cse[3] = dx + (dx >>> 3);
  assign cse[4] = dx - (dx >>> 3);
  assign cse[5] = dx - (dx >>> 4);

  // cand_c[s][g]: term s of the cosine constant g, fixed wiring.
  logic [MAXT-1:0][15:0][MW-1:0] cand_c;
  logic [MAXT-1:0][15:0][MW-1:0] cand_s;

  for (genvar g = 0; g < 16; g++) begin : g_const
    localparam terms_t TC = csd_terms(w512_const(2 * SET, g));
    localparam terms_t TS = csd_terms(w512_const(2 * SET + 1, g));
    for (genvar s = 0; s < MAXT; s++) begin : g_slot
      if (g < NC && TC[s].en) begin : g_c
        assign cand_c[s][g] = TC[s].neg ? -scale2($signed(cse[TC[s].src]), int'(TC[s].pos))
                                        :  scale2($signed(cse[TC[s].src]), int'(TC[s].pos));
      end else begin : g_c0
        assign cand_c[s][g] = '0;
      end
      if (g < NC && TS[s].en) begin : g_s
        assign cand_s[s][g] = TS[s].neg ? -scale2($signed(cse[TS[s].src]), int'(TS[s].pos))
                                        :  scale2($signed(cse[TS[s].src]), int'(TS[s].pos));
      end else begin : g_s0
        assign cand_s[s][g] = '0;
      end
    end
  end

  logic signed [MW-1:0] acc_c, acc_s;
  always_comb begin
    acc_c = '0;
    acc_s = '0;
    for (int s = 0; s < MAXT; s++) begin
      acc_c = acc_c + $signed(cand_c[s][idx]);
      acc_s = acc_s + $signed(cand_s[s][idx]);
    end
  end

  // |product| <= |d| (constants are at most 2^12), so W+1 bits hold it.
  assign pc = acc_c[W:0];
  assign ps = acc_s[W:0];
endmodule
