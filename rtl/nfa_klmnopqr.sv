// nfa_klmnopqr: 2C-NFA circuit for the expression kl(mn|op)qr.
//
// The expression splits into the stride groups "kl", ("mn" | "op"), "qr",
// each a t1_module with one state register: four registers for eight
// characters, against eight for a one-character-per-state NFA. The first
// group sees a predecessor reach of all ones, so a match may start at any
// stream offset. The alternation is an OR of the two branch reach vectors.
// Lookahead for each group is the first class of what follows it (m or o
// after "kl", q after either branch); the final group uses none.
//
// Inputs cm0, cm1, cm2 are the classifier words of window positions 0, 1, 2.
// match[0] / match[1]: a match of the whole expression ends at stream byte
// 2t / 2t+1 of the current window t (combinational). State advances on
// clock edges with en=1.
module nfa_klmnopqr
  import reme_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [NCLASS-1:0] cm0,
  input  logic [NCLASS-1:0] cm1,
  input  logic [NCLASS-1:0] cm2,
  output logic [1:0]        match
);
  logic [N_USED-1:0][2:0] m;   // m[k][i]: class k matched at window position i
  reach_t d_kl, d_mn, d_op, d_qr;

  always_comb
    for (int k = 0; k < N_USED; k++) m[k] = {cm2[k], cm1[k], cm0[k]};

  t1_module u_kl (.clk, .rst_n, .en, .pre(4'hF), .a(m[cls_idx("k")]), .b(m[cls_idx("l")]),
                  .la(m[cls_idx("m")][2] | m[cls_idx("o")][2]), .d(d_kl));
  t1_module u_mn (.clk, .rst_n, .en, .pre(d_kl), .a(m[cls_idx("m")]), .b(m[cls_idx("n")]),
                  .la(m[cls_idx("q")][2]), .d(d_mn));
  t1_module u_op (.clk, .rst_n, .en, .pre(d_kl), .a(m[cls_idx("o")]), .b(m[cls_idx("p")]),
                  .la(m[cls_idx("q")][2]), .d(d_op));
  t1_module u_qr (.clk, .rst_n, .en, .pre(d_mn | d_op), .a(m[cls_idx("q")]), .b(m[cls_idx("r")]),
                  .la(1'b0), .d(d_qr));

  assign match = d_qr[2:1];
endmodule
