// nfa_cdefghijklmnop: 2C-NFA circuit for the expression cde*f*(g*hij|kl*m*)nop.
//
// The expression is cut at '(', ')' and '|' into subexpressions and each
// subexpression into groups of two non-star characters with their stars:
//   cd (t1)  e*f* (t6)  ( g*h (t3)  ij (t1)  |  kl* (t5)  m* (t4) )  no (t1)  p (t2)
// which uses all six group types. Groups are chained through their reach
// vectors; the alternation is the OR of the two branch outputs. Lookahead
// (la) for a group is the union of the first classes that can follow it:
// after "cd" that is e, f, g, h or k (e*f* and g* may be empty); after "g*h"
// it is i; after "ij" n; after "kl*" m or n; after "no" p. Starred groups
// take no lookahead.
//
// Inputs and outputs as in nfa_klmnopqr: classifier words of the three window
// positions in, match flags for stream bytes 2t and 2t+1 out.
module nfa_cdefghijklmnop
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
  logic [N_USED-1:0][2:0] m;
  reach_t d_cd, d_ef, d_gh, d_ij, d_kl, d_m, d_no, d_p;

  always_comb
    for (int k = 0; k < N_USED; k++) m[k] = {cm2[k], cm1[k], cm0[k]};

  t1_module u_cd (.clk, .rst_n, .en, .pre(4'hF), .a(m[cls_idx("c")]), .b(m[cls_idx("d")]),
                  .la(m[cls_idx("e")][2] | m[cls_idx("f")][2] | m[cls_idx("g")][2] |
                      m[cls_idx("h")][2] | m[cls_idx("k")][2]),
                  .d(d_cd));
  t6_module u_ef (.clk, .rst_n, .en, .pre(d_cd), .a(m[cls_idx("e")]), .b(m[cls_idx("f")]), .d(d_ef));
  t3_module u_gh (.clk, .rst_n, .en, .pre(d_ef), .a(m[cls_idx("g")]), .b(m[cls_idx("h")]),
                  .la(m[cls_idx("i")][2]), .d(d_gh));
  t1_module u_ij (.clk, .rst_n, .en, .pre(d_gh), .a(m[cls_idx("i")]), .b(m[cls_idx("j")]),
                  .la(m[cls_idx("n")][2]), .d(d_ij));
  t5_module u_kl (.clk, .rst_n, .en, .pre(d_ef), .a(m[cls_idx("k")]), .b(m[cls_idx("l")]),
                  .la(m[cls_idx("m")][2] | m[cls_idx("n")][2]), .d(d_kl));
  t4_module u_m  (.clk, .rst_n, .en, .pre(d_kl), .a(m[cls_idx("m")]), .d(d_m));
  t1_module u_no (.clk, .rst_n, .en, .pre(d_ij | d_m), .a(m[cls_idx("n")]), .b(m[cls_idx("o")]),
                  .la(m[cls_idx("p")][2]), .d(d_no));
  t2_module u_p  (.pre(d_no), .a(m[cls_idx("p")]), .d(d_p));

  assign match = d_p[2:1];
endmodule
