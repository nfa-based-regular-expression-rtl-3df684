// t1_module: group "ab" of a 2C-NFA, two consecutive single characters
// consumed as one stride and held in ONE state register.
//
// Inputs are the reach vector of the predecessor group (pre, bit k = the
// predecessor may have completed at window boundary k, see reme_pkg) and the
// class-match bits of the group's two classes at the three window positions
// (a[i] = class A matched the byte at window position i). The group completes
//   at b2 when the pair sits at window positions 0-1 (pattern A B any), and
//   at b3 when the pair sits at positions 1-2 (pattern any A B).
// Both completions set the same register s, so in the next window s means "the
// group ended just before w0 or just after w0". The module resolves the two
// readings with character checks, as the 2C-NFA method prescribes:
//   - lookbehind: the "ended after w0" reading is only taken when w0 is in
//     class B (the group's last character);
//   - lookahead: a completion at b2 is only stored when w2 is in the first
//     class of the successor group (la). Tie la to 1 when the successor can
//     start with a starred character (no usable lookahead, "C_none"), and to 0
//     for a final group, whose completion at b2 is reported directly.
// Output d is this group's reach vector for its successor(s); d[1] and d[2] of
// a final group are the match flags for stream bytes 2t and 2t+1.
//
// Timing: d is combinational from s and the inputs; s updates on clock edges
// with en=1 (one window per enabled cycle). Reset clears s.
// The two 3-character patterns and the neighbour lookbehind/lookahead follow
// the 2C-NFA method; the boundary-vector interface between modules is this
// implementation's way of chaining them.
module t1_module
  import reme_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  reach_t     pre,
  input  logic [2:0] a,
  input  logic [2:0] b,
  input  logic       la,
  output reach_t     d
);
  logic s_q;

  always_comb begin
    d[0] = s_q;
    d[1] = s_q & b[0];
    d[2] = pre[0] & a[0] & b[1];
    d[3] = pre[1] & a[1] & b[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_q <= 1'b0;
    else if (en) s_q <= (d[2] & la) | d[3];
  end
endmodule
