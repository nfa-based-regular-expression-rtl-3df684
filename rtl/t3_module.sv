// t3_module: group "a*b", any number of class-A bytes followed by one class-B
// byte.
//
// Two registers: l_q (inside the A loop, S_i of the method's T3 graph) and s_q (group
// complete, S_j). Within a window the A loop is unrolled over the three byte
// positions: the loop is entered from the predecessor or continued from l_q,
// and B may follow either. Consequences, each named in the method: a string
// ending in "A A" keeps the loop active; "A B" at positions 1-2 needs no
// lookbehind ("C_none A B") because the A may itself be part of the loop; and
// the predecessor completing inside the window at b2 chains straight into B at
// position 2 (the transition S_h -> S_j on "C_m C_m+1 B").
// Both registers are written with the boundary b2 or b3 they were reached at,
// and read back as b0 or b1 with the same lookbehind/lookahead rules as
// t1_module (la: first class of the successor at w2; 0 for a final group).
//
// Timing: d combinational; l_q and s_q update on enabled clock edges.
module t3_module
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
  logic l_q, s_q;
  logic pa1, pa2, pa3;

  always_comb begin
    pa1  = (pre[0] | l_q) & a[0];
    pa2  = (pre[1] | pa1) & a[1];
    pa3  = (pre[2] | pa2) & a[2];
    d[0] = s_q;
    d[1] = (s_q | pre[0] | l_q) & b[0];
    d[2] = (pre[1] | pa1) & b[1];
    d[3] = (pre[2] | pa2) & b[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= 1'b0;
      s_q <= 1'b0;
    end else if (en) begin
      l_q <= pa2 | pa3;
      s_q <= (d[2] & la) | d[3];
    end
  end
endmodule
