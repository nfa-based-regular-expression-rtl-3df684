// t4_module: group "a*", any number (including zero) of class-A bytes.
//
// One register l_q for the A loop. Because the group may be empty, the
// predecessor's reach passes straight through to the output (the method's
// direct connection from S_i to the OR gate of S_j), ORed with the positions
// the unrolled loop reaches inside the window. The loop register is written
// with the loop's reach at b2 or b3 and read back at b0, and at b1 when w0 is
// in class A.
//
// Timing: d combinational; l_q updates on enabled clock edges.
module t4_module
  import reme_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  reach_t     pre,
  input  logic [2:0] a,
  output reach_t     d
);
  logic l_q;
  logic pa1, pa2, pa3;

  always_comb begin
    pa1 = (pre[0] | l_q) & a[0];
    pa2 = (pre[1] | pa1) & a[1];
    pa3 = (pre[2] | pa2) & a[2];
    d   = pre | {pa3, pa2, pa1, l_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  l_q <= 1'b0;
    else if (en) l_q <= pa2 | pa3;
  end
endmodule
