// t6_module: group "a*b*", class-A bytes then class-B bytes, either run
// possibly empty.
//
// Two loop registers, lA_q and lB_q, as in the combination of t3 and t5 the
// design describes. The predecessor's reach passes through (empty group); the
// A loop is entered from the predecessor, the B loop from the predecessor or
// from the A loop, and both are unrolled over the three window positions.
// Each register holds its loop's reach at b2 or b3 and is read back at b0, and
// at b1 when w0 is in its own class.
//
// Timing: d combinational; the loop registers update on enabled clock edges.
module t6_module
  import reme_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  reach_t     pre,
  input  logic [2:0] a,
  input  logic [2:0] b,
  output reach_t     d
);
  logic la_q, lb_q;
  logic pa1, pa2, pa3, pb1, pb2, pb3;

  always_comb begin
    pa1 = (pre[0] | la_q) & a[0];
    pa2 = (pre[1] | pa1) & a[1];
    pa3 = (pre[2] | pa2) & a[2];
    pb1 = (pre[0] | la_q | lb_q) & b[0];
    pb2 = (pre[1] | pa1 | pb1) & b[1];
    pb3 = (pre[2] | pa2 | pb2) & b[2];
    d   = pre | {pa3 | pb3, pa2 | pb2, pa1 | pb1, la_q | lb_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la_q <= 1'b0;
      lb_q <= 1'b0;
    end else if (en) begin
      la_q <= pa2 | pa3;
      lb_q <= pb2 | pb3;
    end
  end
endmodule
