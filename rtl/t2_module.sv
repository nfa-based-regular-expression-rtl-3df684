// t2_module: group "a", a single character. It can only end an expression
// (the last group of a subexpression with an odd number of characters).
//
// The character may sit at any of the three window positions; d[k] is set
// when the predecessor reached boundary k-1 and the byte after it is in
// class A. Since the group is final, nothing is stored: d[1] and d[2] are the
// match flags for stream bytes 2t and 2t+1, and a completion at b3 (byte 2t+2)
// is found again in the next window as d[1], from the predecessor's stored
// state. d[0] is constant 0 because a final group hands nothing on.
//
// Timing: purely combinational. The role as final module is part of the 2C-NFA method;
// the absence of a state register is this implementation's choice, possible
// because the next window re-derives the b3 case.
module t2_module
  import reme_pkg::*;
(
  input  reach_t     pre,
  input  logic [2:0] a,
  output reach_t     d
);
  always_comb begin
    d[0] = 1'b0;
    d[1] = pre[0] & a[0];
    d[2] = pre[1] & a[1];
    d[3] = pre[2] & a[2];
  end
endmodule
