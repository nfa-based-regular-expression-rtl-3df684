// t5_module: group "ab*", one class-A byte followed by any number of class-B
// bytes.
//
// One register s_q: the group is complete after the A byte and after every
// following B byte. Inside the window the group completes when A follows the
// predecessor's reach, or when B follows the group's own reach one position
// earlier. Read back in the next window, s_q stands for b0, and for b1 when w0
// is in A or B (lookbehind on the group's last byte). A completion at b2 is
// stored only when la is set; la is the successor's first class at w2 (a B at
// w2 is covered anyway, since it completes the group again at b3). Tie la to 0
// for a final group.
//
// Timing: d combinational; s_q updates on enabled clock edges.
module t5_module
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
    d[1] = (s_q & (a[0] | b[0])) | (pre[0] & a[0]);
    d[2] = (pre[1] & a[1]) | (d[1] & b[1]);
    d[3] = (pre[2] & a[2]) | (d[2] & b[2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_q <= 1'b0;
    else if (en) s_q <= (d[2] & la) | d[3];
  end
endmodule
