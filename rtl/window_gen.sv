// window_gen: the 2-character shifted 3-character window.
//
// The input stream arrives as pairs of bytes, one pair per valid cycle
// (in_pair[0] is the earlier byte). For every new pair the block emits the
// window (p0, p1, n0): the previous pair followed by the first byte of the new
// pair. Consecutive windows therefore overlap by one byte and advance by two,
// so every pair of neighbouring stream bytes lies completely inside exactly one
// window: at positions 0-1 if it starts at an even stream offset, at
// positions 1-2 if it starts at an odd offset. This is what lets the 2-stride
// NFA find an expression that starts at any offset.
//
// Timing: one register stage. The window for pair t leaves the block in the
// cycle after pair t+1 was accepted (out_valid high for one cycle per accepted
// pair, except the very first pair after reset). No back-pressure. Windows are
// numbered from 0; window t covers stream bytes 2t, 2t+1 and 2t+2.
// The windowing is the 2C-NFA method's; the one-pair buffer and
// handshake are this implementation's choice.
module window_gen
  import reme_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  char_t [1:0]       in_pair,
  output logic              out_valid,
  output window_t           out_win
);
  char_t [1:0] prev_q;
  logic        have_prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q      <= '0;
      have_prev_q <= 1'b0;
      out_valid   <= 1'b0;
      out_win     <= '0;
    end else begin
      out_valid <= in_valid && have_prev_q;
      if (in_valid) begin
        out_win     <= '{c2: in_pair[0], c1: prev_q[1], c0: prev_q[0]};
        prev_q      <= in_pair;
        have_prev_q <= 1'b1;
      end
    end
  end
endmodule
