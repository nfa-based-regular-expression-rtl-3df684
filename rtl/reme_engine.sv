// reme_engine: one regular-expression matching engine (REME) for one byte
// stream, two bytes per clock.
//
// Pipeline:
//   1. window_gen   forms the 3-byte window (pair t, first byte of pair t+1);
//   2. three char_classifier ROMs, one per window position, classify the
//      three bytes in parallel (the classification memory is replicated three
//      times because all three positions are needed in the same cycle);
//   3. the expression circuits (nfa_klmnopqr, nfa_cdefghijklmnop) advance one
//      window per cycle and produce match flags, registered at the output.
//
// Interface: in_valid/in_pair accept one pair per cycle, in_pair[0] first.
// out_valid marks one result per window t; match[r][0] / match[r][1] say
// that expression r has a match ending at stream byte 2t / 2t+1. Expression 0
// is kl(mn|op)qr, expression 1 is cde*f*(g*hij|kl*m*)nop.
// Timing: the result of window t appears 3 cycles after the cycle in which pair
// t+1 was accepted; throughput is 2 bytes per clock (16 bits per clock).
// A window is only formed once the following pair has arrived, so the last
// pair of a stream is examined after one more pair (any filler) is sent.
module reme_engine
  import reme_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  char_t [1:0]            in_pair,
  output logic                   out_valid,
  output logic [N_REGEX-1:0][1:0] match
);
  logic              win_valid, cls_valid;
  window_t           win;
  logic [NCLASS-1:0] cm0, cm1, cm2;
  logic [N_REGEX-1:0][1:0] match_c;

  window_gen u_win (.clk, .rst_n, .in_valid, .in_pair, .out_valid(win_valid), .out_win(win));

  char_classifier u_cls0 (.clk, .en(win_valid), .ch(win.c0), .cls(cm0));
  char_classifier u_cls1 (.clk, .en(win_valid), .ch(win.c1), .cls(cm1));
  char_classifier u_cls2 (.clk, .en(win_valid), .ch(win.c2), .cls(cm2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cls_valid <= 1'b0;
    else        cls_valid <= win_valid;
  end

  nfa_klmnopqr       u_re0 (.clk, .rst_n, .en(cls_valid), .cm0, .cm1, .cm2, .match(match_c[0]));
  nfa_cdefghijklmnop u_re1 (.clk, .rst_n, .en(cls_valid), .cm0, .cm1, .cm2, .match(match_c[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      match     <= '0;
    end else begin
      out_valid <= cls_valid;
      match     <= cls_valid ? match_c : '0;
    end
  end
endmodule
