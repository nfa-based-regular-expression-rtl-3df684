// regex_ref_pkg: reference matchers used by the testbenches.
//
// Plain one-character-per-step Glushkov NFAs of the two example expressions,
// written independently of the RTL: one state bit per character position of
// the expression, updated once per stream byte. A match may start at any
// byte, so the first position is entered on every byte. step_*() returns the
// new state; bit 0 of the result's "hit" tells that a match ends at this byte.
package regex_ref_pkg;

  // kl(mn|op)qr  positions: 0 k, 1 l, 2 m, 3 n, 4 o, 5 p, 6 q, 7 r
  function automatic logic [7:0] step_r0(input logic [7:0] s, input byte c);
    logic [7:0] n;
    n[0] = (c == "k");
    n[1] = s[0] & (c == "l");
    n[2] = s[1] & (c == "m");
    n[3] = s[2] & (c == "n");
    n[4] = s[1] & (c == "o");
    n[5] = s[4] & (c == "p");
    n[6] = (s[3] | s[5]) & (c == "q");
    n[7] = s[6] & (c == "r");
    return n;
  endfunction

  // cde*f*(g*hij|kl*m*)nop
  // positions: 0 c, 1 d, 2 e, 3 f, 4 g, 5 h, 6 i, 7 j, 8 k, 9 l, 10 m,
  //            11 n, 12 o, 13 p
  function automatic logic [13:0] step_r1(input logic [13:0] s, input byte c);
    logic [13:0] n;
    logic        ef_end, alt_end;
    ef_end  = s[1] | s[2] | s[3];
    alt_end = s[7] | s[8] | s[9] | s[10];
    n[0]  = (c == "c");
    n[1]  = s[0] & (c == "d");
    n[2]  = (s[1] | s[2]) & (c == "e");
    n[3]  = ef_end & (c == "f");
    n[4]  = (ef_end | s[4]) & (c == "g");
    n[5]  = (ef_end | s[4]) & (c == "h");
    n[6]  = s[5] & (c == "i");
    n[7]  = s[6] & (c == "j");
    n[8]  = ef_end & (c == "k");
    n[9]  = (s[8] | s[9]) & (c == "l");
    n[10] = (s[8] | s[9] | s[10]) & (c == "m");
    n[11] = alt_end & (c == "n");
    n[12] = s[11] & (c == "o");
    n[13] = s[12] & (c == "p");
    return n;
  endfunction

  // Random stream byte: mostly characters of the expressions, some filler.
  function automatic byte rand_char();
    int r;
    r = int'($urandom_range(0, 19));
    return (r < 16) ? byte'(99 + r) : "x";   // 99 = "c"
  endfunction

  // Fragments that complete a match of either expression when dropped into a
  // random stream; they exercise every group type and both alternatives.
  function automatic string fragment(input int unsigned i);
    case (i % 12)
      0:  return "klmnqr";
      1:  return "klopqr";
      2:  return "cdhijnop";
      3:  return "cdeeffgghijnop";
      4:  return "cdknop";
      5:  return "cdkllmmnop";
      6:  return "cdefggghijnop";
      7:  return "cdfkmnop";
      8:  return "cdeklnop";
      9:  return "cdgghijnop";
      10: return "cdeeeeeknop";
      default: return "cdkmmmmnop";
    endcase
  endfunction

endpackage
