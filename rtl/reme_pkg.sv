// reme_pkg: shared constants and the character-class table of the
// regular-expression matching engine (REME).
//
// The engine consumes two input bytes per clock and looks at a three-byte
// window. Every window position is classified by a table lookup that returns
// one bit per character class. This package defines the window type, the
// boundary-vector type used between the group modules, and the class table.
//
// Class table: the engine carries the two worked examples of the 2C-NFA method,
// kl(mn|op)qr and cde*f*(g*hij|kl*m*)nop. All their characters are distinct
// single-character classes, so class k holds exactly the byte "c"+k for
// k = 0..15 ('c' .. 'r'). Columns 16 .. NCLASS-1 are unused and hold zeros.
// The table is a pure function of the byte, so it is computed here rather than
// read from a file. Replacing class_row() retargets the classifier to another
// expression set; the NFA modules only see class bits.
package reme_pkg;

  localparam int unsigned CHAR_W   = 8;     // byte-wide input characters
  localparam int unsigned NCLASS   = 64;    // classifier output width (one BRAM word)
  localparam int unsigned N_REGEX  = 2;     // expressions carried by one engine
  localparam int unsigned N_USED   = 16;    // classes 'c'..'r' in use

  typedef logic [CHAR_W-1:0] char_t;

  // Three consecutive characters: w[0] and w[1] are the pair consumed in
  // this cycle, w[2] is the first character of the next pair.
  typedef struct packed {
    char_t c2;
    char_t c1;
    char_t c0;
  } window_t;

  // Reach vector between group modules. Bit k = "the expression prefix ending
  // with this group can have been matched at boundary k of the window":
  // b0 = before w0, b1 = after w0, b2 = after w1, b3 = after w2.
  typedef logic [3:0] reach_t;

  // Class index of the single-character class for character ch ('c'..'r').
  function automatic int unsigned cls_idx(input byte ch);
    return int'(ch) - int'("c");
  endfunction

  // One row of the classifier: bit k set if byte ch belongs to class k.
  function automatic logic [NCLASS-1:0] class_row(input int unsigned ch);
    logic [NCLASS-1:0] row;
    row = '0;
    for (int unsigned k = 0; k < N_USED; k++)
      if (ch == k + 32'd99) row[k] = 1'b1;   // 99 = "c"
    return row;
  endfunction

endpackage
