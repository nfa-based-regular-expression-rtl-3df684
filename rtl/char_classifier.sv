// char_classifier: centralised character classification in one block RAM.
//
// A 256-entry ROM, addressed by the input byte, whose word holds one bit per
// character class: bit k is 1 when the byte belongs to class k. A class such as
// [ac] or \d costs one column of the memory instead of a tree of comparators.
// The engine uses three copies, one per window position. Contents come from
// reme_pkg::class_row(), evaluated at elaboration time.
//
// Timing: synchronous read like a block RAM. The class word for the byte
// presented with en=1 appears on cls in the next cycle and holds while en=0.
// Memory-based classification is part of the 2C-NFA method; the read latency of one
// cycle is this implementation's choice (the usual registered BRAM read).
module char_classifier
  import reme_pkg::*;
#(
  parameter int unsigned W = NCLASS   // output width of the memory word
)(
  input  logic          clk,
  input  logic          en,
  input  char_t         ch,
  output logic [W-1:0]  cls
);
  logic [W-1:0] rom [256];

  initial begin
    for (int unsigned a = 0; a < 256; a++) begin
      logic [NCLASS-1:0] row;
      row    = class_row(a);
      rom[a] = row[W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (en) cls <= rom[ch];
  end
endmodule
