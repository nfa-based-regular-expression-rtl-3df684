// tb_nfa_cdefghijklmnop: self-checking test of the 2C-NFA circuit for cde*f*(g*hij|kl*m*)nop.
//
// The testbench forms the three-byte windows itself and drives the class
// words directly (class k set when the byte is "c"+k), so the circuit is
// tested without the window and classifier stages. The stream is random over
// the characters of the expression, with complete instances of the expression
// inserted, so that partial matches, overlaps and both start parities occur
// often. For window t, match[0] / match[1] must equal the reference NFA's
// verdict for stream bytes 2t / 2t+1. Matches at even and at odd bytes must
// both occur. One window per clock.
module tb_nfa_cdefghijklmnop;
  import reme_pkg::*;
  import regex_ref_pkg::*;
  localparam int NWIN = 20000;
  localparam int NB   = 2*NWIN + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [NCLASS-1:0] cm0, cm1, cm2;
  logic [1:0] match;
  byte  st [NB];
  logic ex [NB];
  int checks = 0, failures = 0;
  int seen [2];

  always #5 clk = ~clk;

  nfa_cdefghijklmnop dut (.clk, .rst_n, .en, .cm0, .cm1, .cm2, .match);

  initial begin
    repeat (NWIN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NCLASS-1:0] cword(input byte ch);
    logic [NCLASS-1:0] w;
    w = '0;
    for (int k = 0; k < 16; k++) w[k] = (ch == byte'(99 + k));
    return w;
  endfunction

  initial begin
    logic [13:0] s;
    int p;
    string f, alpha;
    alpha = "cdefghijklmnopx";
    p = 0;
    while (p < NB) begin
      if ($urandom_range(0, 7) == 0) begin
        f = fragment($urandom_range(2, 11));
        for (int i = 0; i < f.len() && p < NB; i++) st[p++] = byte'(f[i]);
      end else
        st[p++] = byte'(alpha[$urandom_range(0, alpha.len() - 1)]);
    end
    s = '0;
    for (int q = 0; q < NB; q++) begin
      s = step_r1(s, st[q]);
      ex[q] = s[13];
    end
    seen[0] = 0; seen[1] = 0;
    en = 1'b0; cm0 = '0; cm1 = '0; cm2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NWIN; t++) begin
      @(negedge clk);
      en  = 1'b1;
      cm0 = cword(st[2*t]);
      cm1 = cword(st[2*t+1]);
      cm2 = cword(st[2*t+2]);
      #1;
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (match[k]) seen[k]++;
        if (match[k] !== ex[2*t+k]) begin
          failures++;
          if (failures < 10)
            $display("window %0d byte %0d: got %b expected %b", t, 2*t+k, match[k], ex[2*t+k]);
        end
      end
    end
    $display("matches ending at even bytes %0d, odd bytes %0d", seen[0], seen[1]);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
