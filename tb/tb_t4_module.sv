// tb_t4_module: self-checking test of t4_module (group a*).
//
// The group under test is placed behind a single-character prefix "x", i.e.
// the expression "xa*". The testbench drives the predecessor reach vector
// exactly (pre[k] = an 'x' sits just before window boundary k) and the class
// bits straight from the window bytes, over a random stream of the bytes
// x, a, b and y. An independent character-at-a-time NFA of "xa*" gives, for
// every stream byte, whether a match ends there; outputs d[1], d[2] and d[3]
// of window t must equal that for bytes 2t, 2t+1 and 2t+2. The group is used
// as a final group (lookahead tied to 0), where its outputs are exact.
// One window is presented per clock, so the module is also checked to keep
// up with two bytes per cycle.
module tb_t4_module;
  import reme_pkg::*;
  localparam int NWIN = 4000;
  localparam int NB   = 2*NWIN + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  reach_t pre, d;
  logic [2:0] a, b;
  byte st [NB];
  logic ex [NB];
  logic rx, ra, rb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  t4_module dut (.clk, .rst_n, .en, .pre, .a, .d);
  wire unused_b = ^b;

  initial begin
    #(10 * (NWIN + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic isx(int p);
    return (p >= 0) && (st[p] == "x");
  endfunction

  initial begin
    int r;
    logic nx, na, nb;
    // random stream, reference match-end flags
    rx = 0; ra = 0; rb = 0;
    for (int p = 0; p < NB; p++) begin
      r = int'($urandom_range(0, 9));
      st[p] = (r < 3) ? "x" : (r < 6) ? "a" : (r < 9) ? "b" : "y";
      nx = (st[p] == "x");
      na = (rx | ra) & (st[p] == "a"); nb = 1'b0;
      ex[p] = nx | na;
      rx = nx; ra = na; rb = nb;
    end
    en = 0; pre = '0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NWIN; t++) begin
      @(negedge clk);
      en  = 1'b1;
      pre = {isx(2*t+2), isx(2*t+1), isx(2*t), isx(2*t-1)};
      for (int i = 0; i < 3; i++) begin
        a[i] = (st[2*t+i] == "a");
        b[i] = (st[2*t+i] == "b");
      end
      #1;
      for (int k = 1; k < 4; k++) begin
        checks++;
        if (d[k] !== ex[2*t+k-1]) begin
          failures++;
          if (failures < 10)
            $display("mismatch window %0d d[%0d]=%b expected %b", t, k, d[k], ex[2*t+k-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
