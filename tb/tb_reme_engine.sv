// tb_reme_engine: end-to-end test of one matching engine.
//
// Builds a random byte stream with many complete instances of both example
// expressions inserted (all group types, both alternatives, star runs of
// length 0 to 5, every start offset), feeds it two bytes per clock with no
// idle cycles, and compares each output window's match flags with the
// reference NFAs of regex_ref_pkg for stream bytes 2t and 2t+1. It also checks
// the throughput (one result per clock in steady state) and the latency
// (3 cycles from the pair after window t to its result), and counts how
// often each kind of match (expression, even or odd end byte) was seen.
module tb_reme_engine;
  import reme_pkg::*;
  import regex_ref_pkg::*;
  localparam int NWIN = 3000;
  localparam int NB   = 2*NWIN + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  char_t [1:0] in_pair;
  logic [N_REGEX-1:0][1:0] match;
  byte st [NB];
  logic [N_REGEX-1:0] ex [NB];
  int checks = 0, failures = 0;
  int nres = 0, cyc = 0, first_out = -1, last_out = -1;
  int seen [N_REGEX][2];

  always #5 clk = ~clk;

  reme_engine dut (.clk, .rst_n, .in_valid, .in_pair, .out_valid, .match);

  initial begin
    repeat (NWIN + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // edge that accepts pair 1, which completes window 0
  int npairs = 0, acc1 = -1;
  always @(posedge clk)
    if (rst_n && in_valid) begin
      npairs++;
      if (npairs == 2) acc1 = cyc;
    end

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      for (int r = 0; r < N_REGEX; r++)
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (match[r][k]) seen[r][k]++;
          if (match[r][k] !== ex[2*nres+k][r]) begin
            failures++;
            if (failures < 10)
              $display("window %0d regex %0d byte %0d: got %b expected %b",
                       nres, r, 2*nres+k, match[r][k], ex[2*nres+k][r]);
          end
        end
      nres++;
    end
  end

  initial begin
    logic [7:0]  s0;
    logic [13:0] s1;
    int p;
    string f;
    // stream: random filler with fragments inserted
    p = 0;
    while (p < NB) begin
      if ($urandom_range(0, 3) == 0) begin
        f = fragment($urandom);
        for (int i = 0; i < f.len() && p < NB; i++) st[p++] = byte'(f[i]);
      end else
        st[p++] = rand_char();
    end
    s0 = '0; s1 = '0;
    for (int q = 0; q < NB; q++) begin
      s0 = step_r0(s0, st[q]);
      s1 = step_r1(s1, st[q]);
      ex[q] = {s1[13], s0[7]};
    end
    for (int r = 0; r < N_REGEX; r++) for (int k = 0; k < 2; k++) seen[r][k] = 0;

    in_valid = 1'b0; in_pair = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // pair j goes in at cycle start+j; window t is complete with pair t+1
    for (int j = 0; j <= NWIN; j++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_pair  = {st[2*j+1], st[2*j]};
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(posedge clk);

    checks++;
    if (nres != NWIN) begin
      failures++;
      $display("expected %0d results, got %0d", NWIN, nres);
    end
    // throughput: NWIN results in NWIN consecutive cycles
    checks++;
    if (last_out - first_out != NWIN - 1) begin
      failures++;
      $display("results spread over %0d cycles", last_out - first_out + 1);
    end
    // latency: out_valid of window 0 is sampled at the third edge after the
    // edge that accepted pair 1 (window, classifier and output registers)
    checks++;
    $display("latency %0d edges", first_out - acc1);
    if (first_out - acc1 != 3) failures++;
    for (int r = 0; r < N_REGEX; r++)
      for (int k = 0; k < 2; k++) begin
        $display("regex %0d matches ending at %s byte: %0d", r, k ? "odd" : "even", seen[r][k]);
        checks++;
        if (seen[r][k] == 0) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
