// tb_reme_top: end-to-end test of reme_top at its default size (7 lanes).
//
// Every lane gets its own random stream with inserted instances of both
// expressions. Lanes 0..2 are fed without gaps; the other lanes see random
// idle cycles (in_valid low), so the lanes run out of step. Each lane's
// results are compared window by window with the reference NFAs
// (regex_ref_pkg). The test counts, and requires at least once:
//   - a match of each expression ending at an even and at an odd stream byte
//     (pairs aligned with and across the two-byte stride),
//   - each branch of each alternation and each group type completing a match
//     (recognised from the fragment that produced it),
//   - zero-length and multi-character star runs,
//   - idle input cycles, and lanes reporting matches in different cycles.
// Gap-free lanes must deliver one result per clock (2 bytes per clock).
module tb_reme_top;
  import reme_pkg::*;
  import regex_ref_pkg::*;
  localparam int L    = 7;
  localparam int NWIN = 1500;
  localparam int NB   = 2*NWIN + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [L-1:0] in_valid, out_valid;
  char_t [L-1:0][1:0] in_pair;
  logic [L-1:0][N_REGEX-1:0][1:0] match;

  byte  st [L][NB];
  logic [N_REGEX-1:0] ex [L][NB];
  int   nres [L];
  int   first_out [L], last_out [L];
  int   checks = 0, failures = 0, cyc = 0;
  int   seen [N_REGEX][2];
  int   frag_used [12];
  int   idle = 0, skew = 0;
  bit   done_drv [L];

  always #5 clk = ~clk;

  reme_top dut (.clk, .rst_n, .in_valid, .in_pair, .out_valid, .match);

  initial begin
    repeat (4 * NWIN + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (out_valid != '0 && out_valid != '1) skew++;
      for (int l = 0; l < L; l++) begin
        if (out_valid[l]) begin
          if (first_out[l] < 0) first_out[l] = cyc;
          last_out[l] = cyc;
          for (int r = 0; r < N_REGEX; r++)
            for (int k = 0; k < 2; k++) begin
              checks++;
              if (match[l][r][k]) seen[r][k]++;
              if (match[l][r][k] !== ex[l][2*nres[l]+k][r]) begin
                failures++;
                if (failures < 10)
                  $display("lane %0d window %0d regex %0d: got %b expected %b",
                           l, nres[l], r, match[l][r][k], ex[l][2*nres[l]+k][r]);
              end
            end
          nres[l]++;
        end
      end
    end
  end

  task automatic drive_lane(input int l);
    for (int j = 0; j <= NWIN; j++) begin
      @(negedge clk);
      if (l >= 3)
        while ($urandom_range(0, 4) == 0) begin
          in_valid[l] = 1'b0;
          idle++;
          @(negedge clk);
        end
      in_valid[l] = 1'b1;
      in_pair[l]  = {st[l][2*j+1], st[l][2*j]};
    end
    @(negedge clk) in_valid[l] = 1'b0;
    done_drv[l] = 1'b1;
  endtask

  initial begin
    logic [7:0]  s0;
    logic [13:0] s1;
    int p, fi;
    string f;
    for (int i = 0; i < 12; i++) frag_used[i] = 0;
    for (int r = 0; r < N_REGEX; r++) for (int k = 0; k < 2; k++) seen[r][k] = 0;
    for (int l = 0; l < L; l++) begin
      p = 0;
      while (p < NB) begin
        if ($urandom_range(0, 3) == 0) begin
          fi = int'($urandom_range(0, 11));
          f = fragment(fi);
          if (p + f.len() <= 2*NWIN) frag_used[fi]++;
          for (int i = 0; i < f.len() && p < NB; i++) st[l][p++] = byte'(f[i]);
        end else
          st[l][p++] = rand_char();
      end
      s0 = '0; s1 = '0;
      for (int q = 0; q < NB; q++) begin
        s0 = step_r0(s0, st[l][q]);
        s1 = step_r1(s1, st[l][q]);
        ex[l][q] = {s1[13], s0[7]};
      end
      nres[l] = 0; first_out[l] = -1; last_out[l] = -1; done_drv[l] = 1'b0;
    end
    in_valid = '0; in_pair = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int l = 0; l < L; l++)
      fork
        automatic int ll = l;
        drive_lane(ll);
      join_none
    wait (done_drv.and() == 1'b1);
    repeat (10) @(posedge clk);

    for (int l = 0; l < L; l++) begin
      checks++;
      if (nres[l] != NWIN) begin
        failures++;
        $display("lane %0d: %0d results, expected %0d", l, nres[l], NWIN);
      end
      if (l < 3) begin
        checks++;
        if (last_out[l] - first_out[l] != NWIN - 1) begin
          failures++;
          $display("lane %0d not at full rate", l);
        end
      end
    end
    for (int r = 0; r < N_REGEX; r++)
      for (int k = 0; k < 2; k++) begin
        $display("regex %0d matches ending at %s byte: %0d", r, k ? "odd " : "even", seen[r][k]);
        checks++;
        if (seen[r][k] == 0) failures++;
      end
    for (int i = 0; i < 12; i++) begin
      $display("fragment %-16s inserted %0d times", fragment(i), frag_used[i]);
      checks++;
      if (frag_used[i] == 0) failures++;
    end
    $display("idle input cycles %0d, cycles with lanes out of step %0d", idle, skew);
    checks += 2;
    if (idle == 0) failures++;
    if (skew == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
