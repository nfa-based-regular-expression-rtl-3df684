// tb_window_gen: self-checking test of window_gen.
//
// Sends a random byte stream as pairs, with random idle cycles between pairs,
// and checks that the k-th output window is (byte 2k, byte 2k+1, byte 2k+2)
// of the stream, that exactly one window follows every pair after the first,
// and that a window leaves the block right after the clock edge that
// accepted the pair completing it (one register stage).
module tb_window_gen;
  import reme_pkg::*;
  localparam int NPAIR = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  char_t [1:0] in_pair;
  window_t out_win;
  byte st [2*NPAIR];
  int checks = 0, failures = 0, nwin = 0, idle = 0;
  logic accepted_prev = 1'b0;
  int   npairs_in = 0;

  always #5 clk = ~clk;

  window_gen dut (.clk, .rst_n, .in_valid, .in_pair, .out_valid, .out_win);

  initial begin
    repeat (4 * NPAIR + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output check, sampled just before each edge.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      // a window is expected exactly when the previous edge accepted a pair
      // that was not the first one
      if (out_valid !== (accepted_prev && npairs_in > 1)) begin
        failures++;
        $display("out_valid=%b unexpected (pairs in %0d)", out_valid, npairs_in);
      end
      if (out_valid) begin
        checks++;
        if (out_win.c0 !== st[2*nwin] || out_win.c1 !== st[2*nwin+1] ||
            out_win.c2 !== st[2*nwin+2]) begin
          failures++;
          if (failures < 10) $display("window %0d wrong", nwin);
        end
        nwin++;
      end
      accepted_prev = in_valid;
      if (in_valid) npairs_in++;
    end
  end

  initial begin
    for (int p = 0; p < 2*NPAIR; p++) st[p] = byte'($urandom_range(0, 255));
    in_valid = 1'b0; in_pair = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int j = 0; j < NPAIR; j++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        in_pair  = char_t'($urandom);
        idle++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_pair  = {st[2*j+1], st[2*j]};
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (nwin != NPAIR - 1) begin
      failures++;
      $display("got %0d windows, expected %0d", nwin, NPAIR - 1);
    end
    checks++;
    if (idle == 0) failures++;
    $display("idle cycles %0d", idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
