// tb_char_classifier: self-checking test of char_classifier.
//
// Reads all 256 addresses in random order and compares each word with the
// intended class table: column k (k < 16) holds a 1 only at the byte "c"+k,
// all other columns are 0. Checks the one-cycle read latency and that the
// output holds while en is low.
module tb_char_classifier;
  import reme_pkg::*;

  logic clk = 1'b0;
  logic en;
  char_t ch;
  logic [NCLASS-1:0] cls;
  int checks = 0, failures = 0;
  int order [256];

  always #5 clk = ~clk;

  char_classifier dut (.clk, .en, .ch, .cls);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NCLASS-1:0] expected(input int a);
    logic [NCLASS-1:0] w;
    w = '0;
    if (a >= 99 && a <= 114) w[a-99] = 1'b1;   // 'c' .. 'r'
    return w;
  endfunction

  initial begin
    logic [NCLASS-1:0] held;
    int j, tmp;
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      j = int'($urandom_range(0, i));
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
    en = 1'b0; ch = '0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      en = 1'b1; ch = char_t'(order[i]);
      @(negedge clk);
      checks++;
      if (cls !== expected(order[i])) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h", order[i], cls);
      end
    end
    // hold with en low
    held = cls;
    en = 1'b0; ch = "k";
    repeat (3) @(negedge clk);
    checks++;
    if (cls !== held) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
