// tb_dmb_crc22: checks the CRC-22 accumulator against long division.
//
// Feeds random messages of 1..40 words (with random idle cycles between
// words) and compares the CRC with the reference remainder. Also checks the
// value for the single word 0001 (x^22 mod x^22+x+1 = x+1 = 3) and that clr
// restarts the CRC.
module tb_dmb_crc22;
  import tb_dmb_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst, clr, en;
  logic [15:0] data;
  logic [21:0] crc;
  int          checks = 0, failures = 0;

  dmb_crc22 dut (.clk, .rst, .clr, .en, .data, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // deterministic pseudo-random test word
  function automatic logic [15:0] mix(input int t, input int i);
    logic [31:0] h;
    h = 32'(t) * 32'h9E3779B1 + 32'(i) * 32'h85EBCA77 + 32'h1234567;
    h ^= h >> 15;
    return h[15:0];
  endfunction

  // advance n clock cycles; inputs change 1 ns after the rising edge
  task automatic tick(input int n = 1);
    repeat (n) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic check(input logic [21:0] exp, input string what);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s: crc=%06h expected %06h", what, crc, exp);
    end
  endtask

  initial begin
    word_q_t     msg;
    logic [15:0] words [40];
    int          n;
    rst = 1'b1; clr = 1'b0; en = 1'b0; data = '0;
    tick(3);
    rst = 1'b0;
    tick();
    // single word 0x0001
    en = 1'b1; data = 16'h0001;
    tick();
    en = 1'b0;
    tick();
    check(22'h000003, "word 0001");
    for (int t = 0; t < 60; t++) begin
      clr = 1'b1;
      tick();
      clr = 1'b0;
      check(22'h0, "after clr");
      n = 1 + (t * 7) % 40;
      for (int i = 0; i < n; i++) words[i] = mix(t, i);
      for (int i = 0; i < n; i++) begin
        int idle;
        idle = (t + i) % 3;
        en = 1'b1; data = words[i];
        tick();
        en = 1'b0;
        tick(idle);
      end
      tick();
      msg = {};
      for (int i = 0; i < n; i++) msg.push_back(words[i]);
      check(ref_crc(msg), $sformatf("message %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
