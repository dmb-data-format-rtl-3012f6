// tb_dmb_input_fifo: checks one FEB input FIFO (depth reduced to 16).
//
// Compares the popped words with a queue model, the half-full warning
// (1 up to 8 entries, 0 above), the empty flag, that a write to a full FIFO
// is dropped, that the full flag stays set after the FIFO drains, and that
// SyncReset clears it and empties the FIFO. Ends with random traffic.
module tb_dmb_input_fifo;
  import dmb_pkg::*;

  localparam int DEPTH = 16;

  logic      clk = 1'b0;
  logic      rst, sync_rst, wr, rd;
  feb_word_t wdata, rdata;
  logic      empty, half_ok, full_stk;
  int        checks = 0, failures = 0;
  feb_word_t model[$];

  dmb_input_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input int n = 1);
    repeat (n) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic feb_word_t rnd_word();
    feb_word_t w;
    w.data = 16'($urandom);
    w.eoe  = 1'($urandom);
    w.ovl  = 1'($urandom);
    return w;
  endfunction

  // one cycle: optional push and pop, model updated alongside
  task automatic cycle(input logic do_wr, input logic do_rd);
    feb_word_t w;
    logic      acc;
    w  = rnd_word();
    wr = do_wr; wdata = w; rd = do_rd;
    if (do_rd && model.size() > 0) begin
      expect_eq(32'(rdata), 32'(model[0]), "head word");
    end
    acc = do_wr && model.size() < DEPTH;
    tick();
    if (do_rd && model.size() > 0) void'(model.pop_front());
    if (acc) model.push_back(w);
    wr = 1'b0; rd = 1'b0;
  endtask

  initial begin
    rst = 1'b1; sync_rst = 1'b0; wr = 1'b0; rd = 1'b0; wdata = '0;
    tick(3);
    rst = 1'b0;
    tick();
    expect_eq(32'(empty), 1, "empty after reset");
    expect_eq(32'(half_ok), 1, "half_ok after reset");
    expect_eq(32'(full_stk), 0, "full after reset");
    for (int i = 0; i < DEPTH / 2; i++) cycle(1'b1, 1'b0);
    expect_eq(32'(half_ok), 1, "half_ok at half");
    expect_eq(32'(empty), 0, "not empty");
    cycle(1'b1, 1'b0);
    expect_eq(32'(half_ok), 0, "half warning above half");
    while (model.size() < DEPTH) cycle(1'b1, 1'b0);
    expect_eq(32'(full_stk), 0, "full flag one cycle after full");
    cycle(1'b1, 1'b0);                      // dropped
    expect_eq(32'(full_stk), 1, "full flag");
    cycle(1'b1, 1'b0);                      // dropped
    expect_eq(32'(model.size()), DEPTH, "model depth");
    while (model.size() > 0) cycle(1'b0, 1'b1);
    expect_eq(32'(empty), 1, "empty after drain");
    expect_eq(32'(half_ok), 1, "half_ok after drain");
    expect_eq(32'(full_stk), 1, "full flag persists");
    // random traffic
    for (int i = 0; i < 400; i++) cycle(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    while (model.size() > 0) cycle(1'b0, 1'b1);
    expect_eq(32'(empty), 1, "empty after random");
    // SyncReset
    cycle(1'b1, 1'b0);
    sync_rst = 1'b1;
    tick();
    sync_rst = 1'b0;
    model.delete();
    expect_eq(32'(full_stk), 0, "full cleared by SyncReset");
    expect_eq(32'(empty), 1, "flushed by SyncReset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
