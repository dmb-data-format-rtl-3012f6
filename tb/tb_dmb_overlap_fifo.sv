// tb_dmb_overlap_fifo: checks the shared CFEB overlap FIFO (depth 16).
//
// Stores tagged samples of several CFEBs, marks the event boundary and
// checks that prev_left counts down only the entries stored before the mark
// while new entries are pushed behind them, that words and CFEB numbers come
// out in order, the full flag, and the flush by SyncReset. A final random
// phase drives wr, rd and mark freely and compares every output each cycle
// with a queue model.
module tb_dmb_overlap_fifo;
  import dmb_pkg::*;

  localparam int DEPTH = 16;

  logic      clk = 1'b0;
  logic      rst, sync_rst, wr, rd, mark, empty, full;
  ovl_word_t wdata, rdata;
  logic [$clog2(DEPTH):0] prev_left;
  int        checks = 0, failures = 0;
  ovl_word_t model[$];

  dmb_overlap_fifo #(.DEPTH(DEPTH)) dut (.*);

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

  task automatic push(input int cfeb);
    ovl_word_t w;
    w.cfeb = 3'(cfeb);
    w.data = 16'($urandom);
    wr = 1'b1; wdata = w;
    tick();
    wr = 1'b0;
    model.push_back(w);
  endtask

  task automatic pop_and_push(input logic also_push, input int cfeb);
    ovl_word_t w;
    expect_eq(32'(rdata), 32'(model[0]), "head entry");
    w.cfeb = 3'(cfeb);
    w.data = 16'($urandom);
    rd = 1'b1; wr = also_push; wdata = w;
    tick();
    rd = 1'b0; wr = 1'b0;
    void'(model.pop_front());
    if (also_push) model.push_back(w);
  endtask

  // random wr/rd/mark; like the FIFO, the model drops a write when full (even
  // with a read in the same cycle) and a pop when empty
  task automatic random_phase(input int n);
    int pl = 0;
    for (int c = 0; c < n; c++) begin
      ovl_word_t w;
      logic      do_wr, do_rd, do_mark, was_full, was_empty;
      expect_eq(32'(empty), 32'(model.size() == 0), "random empty");
      expect_eq(32'(full), 32'(model.size() == DEPTH), "random full");
      expect_eq(32'(prev_left), 32'(pl), "random prev_left");
      if (model.size() > 0) expect_eq(32'(rdata), 32'(model[0]), "random head");
      w.cfeb  = 3'($urandom_range(4));
      w.data  = 16'($urandom);
      do_wr   = ($urandom_range(99) < 55);
      do_rd   = ($urandom_range(99) < 45);
      do_mark = ($urandom_range(99) < 5);
      wr = do_wr; rd = do_rd; mark = do_mark; wdata = w;
      tick();
      wr = 1'b0; rd = 1'b0; mark = 1'b0;
      was_full  = (model.size() == DEPTH);
      was_empty = (model.size() == 0);
      if (do_mark)                           pl = model.size();
      else if (do_rd && !was_empty && pl > 0) pl--;
      if (do_rd && !was_empty) void'(model.pop_front());
      if (do_wr && !was_full)  model.push_back(w);
    end
  endtask

  initial begin
    rst = 1'b1; sync_rst = 1'b0; wr = 1'b0; rd = 1'b0; mark = 1'b0; wdata = '0;
    tick(3);
    rst = 1'b0;
    tick();
    expect_eq(32'(empty), 1, "empty after reset");
    push(0); push(0); push(2); push(3); push(3);
    expect_eq(32'(prev_left), 0, "prev_left before mark");
    mark = 1'b1;
    tick();
    mark = 1'b0;
    expect_eq(32'(prev_left), 5, "prev_left after mark");
    pop_and_push(1'b0, 0);
    pop_and_push(1'b1, 1);
    expect_eq(32'(prev_left), 3, "prev_left after 2 pops");
    pop_and_push(1'b1, 4);
    pop_and_push(1'b0, 0);
    pop_and_push(1'b1, 4);
    expect_eq(32'(prev_left), 0, "prev_left after old entries");
    expect_eq(32'(empty), 0, "new entries kept");
    mark = 1'b1;
    tick();
    mark = 1'b0;
    expect_eq(32'(prev_left), 3, "prev_left second event");
    while (model.size() > 0) pop_and_push(1'b0, 0);
    expect_eq(32'(empty), 1, "empty after drain");
    expect_eq(32'(prev_left), 0, "prev_left at end");
    for (int i = 0; i < DEPTH; i++) push(i % 5);
    expect_eq(32'(full), 1, "full");
    sync_rst = 1'b1;
    tick();
    sync_rst = 1'b0;
    model.delete();
    expect_eq(32'(empty), 1, "flushed by SyncReset");
    random_phase(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
