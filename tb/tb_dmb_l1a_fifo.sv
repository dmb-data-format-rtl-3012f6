// tb_dmb_l1a_fifo: checks the L1A/BXN counters and FIFO (orbit of 20 BXs).
//
// After a BC0 and a SyncReset in the same cycle, L1As are sent at irregular
// cycles j (counted from that cycle). Each stored record must hold
// L1A number n (1, 2, ...), BXN (j-1) mod 20 and sync count (j-1) mod 16.
// Also checks the FIFO count and that a second SyncReset restarts the L1A
// numbers at 1 and flushes the FIFO.
module tb_dmb_l1a_fifo;
  import dmb_pkg::*;

  localparam int DEPTH = 8;
  localparam int ORBIT = 20;

  logic      clk = 1'b0;
  logic      rst, sync_rst, bc0, l1a_in, rd, empty, full;
  l1a_rec_t  rdata;
  logic [$clog2(DEPTH):0] count;
  int        checks = 0, failures = 0;
  int        when[$];

  dmb_l1a_fifo #(.DEPTH(DEPTH), .BX_PER_ORBIT(ORBIT)) dut (.*);

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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // start a batch: BC0 + SyncReset, then L1As at the given cycle offsets
  task automatic batch(input int offs[$]);
    int j;
    bc0 = 1'b1; sync_rst = 1'b1;
    tick();
    bc0 = 1'b0; sync_rst = 1'b0;
    j = 1;
    when.delete();
    foreach (offs[k]) begin
      while (j < offs[k]) begin
        tick();
        j++;
      end
      l1a_in = 1'b1;
      tick();
      l1a_in = 1'b0;
      when.push_back(j);
      j++;
    end
  endtask

  task automatic drain();
    expect_eq(32'(count), when.size(), "count");
    foreach (when[k]) begin
      expect_eq(32'(empty), 0, "not empty");
      expect_eq(32'(rdata.l1a), k + 1, "L1A number");
      expect_eq(32'(rdata.bxn), (when[k] - 1) % ORBIT, "BXN");
      expect_eq(32'(rdata.sync), (when[k] - 1) % 16, "sync count");
      rd = 1'b1;
      tick();
      rd = 1'b0;
    end
    expect_eq(32'(empty), 1, "empty after drain");
  endtask

  initial begin
    rst = 1'b1; sync_rst = 1'b0; bc0 = 1'b0; l1a_in = 1'b0; rd = 1'b0;
    tick(3);
    rst = 1'b0;
    tick(5);
    batch('{1, 4, 9, 17, 21, 26, 33, 41});
    drain();
    batch('{3, 6});
    drain();
    // SyncReset flushes pending records
    batch('{2});
    sync_rst = 1'b1;
    tick();
    sync_rst = 1'b0;
    expect_eq(32'(empty), 1, "flushed by SyncReset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
