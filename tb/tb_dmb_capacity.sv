// tb_dmb_capacity: the DMB buffers filled to the sizes they are built for.
//
// Runs dmb_top at its default sizes through three loads:
//   1. Twenty 8-sample CFEB events (800 words each, 16000 words) wait in
//      CFEB1's input FIFO before their L1As arrive: the FIFO must warn
//      (above half) but never report full, and all twenty events must come
//      out intact while the twenty quick L1As back up (L1_PIPE).
//   2. One 16-sample event from all five CFEBs (5 x 1600 words) with every
//      sample tagged as overlapping: the 8000 stored samples must fit in the
//      overlap FIFO and lead each CFEB block of the next event.
//   3. 400 L1As, 3 BX apart, each with a 3-word ALCT block: the backlog must
//      grow past 127 so that DMB_L1_PIPE switches to its scaled form, and the
//      L1A FIFO must not fill.
// Every event is compared word by word with the reference model; status
// fields (FIFO flags, L1_PIPE) are read from the stream and checked where
// the load fixes them.
module tb_dmb_capacity;
  import dmb_pkg::*;
  import tb_dmb_ref_pkg::*;

  localparam int DLY = 6;
  localparam logic [7:0] CRATE = 8'h11;
  localparam logic [3:0] ID    = 4'd2;

  logic                  clk = 1'b0;
  logic                  rst, sync_rst, bc0, l1a;
  logic [N_FEB-1:0]      feb_dav, feb_wr;
  feb_word_t [N_FEB-1:0] feb_wdata;
  logic [15:0]           ddu_data;
  logic                  ddu_valid, busy, l1a_fifo_full;
  logic [N_FEB-1:0]      feb_full_stk;
  int checks = 0, failures = 0;

  dmb_top dut (
    .clk, .rst, .sync_rst, .bc0, .l1a, .l1a_delay(8'(DLY)), .crate_id(CRATE), .dmb_id(ID),
    .feb_dav, .feb_wr, .feb_wdata, .cfeb_movlp(5'b0), .tmb_cfeb_active(5'b0),
    .ddu_data, .ddu_valid, .busy, .feb_full_stk, .l1a_fifo_full
  );

  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [15:0] got[$];
  always @(posedge clk) if (ddu_valid) got.push_back(ddu_data);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input int n = 1);
    repeat (n) begin
      @(posedge clk);
      #1;
    end
  endtask

  task automatic expect_eq(input logic [31:0] got_v, input logic [31:0] exp, input string what);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got_v, exp);
    end
  endtask

  // board word queues, one word per BX into the DMB
  feb_word_t feb_q[N_FEB][$];
  always @(posedge clk) begin
    #2;
    for (int f = 0; f < N_FEB; f++) begin
      feb_wr[f] = feb_q[f].size() > 0;
      if (feb_q[f].size() > 0) feb_wdata[f] = feb_q[f].pop_front();
    end
  end

  function automatic word_q_t mkwords(input int tag, input int n);
    word_q_t q;
    for (int i = 0; i < n; i++) q.push_back(16'((tag << 11) ^ (i * 37)) & 16'h7FFF);
    return q;
  endfunction

  task automatic queue(input int f, input word_q_t w, input logic all_ovl);
    foreach (w[i]) begin
      feb_word_t fw;
      fw.data = w[i];
      fw.eoe  = (i == w.size() - 1);
      fw.ovl  = all_ovl;
      feb_q[f].push_back(fw);
    end
  endtask

  // expected events, in L1A order
  typedef struct {
    logic [23:0] l1a;
    logic [11:0] bxn;
    logic [3:0]  sync;
    logic [6:0]  dav;
    word_q_t     blk[7];   // expected block of each board
  } ev_t;
  ev_t evs[$];
  longint t0;
  int     l1a_num = 0;

  // L1A with DAV from the boards in dav, at the window centre
  task automatic trigger(input logic [6:0] dav, input word_q_t blk[7]);
    ev_t e;
    l1a = 1'b1;
    l1a_num++;
    e.l1a = 24'(l1a_num);
    e.bxn = 12'((cyc - t0 - 1) % 3564);
    e.sync = 4'((cyc - t0 - 1) % 16);
    e.dav = dav;
    for (int f = 0; f < N_FEB; f++) e.blk[f] = blk[f];
    evs.push_back(e);
    tick();
    l1a = 1'b0;
    fork
      begin
        tick(DLY - 1);
        feb_dav = feb_dav | dav;
        tick();
        feb_dav = feb_dav & ~dav;
      end
    join_none
  endtask

  task automatic wait_idle();
    tick(DLY + 8);
    while (busy || dut.u_l1a_fifo.count != 0 || dut.u_dav_window.count != 0) tick();
    tick(4);
  endtask

  int max_pipe = 0, half_seen = 0, full_seen = 0;

  task automatic check_all();
    int p;
    p = 0;
    foreach (evs[i]) begin
      word_q_t exp;
      int n_data, t, pipe;
      logic [6:0] half_ok, empt, full;
      logic [7:0] pf;
      n_data = 0;
      for (int f = 0; f < N_FEB; f++) n_data += evs[i].blk[f].size();
      t = p + 8 + n_data;
      if (t + 8 > got.size()) begin
        expect_eq(0, 1, $sformatf("event %0d missing", i));
        break;
      end
      half_ok = {got[t + 1][5], got[t + 1][6], got[t + 1][4:0]};
      empt    = {got[t + 2][2], got[t + 2][3], got[t + 4][4:0]};
      full    = {got[t + 4][10], got[t + 4][11], got[t + 4][9:5]};
      pf      = got[t + 2][11:4];
      pipe    = pf[7] ? int'(pf[6:0]) * 8 : int'(pf);
      if (pipe > max_pipe) max_pipe = pipe;
      if (!half_ok[0]) half_seen++;
      if (full != '0) full_seen++;
      exp = ref_event(evs[i].l1a, evs[i].bxn, evs[i].sync, evs[i].dav, 5'b0, 5'b0, CRATE, ID,
                      evs[i].blk[5], evs[i].blk[6], evs[i].blk[0], evs[i].blk[1],
                      evs[i].blk[2], evs[i].blk[3], evs[i].blk[4],
                      half_ok, empt, full, 7'b0, 7'b0, pipe);
      begin
        int bad;
        bad = 0;
        for (int k = 0; k < exp.size(); k++) if (got[p + k] !== exp[k]) bad++;
        expect_eq(32'(bad), 0, $sformatf("event %0d: words differing", i));
      end
      p += exp.size();
    end
    expect_eq(32'(got.size()), 32'(p), "stream length");
  endtask

  initial begin
    word_q_t none[7], b[7], stored[5];
    rst = 1'b1; sync_rst = 1'b0; bc0 = 1'b0; l1a = 1'b0; feb_dav = '0;
    for (int f = 0; f < N_FEB; f++) none[f] = {};
    tick(4);
    rst = 1'b0;
    bc0 = 1'b1; sync_rst = 1'b1; t0 = cyc;
    tick();
    bc0 = 1'b0; sync_rst = 1'b0;

    // 1. twenty 800-word CFEB1 events waiting in the FIFO
    for (int i = 0; i < 20; i++) queue(0, mkwords(i, 800), 1'b0);
    while (feb_q[0].size() > 0) tick();
    tick(2);
    expect_eq(32'(dut.u_builder.feb_half_ok[0]), 0, "CFEB1 FIFO above half with 20 events");
    expect_eq(32'(feb_full_stk[0]), 0, "CFEB1 FIFO not full with 20 events");
    for (int i = 0; i < 20; i++) begin
      b = none;
      b[0] = mkwords(i, 800);
      trigger(7'b0000001, b);
      tick(2);
    end
    wait_idle();
    expect_eq(32'(feb_full_stk[0]), 0, "CFEB1 never full");

    // 2. 16-sample event from five CFEBs, all samples overlapping
    b = none;
    for (int k = 0; k < 5; k++) begin
      b[k] = mkwords(8 + k, 1600);
      stored[k] = b[k];
      queue(k, b[k], 1'b1);
    end
    trigger(7'b0011111, b);
    wait_idle();
    expect_eq(32'(dut.u_ovl_fifo.u_fifo.count), 8000, "8000 samples stored");
    expect_eq(32'(dut.u_ovl_fifo.full), 0, "overlap FIFO not full");
    b = none;
    for (int k = 0; k < 5; k++) begin
      word_q_t w;
      w = mkwords(16 + k, 1);
      queue(k, w, 1'b0);
      b[k] = {stored[k], w};
    end
    trigger(7'b0011111, b);
    wait_idle();
    expect_eq(32'(dut.u_ovl_fifo.u_fifo.count), 0, "overlap FIFO drained");

    // 3. 400 L1As, 3 BX apart, ALCT data each
    for (int i = 0; i < 400; i++) begin
      word_q_t w;
      w = mkwords(i % 16, 3);
      queue(FEB_ALCT, w, 1'b0);
      b = none;
      b[FEB_ALCT] = w;
      trigger(7'b0100000, b);
      tick(2);
      if (l1a_fifo_full) expect_eq(1, 0, "L1A FIFO full");
    end
    wait_idle();

    check_all();
    $display("events=%0d max L1_PIPE=%0d", evs.size(), max_pipe);
    expect_eq(32'(max_pipe >= 128), 1, "scaled L1_PIPE reached");
    expect_eq(32'(full_seen), 0, "no full flag in any trailer");
    expect_eq(32'(half_seen > 0), 1, "half-full warning reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
