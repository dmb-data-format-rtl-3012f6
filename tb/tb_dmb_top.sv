// tb_dmb_top: end-to-end test of the DMB readout at its default sizes.
//
// Behavioural front-end boards answer L1As: a board with data raises DAV a
// programmable number of BXs after the L1A (cable delay 6, the DMB's
// l1a_delay) plus a per-board offset, and then pushes its words, one per BX,
// into its DMB input FIFO; a board's words for successive L1As queue up
// behind each other. The testbench records what every L1A should produce
// and parses the DDU stream event by event. For each full event it checks
// every word against the reference model (status fields such as FIFO
// empty/half/full and DMB_L1_PIPE are taken from the stream, then checked
// separately where the scenario fixes them); lone events are compared whole.
//
// Scenario, each mechanism counted and required at least once:
//   lone event; full event with CFEB_ACTIVE/DAV mismatch and a MOVLP bit;
//   DAVs at the window edges; two L1As 3 BX apart sharing CFEB samples
//   (overlap FIFO reuse); a burst of L1As that backs up (DMB_L1_PIPE > 0);
//   TMB and CFEB2 start time-outs; ALCT end time-out; a DAV outside the window (lone
//   event although a board sent data); CFEB5 FIFO overfilled (half warning,
//   sticky full); SyncReset (full cleared, L1A numbers restart at 1).
module tb_dmb_top;
  import dmb_pkg::*;
  import tb_dmb_ref_pkg::*;

  localparam int DLY   = 6;
  localparam int ORBIT = 3564;
  localparam int FIFO_DEPTH = 16384;
  localparam logic [7:0] CRATE = 8'hA3;
  localparam logic [3:0] ID    = 4'd9;

  logic                  clk = 1'b0;
  logic                  rst, sync_rst, bc0, l1a;
  logic [7:0]            l1a_delay;
  logic [N_FEB-1:0]      feb_dav, feb_wr;
  feb_word_t [N_FEB-1:0] feb_wdata;
  logic [N_CFEB-1:0]     cfeb_movlp, tmb_cfeb_active;
  logic [15:0]           ddu_data;
  logic                  ddu_valid, busy, l1a_fifo_full;
  logic [N_FEB-1:0]      feb_full_stk;

  int checks = 0, failures = 0;

  dmb_top dut (
    .clk, .rst, .sync_rst, .bc0, .l1a, .l1a_delay, .crate_id(CRATE), .dmb_id(ID),
    .feb_dav, .feb_wr, .feb_wdata, .cfeb_movlp, .tmb_cfeb_active,
    .ddu_data, .ddu_valid, .busy, .feb_full_stk, .l1a_fifo_full
  );

  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // DDU stream
  logic [15:0] got[$];
  always @(posedge clk) if (ddu_valid) got.push_back(ddu_data);

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---------------------------------------------------------------- FEBs
  // per-board queue of words waiting to be written into the DMB
  feb_word_t feb_q[N_FEB][$];
  always @(posedge clk) begin
    #2;
    for (int f = 0; f < N_FEB; f++) begin
      if (feb_q[f].size() > 0) begin
        feb_wr[f]    = 1'b1;
        feb_wdata[f] = feb_q[f].pop_front();
      end else begin
        feb_wr[f]    = 1'b0;
      end
    end
  end

  // what each L1A must produce
  typedef struct {
    logic [23:0] l1a;
    logic [11:0] bxn;
    logic [3:0]  sync;
    logic [6:0]  dav;
    logic [4:0]  active;
    logic [4:0]  movlp;
    logic [6:0]  sto;
    logic [6:0]  eto;
    word_q_t     data[7];   // words the board sends for this L1A
    int          n_ovl[5];  // trailing CFEB words tagged as overlapping
  } exp_ev_t;
  exp_ev_t exp_evs[$];

  longint bc0_at = 0, sync_at = 0;
  int     l1a_num = 0;
  int     word_seed = 1;

  function automatic word_q_t mkwords(input int n);
    word_q_t q;
    for (int i = 0; i < n; i++) begin
      word_seed = (word_seed * 1103515245 + 12345) & 32'h7FFFFFFF;
      q.push_back(16'(word_seed >> 9) & 16'h7FFF);
    end
    return q;
  endfunction

  // one DAV pulse (and data) of board f, off BXs away from the window centre
  task automatic feb_answer(input int f, input int off, input word_q_t w, input int n_ovl,
                            input logic eoe, input logic [4:0] act, input logic movl);
    tick(DLY + off);
    feb_dav[f] = 1'b1;
    if (f == FEB_TMB) tmb_cfeb_active = act;
    if (movl) cfeb_movlp[f] = 1'b1;
    tick();
    feb_dav[f] = 1'b0;
    if (f == FEB_TMB) tmb_cfeb_active = '0;
    if (movl) cfeb_movlp[f] = 1'b0;
    tick(2);
    foreach (w[i]) begin
      feb_word_t fw;
      fw.data = w[i];
      fw.eoe  = eoe && (i == w.size() - 1);
      fw.ovl  = (f < N_CFEB) && (i >= w.size() - n_ovl);
      feb_q[f].push_back(fw);
    end
  endtask

  // Issue an L1A. sizes[f] < 0: board f sends nothing; off[f]: DAV offset;
  // movl: CFEBs raising MOVLP (no DAV); in_window: expected DAV result.
  task automatic trigger(input int sizes[7], input int off[7], input int n_ovl[5],
                         input logic [4:0] act, input logic [4:0] movl,
                         input logic [6:0] no_eoe, input logic [6:0] sto,
                         input logic [6:0] eto);
    exp_ev_t e;
    logic [6:0] dav;
    l1a = 1'b1;
    l1a_num++;
    e.l1a  = 24'(l1a_num);
    e.bxn  = 12'((cyc - bc0_at - 1) % ORBIT);
    e.sync = 4'((cyc - sync_at - 1) % 16);
    dav = '0;
    for (int f = 0; f < N_FEB; f++) begin
      e.data[f] = {};
      if (sizes[f] >= 0) begin
        e.data[f] = mkwords(sizes[f]);
        if (off[f] >= -1 && off[f] <= 1) dav[f] = 1'b1;
      end
    end
    e.dav    = dav;
    e.active = dav[FEB_TMB] ? act : 5'b0;
    e.movlp  = movl;
    e.sto    = sto;
    e.eto    = eto;
    for (int k = 0; k < 5; k++) e.n_ovl[k] = n_ovl[k];
    exp_evs.push_back(e);
    for (int f = 0; f < N_FEB; f++) begin
      if (sizes[f] >= 0 || (f < N_CFEB && movl[f])) begin
        automatic int          ff = f;
        automatic word_q_t     w  = e.data[f];
        automatic int          o  = (sizes[f] >= 0) ? off[f] : 0;
        automatic int          no = (f < N_CFEB) ? n_ovl[f] : 0;
        automatic logic        eo = !no_eoe[f];
        automatic logic        mv = (f < N_CFEB) && movl[f];
        automatic logic [4:0]  ac = act;
        if (sizes[f] < 0) begin
          fork feb_movlp_only(ff); join_none
        end else begin
          fork feb_answer(ff, o, w, no, eo, ac, mv); join_none
        end
      end
    end
    tick();
    l1a = 1'b0;
  endtask

  task automatic feb_movlp_only(input int f);
    tick(DLY);
    cfeb_movlp[f] = 1'b1;
    tick();
    cfeb_movlp[f] = 1'b0;
  endtask

  task automatic wait_idle();
    tick(DLY + 8);
    while (busy || dut.u_dav_window.count != 0 || dut.u_l1a_fifo.count != 0) tick();
    tick(4);
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_lone = 0, n_full = 0, n_mism = 0, n_movlp = 0, n_ovl_reuse = 0, n_pipe = 0;
  int n_sto = 0, n_eto = 0, n_half = 0, n_full_stk = 0, n_restart = 0, n_missed_dav = 0;
  int n_edge = 0, n_cfeb_sto = 0;

  // ------------------------------------------------------------ checker
  task automatic check_stream();
    int      p;
    word_q_t pend[5];
    for (int k = 0; k < 5; k++) pend[k] = {};
    p = 0;
    foreach (exp_evs[i]) begin
      exp_ev_t e;
      word_q_t exp, blkq[7];
      e = exp_evs[i];
      if (e.dav == '0) begin
        exp = ref_lone(e.l1a, e.bxn);
        n_lone++;
        if (e.data[2].size() > 0) n_missed_dav++;
        for (int k = 0; k < 4; k++)
          expect_eq(32'(p + k < got.size() ? got[p + k] : 0), 32'(exp[k]),
                    $sformatf("event %0d lone word %0d", i, k));
        p += 4;
      end else begin
        int          hdr, n_data, t;
        logic [6:0]  half_ok, empt, full;
        logic [7:0]  pipe_f;
        int          pipe;
        n_full++;
        for (int f = 0; f < N_FEB; f++) blkq[f] = {};
        for (int k = 0; k < 5; k++) begin
          if (e.dav[k]) begin
            if (pend[k].size() > 0) n_ovl_reuse++;
            blkq[k] = {pend[k], e.data[k]};
            pend[k] = {};
            for (int j = e.data[k].size() - e.n_ovl[k]; j < e.data[k].size(); j++)
              pend[k].push_back(e.data[k][j]);
          end else begin
            pend[k] = {};
          end
        end
        if (e.dav[5]) blkq[5] = e.data[5];
        if (e.dav[6]) blkq[6] = e.data[6];
        if (e.sto[6]) blkq[6] = {};
        n_data = 0;
        for (int f = 0; f < N_FEB; f++) n_data += blkq[f].size();
        t = p + 8 + n_data;                   // first trailer word
        if (t + 8 > got.size()) begin
          expect_eq(0, 1, $sformatf("event %0d truncated", i));
          break;
        end
        half_ok = {got[t + 1][5], got[t + 1][6], got[t + 1][4:0]};
        empt    = {got[t + 2][2], got[t + 2][3], got[t + 4][4:0]};
        full    = {got[t + 4][10], got[t + 4][11], got[t + 4][9:5]};
        pipe_f  = got[t + 2][11:4];
        pipe    = pipe_f[7] ? int'(pipe_f[6:0]) * 8 : int'(pipe_f);
        exp = ref_event(e.l1a, e.bxn, e.sync, e.dav, e.active, e.movlp, CRATE, ID,
                        blkq[5], blkq[6], blkq[0], blkq[1], blkq[2], blkq[3], blkq[4],
                        half_ok, empt, full, e.sto, e.eto, pipe);
        for (int k = 0; k < exp.size(); k++)
          expect_eq(32'(got[p + k]), 32'(exp[k]), $sformatf("event %0d word %0d", i, k));
        if (e.active != e.dav[4:0]) n_mism++;
        if (e.movlp != '0 && got[p + 6][11:7] == e.movlp) n_movlp++;
        if (pipe > 0) n_pipe++;
        if (e.sto != '0 && got[t + 2][0]) n_sto++;
        if (e.sto[1] && got[t + 3][1]) n_cfeb_sto++;
        if (e.eto != '0 && got[t + 3][6]) n_eto++;
        if (half_ok[4] == 1'b0) n_half++;
        if (full[4]) n_full_stk++;
        if (i > 0 && e.l1a == 24'd1) n_restart++;
        p += exp.size();
      end
    end
    expect_eq(32'(got.size()), 32'(p), "no words beyond the expected events");
  endtask

  // ------------------------------------------------------------ scenario
  int NO[7]   = '{-1, -1, -1, -1, -1, -1, -1};
  int Z7[7]   = '{0, 0, 0, 0, 0, 0, 0};
  int Z5[5]   = '{0, 0, 0, 0, 0};

  initial begin
    int sz[7], of[7], ov[5];
    rst = 1'b1; sync_rst = 1'b0; bc0 = 1'b0; l1a = 1'b0; l1a_delay = 8'(DLY);
    feb_dav = '0; cfeb_movlp = '0; tmb_cfeb_active = '0;
    tick(4);
    rst = 1'b0;
    // BC0 and SyncReset together
    bc0 = 1'b1; sync_rst = 1'b1;
    bc0_at = cyc; sync_at = cyc;
    tick();
    bc0 = 1'b0; sync_rst = 1'b0;
    tick(30);

    // 1. lone event
    trigger(NO, Z7, Z5, '0, '0, '0, '0, '0);
    wait_idle();

    // 2. full event: ALCT, TMB, CFEB1, CFEB2; DAVs at the window edges;
    //    CFEB_ACTIVE also names CFEB3 (mismatch); CFEB3 reports MOVLP
    sz = '{10, 12, -1, -1, -1, 6, 8};
    of = '{-1, 1, 0, 0, 0, 0, 1};
    trigger(sz, of, Z5, 5'b00111, 5'b00100, '0, '0, '0);
    n_edge++;
    wait_idle();

    // 3. two L1As 3 BX apart: CFEB1 tags its last 4 samples of the first
    //    event; the second event starts with them
    sz = '{9, -1, -1, -1, -1, -1, -1};
    ov = '{4, 0, 0, 0, 0};
    trigger(sz, Z7, ov, '0, '0, '0, '0, '0);
    tick(2);
    sz = '{5, 7, -1, -1, -1, -1, 4};
    trigger(sz, Z7, Z5, 5'b00011, '0, '0, '0, '0);
    wait_idle();

    // 4. burst of six L1As every 3 BX: the readout falls behind
    for (int i = 0; i < 6; i++) begin
      sz = '{-1, 30, 30, -1, -1, 3, -1};
      trigger(sz, Z7, Z5, '0, '0, '0, '0, '0);
      tick(2);
    end
    wait_idle();

    // 5. TMB and CFEB2 raise DAV but send no data: start time-outs
    sz = '{-1, 0, -1, -1, -1, -1, 0};
    trigger(sz, Z7, Z5, 5'b00010, '0, '0, 7'b1000010, '0);
    wait_idle();

    // 6. ALCT data without end-of-event: end time-out
    sz = '{-1, -1, -1, -1, -1, 5, -1};
    trigger(sz, Z7, Z5, '0, '0, 7'b0100000, '0, 7'b0100000);
    wait_idle();

    // 7. CFEB3 DAV two BXs outside the window: lone event, data stays
    sz = '{-1, -1, 4, -1, -1, -1, -1};
    of = '{0, 0, 3, 0, 0, 0, 0};
    trigger(sz, of, Z5, '0, '0, '0, '0, '0);
    wait_idle();
    expect_eq(32'(dut.feb_empty[2]), 0, "unmatched CFEB3 data left in its FIFO");

    // 8. SyncReset, then overfill CFEB5 and read an ALCT event
    sync_rst = 1'b1; sync_at = cyc; l1a_num = 0;
    tick();
    sync_rst = 1'b0;
    for (int i = 0; i < FIFO_DEPTH + 8; i++) begin
      feb_word_t fw;
      fw.data = 16'(i); fw.eoe = 1'b0; fw.ovl = 1'b0;
      feb_q[4].push_back(fw);
    end
    while (feb_q[4].size() > 0) tick();
    tick(2);
    expect_eq(32'(feb_full_stk[4]), 1, "CFEB5 full flag");
    sz = '{-1, -1, -1, -1, -1, 2, -1};
    trigger(sz, Z7, Z5, '0, '0, '0, '0, '0);
    wait_idle();

    // 9. SyncReset clears the sticky flag; numbering restarts
    sync_rst = 1'b1; sync_at = cyc; l1a_num = 0;
    tick();
    sync_rst = 1'b0;
    tick(10);
    expect_eq(32'(feb_full_stk[4]), 0, "full flag cleared by SyncReset");
    sz = '{-1, -1, -1, -1, -1, 3, 2};
    trigger(sz, Z7, Z5, 5'b00000, '0, '0, '0, '0);
    wait_idle();

    check_stream();
    $display("mechanisms: lone=%0d full=%0d edge=%0d mismatch=%0d movlp=%0d overlap_reuse=%0d",
             n_lone, n_full, n_edge, n_mism, n_movlp, n_ovl_reuse);
    $display("            l1_pipe=%0d start_to=%0d end_to=%0d missed_dav=%0d half=%0d full=%0d restart=%0d",
             n_pipe, n_sto, n_eto, n_missed_dav, n_half, n_full_stk, n_restart);
    expect_eq(32'(n_lone > 0), 1, "lone event happened");
    expect_eq(32'(n_full > 0), 1, "full event happened");
    expect_eq(32'(n_mism > 0), 1, "ACTIVE/DAV mismatch happened");
    expect_eq(32'(n_movlp > 0), 1, "MOVLP reported");
    expect_eq(32'(n_ovl_reuse > 0), 1, "overlap samples reused");
    expect_eq(32'(n_pipe > 0), 1, "L1As backed up");
    expect_eq(32'(n_sto > 0), 1, "start time-out happened");
    expect_eq(32'(n_eto > 0), 1, "end time-out happened");
    expect_eq(32'(n_cfeb_sto > 0), 1, "CFEB start time-out happened");
    expect_eq(32'(n_missed_dav > 0), 1, "DAV outside window ignored");
    expect_eq(32'(n_half > 0), 1, "half-full warning reported");
    expect_eq(32'(n_full_stk > 0), 1, "full flag reported");
    expect_eq(32'(n_restart > 0), 1, "L1A numbering restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
