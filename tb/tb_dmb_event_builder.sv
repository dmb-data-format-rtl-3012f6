// tb_dmb_event_builder: checks the event format produced by the builder.
//
// The builder is surrounded by real FIFOs (depth 64 for the FEBs and the
// overlap store, 16 for the per-L1A records); time-outs are reduced to 20
// (start) and 60 (end) cycles. The testbench preloads FEB data and six L1A
// records and compares the DDU stream word for word with the reference
// model in tb_dmb_ref_pkg:
//   E0  lone event (no DAV)
//   E1  ALCT, TMB, CFEB1, CFEB3, CFEB4; CFEB1 and CFEB4 tag samples as
//       overlapping; CFEB_ACTIVE differs from CFEB_DAV (mismatch bit)
//   E2  CFEB1 again: its stored samples come first; CFEB4 has no DAV so its
//       stored samples are dropped
//   E3  CFEB2 only
//   E4  TMB with DAV but no data: start time-out
//   E5  ALCT data without end-of-event tag: end time-out
// CFEB5's FIFO is overfilled beforehand, so every trailer reports it full,
// above half and not empty. Also checks the cycle count of E1 and that
// lone and header words leave on consecutive cycles.
module tb_dmb_event_builder;
  import dmb_pkg::*;
  import tb_dmb_ref_pkg::*;

  localparam int FD   = 64;
  localparam int RD   = 16;
  localparam int STO  = 20;
  localparam int ETO  = 60;
  localparam int L1CW = 5;
  localparam int OVCW = 7;
  localparam logic [7:0] CRATE = 8'h5C;
  localparam logic [3:0] ID    = 4'h7;

  logic clk = 1'b0;
  logic rst, sync_rst;
  int   checks = 0, failures = 0;

  // record FIFOs
  logic      l1a_wr, dav_wr, l1a_rd, dav_rd, l1a_empty, dav_empty, l1a_full, dav_full;
  l1a_rec_t  l1a_w, l1a_rec;
  dav_rec_t  dav_w, dav_rec;
  logic [L1CW-1:0] l1a_count, dav_count;
  // FEB FIFOs
  logic [N_FEB-1:0]      feb_wr, feb_rd, feb_empty, feb_half_ok, feb_full_stk;
  feb_word_t             feb_w;
  feb_word_t [N_FEB-1:0] feb_rdata;
  // overlap FIFO
  ovl_word_t ovl_rdata, ovl_wdata;
  logic [OVCW-1:0] ovl_prev_left;
  logic ovl_rd, ovl_wr, ovl_mark, ovl_empty, ovl_full;
  // DDU
  logic [15:0] ddu_data;
  logic        ddu_valid, busy;

  dmb_fifo #(.WIDTH($bits(l1a_rec_t)), .DEPTH(RD)) u_l1a (
    .clk, .rst, .clr(sync_rst), .wr(l1a_wr), .wdata(l1a_w), .rd(l1a_rd), .rdata(l1a_rec),
    .empty(l1a_empty), .full(l1a_full), .count(l1a_count));
  dmb_fifo #(.WIDTH($bits(dav_rec_t)), .DEPTH(RD)) u_dav (
    .clk, .rst, .clr(sync_rst), .wr(dav_wr), .wdata(dav_w), .rd(dav_rd), .rdata(dav_rec),
    .empty(dav_empty), .full(dav_full), .count(dav_count));
  for (genvar i = 0; i < N_FEB; i++) begin : g_feb
    dmb_input_fifo #(.DEPTH(FD)) u_in (
      .clk, .rst, .sync_rst, .wr(feb_wr[i]), .wdata(feb_w), .rd(feb_rd[i]),
      .rdata(feb_rdata[i]), .empty(feb_empty[i]), .half_ok(feb_half_ok[i]),
      .full_stk(feb_full_stk[i]));
  end
  dmb_overlap_fifo #(.DEPTH(FD)) u_ovl (
    .clk, .rst, .sync_rst, .wr(ovl_wr), .wdata(ovl_wdata), .rd(ovl_rd), .rdata(ovl_rdata),
    .mark(ovl_mark), .prev_left(ovl_prev_left), .empty(ovl_empty), .full(ovl_full));

  dmb_event_builder #(.START_TIMEOUT(STO), .END_TIMEOUT(ETO), .L1A_CW(L1CW), .OVL_CW(OVCW)) dut (
    .clk, .rst, .sync_rst, .crate_id(CRATE), .dmb_id(ID),
    .l1a_rec, .l1a_empty, .l1a_count, .l1a_rd,
    .dav_rec, .dav_empty, .dav_rd,
    .feb_rdata, .feb_empty, .feb_half_ok, .feb_full_stk, .feb_rd,
    .ovl_rdata, .ovl_prev_left, .ovl_rd, .ovl_wr, .ovl_wdata, .ovl_mark,
    .ddu_data, .ddu_valid, .busy);

  always #5 clk = ~clk;

  // collected DDU stream and the cycle of each word
  logic [15:0] got[$];
  longint      got_t[$];
  longint      cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ddu_valid) begin
      got.push_back(ddu_data);
      got_t.push_back(cyc);
    end
  end

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

  task automatic expect_eq(input logic [31:0] got_v, input logic [31:0] exp, input string what);
    checks++;
    if (got_v !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got_v, exp);
    end
  endtask

  // FEB data of each event; word value encodes event, board and position
  function automatic word_q_t blk(input int ev, input int feb, input int n);
    word_q_t q;
    for (int i = 0; i < n; i++) q.push_back(16'((ev << 11) | (feb << 8) | (i * 7 + 1)) & 16'h7FFF);
    return q;
  endfunction

  task automatic load(input int feb, input word_q_t q, input int n_ovl, input logic eoe);
    foreach (q[i]) begin
      feb_w.data = q[i];
      feb_w.eoe  = eoe && (i == q.size() - 1);
      feb_w.ovl  = (i >= q.size() - n_ovl);
      feb_wr     = 7'(1) << feb;
      tick();
    end
    feb_wr = '0;
  endtask

  function automatic dav_rec_t mk_dav(input logic [6:0] dav, input logic [4:0] act,
                                      input logic [4:0] movl);
    dav_rec_t r;
    r.cfeb_dav = dav[4:0]; r.alct_dav = dav[5]; r.tmb_dav = dav[6];
    r.cfeb_active = act; r.cfeb_movlp = movl;
    return r;
  endfunction

  initial begin
    word_q_t exp, none, e;
    word_q_t a1, t1, c0_1, c2_1, c3_1, c0_2, t2, c1_3, a5;
    logic [6:0] half_ok, empt, full, zero7;
    int   first, span, want_span;
    rst = 1'b1; sync_rst = 1'b0; l1a_wr = 1'b0; dav_wr = 1'b0; feb_wr = '0;
    l1a_w = '0; dav_w = '0; feb_w = '0;
    tick(3);
    rst = 1'b0;
    tick();
    none = {}; zero7 = '0;
    a1 = blk(1, 5, 3);  t1 = blk(1, 6, 4);
    c0_1 = blk(1, 0, 5); c2_1 = blk(1, 2, 3); c3_1 = blk(1, 3, 2);
    c0_2 = blk(2, 0, 3); t2 = blk(2, 6, 2);
    c1_3 = blk(3, 1, 4);
    a5 = blk(5, 5, 3);
    load(5, a1, 0, 1'b1); load(5, a5, 0, 1'b0);
    load(6, t1, 0, 1'b1); load(6, t2, 0, 1'b1);
    load(0, c0_1, 2, 1'b1); load(0, c0_2, 0, 1'b1);
    load(1, c1_3, 0, 1'b1);
    load(2, c2_1, 0, 1'b1);
    load(3, c3_1, 2, 1'b1);
    load(4, blk(9, 4, FD + 1), 0, 1'b1);        // overfill CFEB5
    // L1A records, then DAV records (the builder starts on the first)
    for (int i = 0; i < 6; i++) begin
      l1a_w = '{l1a: 24'h0A0000 + 24'(i * 4097), bxn: 12'(100 * i + 7), sync: 4'(3 * i)};
      l1a_wr = 1'b1;
      tick();
    end
    l1a_wr = 1'b0;
    dav_w = mk_dav(7'b0000000, 5'b00000, 5'b00000); dav_wr = 1'b1; tick();
    dav_w = mk_dav(7'b1101101, 5'b00101, 5'b10000); tick();
    dav_w = mk_dav(7'b1000001, 5'b00001, 5'b00000); tick();
    dav_w = mk_dav(7'b0000010, 5'b00010, 5'b00000); tick();
    dav_w = mk_dav(7'b1000000, 5'b00000, 5'b00000); tick();
    dav_w = mk_dav(7'b0100000, 5'b00000, 5'b00000); tick();
    dav_wr = 1'b0;
    // wait until all six events are out
    tick(20);
    while (busy || !dav_empty) tick();
    tick(3);

    // expected stream; CFEB5 always full, not empty, above half
    full = 7'b0010000;
    half_ok = 7'b1101111;
    exp = {};
    exp = {exp, ref_lone(24'h0A0000, 12'd7)};
    // E1: after it, left: ALCT a5, TMB t2, CFEB1 c0_2, CFEB2 c1_3
    empt = 7'b0001100;
    e = ref_event(24'h0A1001, 12'd107, 4'd3, 7'b1101101, 5'b00101, 5'b10000, CRATE, ID,
                  a1, t1, c0_1, none, c2_1, c3_1, none, half_ok, empt, full, zero7, zero7, 4);
    exp = {exp, e};
    want_span = 8 + (1 + 3) + (1 + 4) + (1 + 1 + 5) + (1 + 1) + (1 + 1 + 3) + (1 + 1 + 2)
              + (1 + 1) + 1 + 8;
    // E2: CFEB1 = 2 stored samples + 3 new; CFEB4 stored samples dropped
    empt = 7'b1001101;
    exp = {exp, ref_event(24'h0A2002, 12'd207, 4'd6, 7'b1000001, 5'b00001, 5'b00000, CRATE, ID,
                          none, t2, {c0_1[3], c0_1[4], c0_2}, none, none, none, none,
                          half_ok, empt, full, zero7, zero7, 3)};
    empt = 7'b1001111;
    exp = {exp, ref_event(24'h0A3003, 12'd307, 4'd9, 7'b0000010, 5'b00010, 5'b00000, CRATE, ID,
                          none, none, none, c1_3, none, none, none,
                          half_ok, empt, full, zero7, zero7, 2)};
    exp = {exp, ref_event(24'h0A4004, 12'd407, 4'd12, 7'b1000000, 5'b00000, 5'b00000, CRATE, ID,
                          none, none, none, none, none, none, none,
                          half_ok, empt, full, 7'b1000000, zero7, 1)};
    empt = 7'b1101111;
    exp = {exp, ref_event(24'h0A5005, 12'd507, 4'd15, 7'b0100000, 5'b00000, 5'b00000, CRATE, ID,
                          a5, none, none, none, none, none, none,
                          half_ok, empt, full, zero7, 7'b0100000, 0)};

    expect_eq(32'(got.size()), 32'(exp.size()), "number of DDU words");
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      expect_eq(32'(got[i]), 32'(exp[i]), $sformatf("DDU word %0d", i));
    // lone words and header words leave back to back
    if (got_t.size() >= 12) begin
      expect_eq(32'(got_t[3] - got_t[0]), 3, "lone words consecutive");
      expect_eq(32'(got_t[11] - got_t[4]), 7, "header words consecutive");
      first = 4;
      span  = int'(got_t[first + e.size() - 1] - got_t[first]) + 1;
      expect_eq(32'(span), 32'(want_span), "E1 duration in cycles");
    end
    expect_eq(32'(ovl_empty), 1, "overlap FIFO empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
