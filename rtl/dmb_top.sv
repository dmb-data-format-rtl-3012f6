// dmb_top: readout path of the CSC DAQ motherboard (DMB).
//
// Seven front-end boards feed the DMB: CFEB1..CFEB5 (indices 0..4), ALCT (5)
// and TMB (6). A board that has data for an L1A raises its DAV line and
// pushes its words into its own input FIFO (feb_wr/feb_wdata, last word with
// the end-of-event tag). The DMB
//   - counts L1As and BXs and stores {L1A number, BXN, sync count} for every
//     L1A in the L1A/BXN FIFO (dmb_l1a_fifo),
//   - matches the DAV lines against the L1A delayed by l1a_delay BXs within a
//     3-BX window (dmb_dav_window),
//   - and for each L1A in turn sends either four lone words or a full event
//     (headers, ALCT, TMB and CFEB data, trailers with status and CRC) to the
//     DDU, one 16-bit word per clock on ddu_data/ddu_valid
//     (dmb_event_builder).
// CFEB samples shared by two close events travel through the single CFEB
// overlap FIFO (dmb_overlap_fifo). One clock is one bunch crossing (BX).
//
// The block structure follows the DMB diagram of input FIFOs, overlap FIFO
// and L1A/BXN FIFO; FIFO depths, time-outs and the FEB-side write interface
// are this design's choices (see each module). rst is the hard reset;
// sync_rst (SyncReset) clears the L1A and sync counters, flushes all FIFOs
// and the sticky full flags and aborts the event being sent.
module dmb_top
  import dmb_pkg::*;
#(
  parameter int unsigned FEB_FIFO_DEPTH = 16384,
  parameter int unsigned OVL_DEPTH      = 8192,
  parameter int unsigned L1A_DEPTH      = 512,
  parameter int unsigned WIN            = 3,
  parameter int unsigned START_TIMEOUT  = 1024,
  parameter int unsigned END_TIMEOUT    = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sync_rst,
  input  logic                   bc0,
  input  logic                   l1a,
  input  logic [7:0]             l1a_delay,
  input  logic [7:0]             crate_id,
  input  logic [3:0]             dmb_id,
  // front-end boards: 0..4 CFEB1..5, 5 ALCT, 6 TMB
  input  logic [N_FEB-1:0]       feb_dav,
  input  logic [N_FEB-1:0]       feb_wr,
  input  feb_word_t [N_FEB-1:0]  feb_wdata,
  input  logic [N_CFEB-1:0]      cfeb_movlp,
  input  logic [N_CFEB-1:0]      tmb_cfeb_active,
  // to the DDU
  output logic [15:0]            ddu_data,
  output logic                   ddu_valid,
  output logic                   busy,
  output logic [N_FEB-1:0]       feb_full_stk,
  output logic                   l1a_fifo_full
);
  localparam int unsigned L1A_CW = $clog2(L1A_DEPTH) + 1;
  localparam int unsigned OVL_CW = $clog2(OVL_DEPTH) + 1;

  feb_word_t [N_FEB-1:0]  feb_rdata;
  logic [N_FEB-1:0]       feb_empty, feb_half_ok, feb_rd;

  l1a_rec_t               l1a_rec;
  logic                   l1a_empty, l1a_rd;
  logic [L1A_CW-1:0]      l1a_count;

  dav_rec_t               dav_rec;
  logic                   dav_empty, dav_rd;
  logic [L1A_CW-1:0]      dav_count;
  logic                   dav_full;

  ovl_word_t              ovl_rdata, ovl_wdata;
  logic [OVL_CW-1:0]      ovl_prev_left;
  logic                   ovl_rd, ovl_wr, ovl_mark, ovl_empty, ovl_full;

  for (genvar i = 0; i < N_FEB; i++) begin : g_feb
    dmb_input_fifo #(.DEPTH(FEB_FIFO_DEPTH)) u_in_fifo (
      .clk, .rst, .sync_rst,
      .wr(feb_wr[i]), .wdata(feb_wdata[i]),
      .rd(feb_rd[i]), .rdata(feb_rdata[i]),
      .empty(feb_empty[i]), .half_ok(feb_half_ok[i]), .full_stk(feb_full_stk[i])
    );
  end

  dmb_l1a_fifo #(.DEPTH(L1A_DEPTH)) u_l1a_fifo (
    .clk, .rst, .sync_rst, .bc0, .l1a_in(l1a),
    .rd(l1a_rd), .rdata(l1a_rec), .empty(l1a_empty), .count(l1a_count),
    .full(l1a_fifo_full)
  );

  dmb_dav_window #(.WIN(WIN), .DEPTH(L1A_DEPTH)) u_dav_window (
    .clk, .rst, .sync_rst, .l1a_in(l1a), .l1a_delay,
    .dav(feb_dav), .cfeb_movlp, .tmb_cfeb_active,
    .rd(dav_rd), .rdata(dav_rec), .empty(dav_empty), .count(dav_count),
    .full(dav_full)
  );

  dmb_overlap_fifo #(.DEPTH(OVL_DEPTH)) u_ovl_fifo (
    .clk, .rst, .sync_rst,
    .wr(ovl_wr), .wdata(ovl_wdata), .rd(ovl_rd), .rdata(ovl_rdata),
    .mark(ovl_mark), .prev_left(ovl_prev_left), .empty(ovl_empty), .full(ovl_full)
  );

  dmb_event_builder #(
    .START_TIMEOUT(START_TIMEOUT), .END_TIMEOUT(END_TIMEOUT),
    .L1A_CW(L1A_CW), .OVL_CW(OVL_CW)
  ) u_builder (
    .clk, .rst, .sync_rst, .crate_id, .dmb_id,
    .l1a_rec, .l1a_empty, .l1a_count, .l1a_rd,
    .dav_rec, .dav_empty, .dav_rd,
    .feb_rdata, .feb_empty, .feb_half_ok, .feb_full_stk, .feb_rd,
    .ovl_rdata, .ovl_prev_left, .ovl_rd, .ovl_wr, .ovl_wdata, .ovl_mark,
    .ddu_data, .ddu_valid, .busy
  );

  // Both per-L1A FIFOs are written once per L1A, the DAV one later; the DAV
  // FIFO can never hold more records than the L1A FIFO.
  a_dav_behind: assert property (@(posedge clk) disable iff (rst || sync_rst)
                  dav_count <= l1a_count);
  // The overlap FIFO is sized for a full 16-sample event of five CFEBs.
  a_ovl_room:   assert property (@(posedge clk) disable iff (rst || sync_rst)
                  !(ovl_full && ovl_wr));
  a_ovl_prev:   assert property (@(posedge clk) disable iff (rst || sync_rst)
                  (ovl_prev_left != '0) |-> !ovl_empty);
  a_dav_room:   assert property (@(posedge clk) disable iff (rst || sync_rst)
                  dav_full |-> l1a_fifo_full);

endmodule
