// dmb_event_builder: assembles one DDU event per L1A (2005 production format).
//
// For every L1A the builder pops one record from the L1A/BXN FIFO and one
// from the DAV-window FIFO. If no FEB reported DAV it sends the four lone
// words (signature 8: 8000, L1A[11:0], L1A[23:12], BXN). Otherwise it sends
//   Header 1 (4 words, signature 9) and Header 2 (4 words, signature A),
//   the ALCT data, the TMB data and the data of CFEB1..CFEB5, each only if
//   that board had DAV, words passed through unchanged,
//   Trailer 1 (4 words, signature F) and Trailer 2 (4 words, signature E).
// Every board's block ends at the word that carries the end-of-event tag.
// Status bits in the trailers (FIFO half/empty/full) are the live values
// when the word is sent; DMB_L1_PIPE is the L1A FIFO count, i.e. L1As that
// wait behind the one being sent. The CRC covers every word from the first
// header word up to the sixth trailer word and is sent in the last two,
// each 11-bit half with its odd parity in bit 11.
//
// CFEB overlap: before reading CFEBk's input FIFO the builder pops the
// samples of CFEBk that the previous event left in the overlap FIFO and sends
// them first (or drops them if CFEBk has no DAV now). Words read from a CFEB
// input FIFO with the overlap tag are sent and also stored for the next event.
//
// Time-outs: when a board's turn comes a timer starts. If its FIFO stays
// empty for START_TIMEOUT cycles the board's start time-out bit is set; if
// the end-of-event word has not been read after END_TIMEOUT cycles its end
// time-out bit is set. Either way the builder moves on. The bits apply to the
// current event only.
//
// Timing: one word per clock on ddu_data while ddu_valid is high, registered.
// There is no back-pressure from the DDU. A lone event takes 5 cycles from
// IDLE, a full event 18 cycles plus the data words plus one cycle per board
// position (7) and one per CFEB overlap check (5).
//
// Field layout, signatures and order of blocks follow the 2005 format. The
// timer scheme and its defaults, the order of the overlap drain and the
// lack of back-pressure are this design's choices.
module dmb_event_builder
  import dmb_pkg::*;
#(
  parameter int unsigned START_TIMEOUT = 1024,
  parameter int unsigned END_TIMEOUT   = 4096,
  parameter int unsigned L1A_CW        = 10,   // width of L1A FIFO count
  parameter int unsigned OVL_CW        = 14    // width of overlap prev count
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    sync_rst,
  input  logic [7:0]              crate_id,
  input  logic [3:0]              dmb_id,
  // L1A/BXN FIFO
  input  l1a_rec_t                l1a_rec,
  input  logic                    l1a_empty,
  input  logic [L1A_CW-1:0]       l1a_count,
  output logic                    l1a_rd,
  // DAV window FIFO
  input  dav_rec_t                dav_rec,
  input  logic                    dav_empty,
  output logic                    dav_rd,
  // FEB input FIFOs: 0..4 CFEB1..5, 5 ALCT, 6 TMB
  input  feb_word_t [N_FEB-1:0]   feb_rdata,
  input  logic [N_FEB-1:0]        feb_empty,
  input  logic [N_FEB-1:0]        feb_half_ok,
  input  logic [N_FEB-1:0]        feb_full_stk,
  output logic [N_FEB-1:0]        feb_rd,
  // CFEB overlap FIFO
  input  ovl_word_t               ovl_rdata,
  input  logic [OVL_CW-1:0]       ovl_prev_left,
  output logic                    ovl_rd,
  output logic                    ovl_wr,
  output ovl_word_t               ovl_wdata,
  output logic                    ovl_mark,
  // DDU link
  output logic [15:0]             ddu_data,
  output logic                    ddu_valid,
  output logic                    busy
);
  typedef enum logic [2:0] {S_IDLE, S_LONE, S_HDR, S_SEQ, S_OVL, S_RD, S_TRL} state_t;

  localparam int unsigned TW = $clog2(END_TIMEOUT + 1) + 1;

  state_t            state;
  logic [2:0]        widx;       // word index within lone/header/trailer
  logic [2:0]        seq;        // 0 ALCT, 1 TMB, 2..6 CFEB1..5, 7 done
  logic [TW-1:0]     timer;
  logic              started;
  l1a_rec_t          cur_l1a;
  dav_rec_t          cur_dav;
  logic [N_FEB-1:0]  start_to, end_to;
  logic [21:0]       crc;

  // combinational decisions
  logic              out_v;
  logic [15:0]       out_d;
  logic              crc_en;
  logic [N_FEB-1:0]  dav_all;
  logic              mism;
  logic [2:0]        feb;        // FEB index of the current sequence step
  logic [2:0]        cfeb;       // CFEB index during S_OVL / CFEB reads
  logic              ovl_hit;
  feb_word_t         w;

  assign dav_all = {cur_dav.tmb_dav, cur_dav.alct_dav, cur_dav.cfeb_dav};
  assign mism    = (cur_dav.cfeb_active != cur_dav.cfeb_dav);
  assign cfeb    = seq - 3'd2;
  assign feb     = (seq == 3'd0) ? 3'(FEB_ALCT) : (seq == 3'd1) ? 3'(FEB_TMB) : cfeb;
  assign ovl_hit = (ovl_prev_left != '0) && (ovl_rdata.cfeb == cfeb);
  assign w       = feb_rdata[feb];
  assign busy    = (state != S_IDLE);

  function automatic logic [15:0] hdr_word(input logic [2:0] i, input l1a_rec_t l,
                                           input dav_rec_t d, input logic mm,
                                           input logic [7:0] cr, input logic [3:0] id);
    case (i)
      3'd0:    return {SIG_H1, l.l1a[11:0]};
      3'd1:    return {SIG_H1, l.l1a[23:12]};
      3'd2:    return {SIG_H1, d.tmb_dav, d.alct_dav, d.cfeb_active, d.cfeb_dav};
      3'd3:    return {SIG_H1, l.bxn};
      3'd4:    return {SIG_H2, d.tmb_dav, mm, d.alct_dav, mm, d.tmb_dav, mm, d.alct_dav, d.cfeb_dav};
      3'd5:    return {SIG_H2, cr, id};
      3'd6:    return {SIG_H2, d.cfeb_movlp, l.bxn[6:0]};
      default: return {SIG_H2, l.sync, l.l1a[7:0]};
    endcase
  endfunction

  always_comb begin
    logic [7:0] pipe;
    pipe = l1pipe_encode((l1a_count > L1A_CW'(511)) ? 9'd511 : l1a_count[8:0]);
    out_v     = 1'b0;
    out_d     = '0;
    crc_en    = 1'b0;
    l1a_rd    = 1'b0;
    dav_rd    = 1'b0;
    feb_rd    = '0;
    ovl_rd    = 1'b0;
    ovl_wr    = 1'b0;
    ovl_wdata = '{cfeb: cfeb, data: w.data};
    ovl_mark  = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (!l1a_empty && !dav_empty) begin
          l1a_rd   = 1'b1;
          dav_rd   = 1'b1;
          ovl_mark = 1'b1;
        end
      end
      S_LONE: begin
        out_v = 1'b1;
        case (widx)
          3'd0:    out_d = {SIG_LONE, 12'h000};
          3'd1:    out_d = {SIG_LONE, cur_l1a.l1a[11:0]};
          3'd2:    out_d = {SIG_LONE, cur_l1a.l1a[23:12]};
          default: out_d = {SIG_LONE, cur_l1a.bxn};
        endcase
      end
      S_HDR: begin
        out_v  = 1'b1;
        crc_en = 1'b1;
        out_d  = hdr_word(widx, cur_l1a, cur_dav, mism, crate_id, dmb_id);
      end
      S_OVL: begin
        if (ovl_hit) begin
          ovl_rd = 1'b1;
          out_v  = cur_dav.cfeb_dav[cfeb];
          crc_en = out_v;
          out_d  = ovl_rdata.data;
        end
      end
      S_RD: begin
        if (!feb_empty[feb]) begin
          feb_rd[feb] = 1'b1;
          out_v       = 1'b1;
          crc_en      = 1'b1;
          out_d       = w.data;
          ovl_wr      = (seq >= 3'd2) && w.ovl;
        end
      end
      S_TRL: begin
        out_v  = 1'b1;
        crc_en = (widx < 3'd6);
        case (widx)
          3'd0: out_d = {SIG_TR1, cur_l1a.bxn[3:0], cur_l1a.l1a[7:0]};
          3'd1: out_d = {SIG_TR1, cur_dav.cfeb_movlp, feb_half_ok[FEB_ALCT],
                         feb_half_ok[FEB_TMB], feb_half_ok[N_CFEB-1:0]};
          3'd2: out_d = {SIG_TR1, pipe, feb_empty[FEB_ALCT], feb_empty[FEB_TMB],
                         start_to[FEB_ALCT], start_to[FEB_TMB]};
          3'd3: out_d = {SIG_TR1, end_to[N_CFEB-1:0], end_to[FEB_ALCT], end_to[FEB_TMB],
                         start_to[N_CFEB-1:0]};
          3'd4: out_d = {SIG_TR2, feb_full_stk[FEB_ALCT], feb_full_stk[FEB_TMB],
                         feb_full_stk[N_CFEB-1:0], feb_empty[N_CFEB-1:0]};
          3'd5: out_d = {SIG_TR2, crate_id, dmb_id};
          3'd6: out_d = {SIG_TR2, ^crc[10:0], crc[10:0]};
          default: out_d = {SIG_TR2, ^crc[21:11], crc[21:11]};
        endcase
      end
      default: ;
    endcase
  end

  dmb_crc22 u_crc (
    .clk, .rst, .clr(sync_rst || (state == S_IDLE)), .en(crc_en), .data(out_d), .crc
  );

  always_ff @(posedge clk) begin
    if (rst || sync_rst) begin
      state     <= S_IDLE;
      widx      <= '0;
      seq       <= '0;
      timer     <= '0;
      started   <= 1'b0;
      cur_l1a   <= '0;
      cur_dav   <= '0;
      start_to  <= '0;
      end_to    <= '0;
      ddu_data  <= '0;
      ddu_valid <= 1'b0;
    end else begin
      ddu_valid <= out_v;
      if (out_v) ddu_data <= out_d;
      unique case (state)
        S_IDLE: begin
          if (!l1a_empty && !dav_empty) begin
            cur_l1a  <= l1a_rec;
            cur_dav  <= dav_rec;
            start_to <= '0;
            end_to   <= '0;
            widx     <= '0;
            seq      <= '0;
            state    <= ({dav_rec.tmb_dav, dav_rec.alct_dav, dav_rec.cfeb_dav} == '0)
                        ? S_LONE : S_HDR;
          end
        end
        S_LONE: begin
          widx <= widx + 1'b1;
          if (widx == 3'd3) state <= S_IDLE;
        end
        S_HDR: begin
          widx <= widx + 1'b1;
          if (widx == 3'd7) state <= S_SEQ;
        end
        S_SEQ: begin
          timer   <= '0;
          started <= 1'b0;
          if (seq == 3'd7) begin
            widx  <= '0;
            state <= S_TRL;
          end else if (seq >= 3'd2) begin
            state <= S_OVL;
          end else if (dav_all[feb]) begin
            state <= S_RD;
          end else begin
            seq <= seq + 1'b1;
          end
        end
        S_OVL: begin
          if (!ovl_hit) begin
            if (cur_dav.cfeb_dav[cfeb]) state <= S_RD;
            else begin
              seq   <= seq + 1'b1;
              state <= S_SEQ;
            end
          end
        end
        S_RD: begin
          timer <= timer + 1'b1;
          if (!feb_empty[feb]) started <= 1'b1;
          if (!feb_empty[feb] && w.eoe) begin
            seq   <= seq + 1'b1;
            state <= S_SEQ;
          end else if (timer >= TW'(END_TIMEOUT - 1)) begin
            end_to[feb] <= 1'b1;
            seq         <= seq + 1'b1;
            state       <= S_SEQ;
          end else if (!started && feb_empty[feb] && timer >= TW'(START_TIMEOUT - 1)) begin
            start_to[feb] <= 1'b1;
            seq           <= seq + 1'b1;
            state         <= S_SEQ;
          end
        end
        S_TRL: begin
          widx <= widx + 1'b1;
          if (widx == 3'd7) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The builder never pops an empty FIFO.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst)
                    (feb_rd & feb_empty) == '0);
  a_l1a_pop:      assert property (@(posedge clk) disable iff (rst)
                    l1a_rd |-> !l1a_empty && !dav_empty);

endmodule
