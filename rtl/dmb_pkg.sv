// dmb_pkg: constants and types shared by the DAQ motherboard (DMB) readout.
//
// The DMB collects data from five cathode front-end boards (CFEBs), the
// anode board (ALCT) and the trigger motherboard (TMB) and sends one event per
// Level-1 Accept (L1A) to the downstream DDU as a stream of 16-bit words. The
// top four bits of each word are a signature: 8 = lone word, 9 = Header 1,
// A = Header 2, F = Trailer 1, E = Trailer 2, and bit 15 = 0 for FEB data.
// Those signatures and the field layout follow the 2005 production format.
//
// This design's own choices: FEB words enter the DMB FIFOs with two extra tag
// bits (end of event, CFEB overlap), and the L1A record types below.
package dmb_pkg;

  localparam int unsigned N_CFEB   = 5;   // CFEB1..CFEB5
  localparam int unsigned N_FEB    = 7;   // 5 CFEBs, ALCT, TMB
  localparam int unsigned FEB_ALCT = 5;   // index of ALCT in FEB vectors
  localparam int unsigned FEB_TMB  = 6;   // index of TMB in FEB vectors

  // Word signatures, bits 15:12
  localparam logic [3:0] SIG_LONE = 4'h8;
  localparam logic [3:0] SIG_H1   = 4'h9;
  localparam logic [3:0] SIG_H2   = 4'hA;
  localparam logic [3:0] SIG_TR1  = 4'hF;
  localparam logic [3:0] SIG_TR2  = 4'hE;

  // Entry of a FEB input FIFO: the FEB's 16-bit word plus two tags.
  typedef struct packed {
    logic        ovl;    // CFEB sample also belongs to the next event
    logic        eoe;    // last word of this FEB's event
    logic [15:0] data;
  } feb_word_t;

  // Entry of the L1A/BXN FIFO, captured when the L1A arrives.
  typedef struct packed {
    logic [23:0] l1a;    // L1A event number
    logic [11:0] bxn;    // bunch crossing number at the L1A
    logic [3:0]  sync;   // BXs since the last SyncReset, 4-bit wrap
  } l1a_rec_t;

  // Result of the DAV x L1A coincidence for one L1A.
  typedef struct packed {
    logic [N_CFEB-1:0] cfeb_dav;
    logic              alct_dav;
    logic              tmb_dav;
    logic [N_CFEB-1:0] cfeb_active;  // from TMB
    logic [N_CFEB-1:0] cfeb_movlp;   // from CFEBs
  } dav_rec_t;

  // Entry of the shared CFEB overlap FIFO.
  typedef struct packed {
    logic [2:0]  cfeb;   // CFEB index 0..4
    logic [15:0] data;
  } ovl_word_t;

  // DMB_L1_PIPE(8) field: bit 7 selects a scale of 8, bits 6:0 the mantissa,
  // N = bits(6:0) * 8**bit(7). Counts up to 127 are exact; larger counts are
  // sent divided by 8, so a 9-bit counter tops out at 63 * 8 = 504.
  function automatic logic [7:0] l1pipe_encode(input logic [8:0] n);
    if (n < 9'd128) return {1'b0, n[6:0]};
    else            return {1'b1, 1'b0, n[8:3]};
  endfunction

endpackage
