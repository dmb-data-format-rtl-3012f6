// dmb_input_fifo: input FIFO for one front-end board (CFEB, ALCT or TMB).
//
// The FEB pushes its words for an event with wr/wdata; the last word carries
// the end-of-event tag (wdata.eoe) and CFEB samples that overlap the next
// event carry wdata.ovl. The event builder pops words first-word-fall-through
// style with rd. One instance per FEB: five CFEBs, ALCT and TMB.
//
// Status, as reported in Trailer 1/2 at the moment a word is sent:
//   half_ok    1 while the FIFO is at most half full, 0 above half (warning)
//   empty      1 while the FIFO holds nothing
//   full_stk   1 once the FIFO has been full; it stays set until rst or
//              sync_rst, because a full FIFO loses data and breaks event
//              alignment until the board is resynchronised
// Timing: a written word can be popped from the next cycle on; half_ok and
// empty follow the count with no delay, full_stk rises one cycle after the
// FIFO becomes full. A write to a full FIFO is dropped. sync_rst also empties the FIFO; that
// flush, like the tag-bit encoding of the end-of-event marker, is this
// design's choice. DEPTH = 16384 is sized for about twenty 8-sample CFEB
// events (about 800 words each).
module dmb_input_fifo
  import dmb_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      sync_rst,
  input  logic      wr,
  input  feb_word_t wdata,
  input  logic      rd,
  output feb_word_t rdata,
  output logic      empty,
  output logic      half_ok,
  output logic      full_stk
);
  logic                   full;
  logic [$clog2(DEPTH):0] count;

  dmb_fifo #(.WIDTH($bits(feb_word_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clr(sync_rst),
    .wr, .wdata, .rd, .rdata,
    .empty, .full, .count
  );

  assign half_ok = (count <= ($clog2(DEPTH)+1)'(DEPTH / 2));

  always_ff @(posedge clk) begin
    if (rst || sync_rst) full_stk <= 1'b0;
    else if (full)       full_stk <= 1'b1;
  end

endmodule
