// dmb_overlap_fifo: the single CFEB OVERLAP FIFO shared by the five CFEBs.
//
// When an L1A follows another closely, some CFEB time samples belong to both
// events. The CFEB sends them once, tagged as overlapped, with the earlier
// event. While the DMB sends that event it also stores each tagged sample
// here with its CFEB number (wr, wdata). For the next event the builder first
// drains the stored samples of each CFEB (rd, rdata) and then continues with
// the new samples from that CFEB's input FIFO.
//
// Because samples are stored in CFEB order, the samples of one event form a
// contiguous run per CFEB at the head. mark latches the current count at the
// start of an event so that prev_left tells the builder how many head
// entries belong to the previous event; each pop decrements it. A stored
// sample can be popped from the cycle after its write; prev_left is valid the
// cycle after mark. The default
// DEPTH = 8192 holds one full 16-sample event from all five CFEBs (5 x 16 x
// 100 words = 8000), so the FIFO cannot fill in normal operation.
module dmb_overlap_fifo
  import dmb_pkg::*;
#(
  parameter int unsigned DEPTH = 8192
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sync_rst,
  input  logic                   wr,
  input  ovl_word_t              wdata,
  input  logic                   rd,
  output ovl_word_t              rdata,
  input  logic                   mark,
  output logic [$clog2(DEPTH):0] prev_left,
  output logic                   empty,
  output logic                   full
);
  logic [$clog2(DEPTH):0] count;

  dmb_fifo #(.WIDTH($bits(ovl_word_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clr(sync_rst),
    .wr, .wdata, .rd, .rdata,
    .empty, .full, .count
  );

  always_ff @(posedge clk) begin
    if (rst || sync_rst)                 prev_left <= '0;
    else if (mark)                       prev_left <= count;
    else if (rd && !empty && prev_left != '0) prev_left <= prev_left - 1'b1;
  end

endmodule
