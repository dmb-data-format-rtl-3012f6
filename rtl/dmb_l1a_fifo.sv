// dmb_l1a_fifo: L1A/BXN counters and the FIFO of per-L1A records.
//
// Three counters run in the DMB:
//   bxn   bunch crossing number, 0..BX_PER_ORBIT-1, cleared by bc0
//   sync  4-bit count of BXs since the last SyncReset (wraps)
//   l1a   24-bit L1A event number, cleared by SyncReset
// On every arriving L1A the L1A number is incremented (the first L1A after a
// reset is number 1) and the record {l1a, bxn, sync} is pushed into the
// FIFO in the same cycle; the record can be popped from the next cycle. The
// event builder pops one record per L1A; count
// after the pop is the number of L1As still backed up (DMB_L1_PIPE).
// Counter start values, bc0 and the depth of 512 (enough for the 504 that
// DMB_L1_PIPE can report) are this design's choices.
module dmb_l1a_fifo
  import dmb_pkg::*;
#(
  parameter int unsigned DEPTH        = 512,
  parameter int unsigned BX_PER_ORBIT = 3564
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   sync_rst,
  input  logic                   bc0,
  input  logic                   l1a_in,
  input  logic                   rd,
  output l1a_rec_t               rdata,
  output logic                   empty,
  output logic [$clog2(DEPTH):0] count,
  output logic                   full
);
  logic [11:0] bxn;
  logic [3:0]  sync;
  logic [23:0] l1a_num;
  l1a_rec_t    rec;

  always_ff @(posedge clk) begin
    if (rst || bc0)                          bxn <= '0;
    else if (bxn == 12'(BX_PER_ORBIT - 1))   bxn <= '0;
    else                                     bxn <= bxn + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || sync_rst) begin
      sync    <= '0;
      l1a_num <= '0;
    end else begin
      sync <= sync + 1'b1;
      if (l1a_in) l1a_num <= l1a_num + 1'b1;
    end
  end

  assign rec = '{l1a: l1a_num + 24'd1, bxn: bxn, sync: sync};

  dmb_fifo #(.WIDTH($bits(l1a_rec_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clr(sync_rst),
    .wr(l1a_in), .wdata(rec), .rd, .rdata,
    .empty, .full, .count
  );

endmodule
