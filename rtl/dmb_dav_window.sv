// dmb_dav_window: DAV x L1A coincidence for the seven front-end boards.
//
// A FEB that sees an L1A in coincidence with its trigger raises DAV (one BX,
// synchronous with the L1A but arriving later because of cables and muon
// time of flight). The DMB delays each L1A by the programmable l1a_delay BXs
// and accepts a DAV that arrives within a window of WIN BXs centred on the
// delayed L1A, i.e. from delay-H to delay+H BXs after the L1A with
// H = (WIN-1)/2. Same for the CFEB multiple-overlap lines (cfeb_movlp) and
// the TMB's CFEB_ACTIVE pattern (tmb_cfeb_active), which are ORed over the
// window. At the end of the window (delay+H BXs after the L1A) the result is
// pushed as one dav_rec_t into a FIFO that the event builder pops in step
// with the L1A/BXN FIFO; it can be popped from the following cycle.
//
// The delayed-L1A/window scheme and WIN = 3 follow the document; the delay
// range (MAX_DELAY), the result FIFO, and carrying MOVLP and CFEB_ACTIVE on
// lines sampled in the same window are this design's choices.
module dmb_dav_window
  import dmb_pkg::*;
#(
  parameter int unsigned WIN       = 3,
  parameter int unsigned MAX_DELAY = 255,
  parameter int unsigned DEPTH     = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sync_rst,
  input  logic              l1a_in,
  input  logic [7:0]        l1a_delay,
  input  logic [N_FEB-1:0]  dav,          // CFEB1..5, ALCT, TMB
  input  logic [N_CFEB-1:0] cfeb_movlp,
  input  logic [N_CFEB-1:0] tmb_cfeb_active,
  input  logic              rd,
  output dav_rec_t          rdata,
  output logic              empty,
  output logic [$clog2(DEPTH):0] count,
  output logic              full
);
  localparam int unsigned H   = (WIN - 1) / 2;
  localparam int unsigned LEN = MAX_DELAY + H;   // delay line length

  logic [LEN-1:0]     l1a_sr;
  logic [LEN:0]       l1a_line;      // [k] = L1A of k BXs ago
  logic               win_end;
  logic [8:0]         tap;

  // Window history, element 0 = current BX
  logic [N_FEB-1:0]   dav_h  [WIN];
  logic [N_CFEB-1:0]  movl_h [WIN];
  logic [N_CFEB-1:0]  act_h  [WIN];
  dav_rec_t           rec;

  always_ff @(posedge clk) begin
    if (rst || sync_rst) l1a_sr <= '0;
    else                 l1a_sr <= {l1a_sr[LEN-2:0], l1a_in};
  end
  assign l1a_line = {l1a_sr, l1a_in};
  assign tap      = (int'(l1a_delay) >= int'(MAX_DELAY)) ? 9'(MAX_DELAY + H) : 9'(l1a_delay) + 9'(H);
  assign win_end  = l1a_line[tap];

  assign dav_h[0]  = dav;
  assign movl_h[0] = cfeb_movlp;
  assign act_h[0]  = tmb_cfeb_active;
  for (genvar i = 1; i < WIN; i++) begin : g_hist
    always_ff @(posedge clk) begin
      if (rst || sync_rst) begin
        dav_h[i]  <= '0;
        movl_h[i] <= '0;
        act_h[i]  <= '0;
      end else begin
        dav_h[i]  <= dav_h[i-1];
        movl_h[i] <= movl_h[i-1];
        act_h[i]  <= act_h[i-1];
      end
    end
  end

  always_comb begin
    logic [N_FEB-1:0]  d;
    logic [N_CFEB-1:0] m, a;
    d = '0; m = '0; a = '0;
    for (int i = 0; i < WIN; i++) begin
      d |= dav_h[i];
      m |= movl_h[i];
      a |= act_h[i];
    end
    rec.cfeb_dav    = d[N_CFEB-1:0];
    rec.alct_dav    = d[FEB_ALCT];
    rec.tmb_dav     = d[FEB_TMB];
    rec.cfeb_active = a;
    rec.cfeb_movlp  = m;
  end

  dmb_fifo #(.WIDTH($bits(dav_rec_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clr(sync_rst),
    .wr(win_end), .wdata(rec), .rd, .rdata,
    .empty, .full, .count
  );

endmodule
