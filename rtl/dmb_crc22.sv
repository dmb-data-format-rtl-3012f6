// dmb_crc22: 22-bit CRC accumulated over the 16-bit words of a DMB event.
//
// One word per cycle when en is high; clr restarts the CRC at zero (clr wins
// over en). Each word is shifted in MSB first through a Galois LFSR with the
// generator polynomial POLY (the x**22 term is implicit). crc is the value
// after all words enabled so far; it is updated at the clock edge that
// samples en. The default x**22 + x + 1 and the zero
// start value are this design's choice: the format reserves 22 CRC bits in
// Trailer 2 but does not define the code.
module dmb_crc22 #(
  parameter logic [21:0] POLY = 22'h000003
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        en,
  input  logic [15:0] data,
  output logic [21:0] crc
);
  function automatic logic [21:0] crc_next(input logic [21:0] c, input logic [15:0] d);
    logic [21:0] r;
    logic        fb;
    r = c;
    for (int i = 15; i >= 0; i--) begin
      fb = r[21] ^ d[i];
      r  = {r[20:0], 1'b0} ^ (fb ? POLY : 22'h0);
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr) crc <= '0;
    else if (en)    crc <= crc_next(crc, data);
  end

endmodule
