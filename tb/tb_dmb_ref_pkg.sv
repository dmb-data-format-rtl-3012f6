// tb_dmb_ref_pkg: reference model of the DMB event format for the testbenches.
//
// Builds, word by word, what the DMB must send for one L1A, independently of
// the RTL: the CRC is computed by long division of the message bits
// (followed by 22 zero bits) by x^22 + x + 1, and every header and trailer
// word is assembled from its bit fields directly.
package tb_dmb_ref_pkg;

  typedef logic [15:0] word_q_t[$];

  // Remainder of M(x) * x^22 divided by x^22 + x + 1, M = words MSB first.
  function automatic logic [21:0] ref_crc(input word_q_t msg);
    bit bits[$];
    foreach (msg[i]) for (int b = 15; b >= 0; b--) bits.push_back(msg[i][b]);
    repeat (22) bits.push_back(1'b0);
    // divide: G has bits 22, 1, 0
    for (int i = 0; i + 22 < bits.size(); i++) begin
      if (bits[i]) begin
        bits[i]      ^= 1'b1;
        bits[i + 21] ^= 1'b1;
        bits[i + 22] ^= 1'b1;
      end
    end
    ref_crc = '0;
    for (int k = 0; k < 22; k++) ref_crc[21 - k] = bits[bits.size() - 22 + k];
  endfunction

  function automatic logic [7:0] ref_pipe(input int n);
    if (n < 128) return 8'(n);
    return 8'h80 | 8'(n / 8);
  endfunction

  function automatic word_q_t ref_lone(input logic [23:0] l1a, input logic [11:0] bxn);
    word_q_t q;
    q.push_back(16'h8000);
    q.push_back(16'h8000 | 16'(l1a & 24'hFFF));
    q.push_back(16'h8000 | 16'(l1a >> 12));
    q.push_back(16'h8000 | 16'(bxn));
    return q;
  endfunction

  // Board vectors: index 0..4 CFEB1..5, 5 ALCT, 6 TMB.
  function automatic word_q_t ref_event(
      input logic [23:0] l1a, input logic [11:0] bxn, input logic [3:0] sync,
      input logic [6:0] dav, input logic [4:0] active, input logic [4:0] movlp,
      input logic [7:0] crate, input logic [3:0] id,
      input word_q_t alct, input word_q_t tmb,
      input word_q_t c0, input word_q_t c1, input word_q_t c2,
      input word_q_t c3, input word_q_t c4,
      input logic [6:0] half_ok, input logic [6:0] empty, input logic [6:0] full,
      input logic [6:0] sto, input logic [6:0] eto, input int pipe);
    word_q_t q;
    logic a, b, c;
    logic [21:0] crc;
    logic [15:0] w;
    a = dav[6]; b = dav[5]; c = (active != dav[4:0]);
    q.push_back({4'h9, l1a[11:0]});
    q.push_back({4'h9, l1a[23:12]});
    q.push_back({4'h9, a, b, active, dav[4:0]});
    q.push_back({4'h9, bxn});
    q.push_back({4'hA, a, c, b, c, a, c, b, dav[4:0]});
    q.push_back({4'hA, crate, id});
    q.push_back({4'hA, movlp, bxn[6:0]});
    q.push_back({4'hA, sync, l1a[7:0]});
    q = {q, alct, tmb, c0, c1, c2, c3, c4};
    q.push_back({4'hF, bxn[3:0], l1a[7:0]});
    q.push_back({4'hF, movlp, half_ok[5], half_ok[6], half_ok[4:0]});
    q.push_back({4'hF, ref_pipe(pipe), empty[5], empty[6], sto[5], sto[6]});
    q.push_back({4'hF, eto[4:0], eto[5], eto[6], sto[4:0]});
    q.push_back({4'hE, full[5], full[6], full[4:0], empty[4:0]});
    q.push_back({4'hE, crate, id});
    crc = ref_crc(q);
    w = {4'hE, 1'b0, crc[10:0]};   w[11] = ^crc[10:0];  q.push_back(w);
    w = {4'hE, 1'b0, crc[21:11]};  w[11] = ^crc[21:11]; q.push_back(w);
    return q;
  endfunction

endpackage
