// hamming_ref_pkg: reference models used by the testbenches.
//
// They are written to be independent of the RTL: the encoders search for the
// check bits that make every parity-check row even, and the SEC-DED decoder
// searches all 16 code words for the nearest one.  Only the (12,8) decoder
// model uses the syndrome rule, since miscorrection of a double error cannot
// be predicted any other way; it is written over bit masks rather than
// position arrays.
package hamming_ref_pkg;

  // Code position (1..12) carried by wire slot s (1..12), selective order.
  // Kept here as a separate copy so that a wrong table in the RTL is caught.
  function automatic int ref_slot_pos(bit sbp, int s);
    int tbl [12] = '{3, 1, 12, 2, 4, 9, 7, 10, 5, 8, 6, 11};
    return sbp ? tbl[s-1] : s;
  endfunction

  // (8,4) SEC-DED, c1..c7 = p1 p2 d1 p3 d2 d3 d4, c8 overall parity,
  // returned with c1 in bit 7.
  function automatic logic [7:0] ref_secded_enc(logic [3:0] d);
    logic [7:1] c;
    c = '0;
    c[3] = d[3]; c[5] = d[2]; c[6] = d[1]; c[7] = d[0];
    // try all parity choices and keep the one that satisfies every check row
    for (int p = 0; p < 8; p++) begin
      c[1] = p[0]; c[2] = p[1]; c[4] = p[2];
      if ((c[1] ^ c[3] ^ c[5] ^ c[7]) == 0 &&
          (c[2] ^ c[3] ^ c[6] ^ c[7]) == 0 &&
          (c[4] ^ c[5] ^ c[6] ^ c[7]) == 0) break;
    end
    return {c[1], c[2], c[3], c[4], c[5], c[6], c[7], ^c};
  endfunction

  // Nearest-code-word decoding of the (8,4) SEC-DED code.
  // kind: 0 no error, 1 single error corrected, 2 uncorrectable
  function automatic void ref_secded_dec(input logic [7:0] r,
                                         output logic [3:0] d,
                                         output int kind);
    int best, nbest, hd;
    logic [3:0] bd;
    best = 99; nbest = 0; bd = '0;
    for (int v = 0; v < 16; v++) begin
      hd = $countones(r ^ ref_secded_enc(4'(v)));
      if (hd < best) begin best = hd; nbest = 1; bd = 4'(v); end
      else if (hd == best) nbest++;
    end
    if (best == 0) kind = 0;
    else if (best == 1) kind = 1;
    else kind = 2;
    d = (kind == 2) ? {r[5], r[3], r[2], r[1]} : bd;
  endfunction

  // (12,8) code word in position order, bit p-1 = position p.
  function automatic logic [11:0] ref_h128_pos(logic [7:0] d);
    int dp [8] = '{3, 5, 6, 7, 9, 10, 11, 12};
    logic [11:0] w;
    int s;
    for (int par = 0; par < 16; par++) begin
      w = '0;
      for (int i = 0; i < 8; i++) w[dp[i]-1] = d[7-i];
      w[0] = par[0]; w[1] = par[1]; w[3] = par[2]; w[7] = par[3];
      s = 0;
      for (int p = 1; p <= 12; p++) if (w[p-1]) s ^= p;
      if (s == 0) return w;
    end
    return 'x;
  endfunction

  // Position-ordered word to wire order (bit 11 = slot 1) and back.
  function automatic logic [11:0] ref_to_wire(bit sbp, logic [11:0] w);
    logic [11:0] o;
    for (int s = 1; s <= 12; s++) o[12-s] = w[ref_slot_pos(sbp, s)-1];
    return o;
  endfunction

  function automatic logic [11:0] ref_from_wire(bit sbp, logic [11:0] o);
    logic [11:0] w;
    for (int s = 1; s <= 12; s++) w[ref_slot_pos(sbp, s)-1] = o[12-s];
    return w;
  endfunction

  function automatic logic [11:0] ref_h128_enc(bit sbp, logic [7:0] d);
    return ref_to_wire(sbp, ref_h128_pos(d));
  endfunction

  // (12,8) decoding. kind: 0 clean, 1 corrected, 2 detected (syndrome > 12)
  function automatic void ref_h128_dec(input bit sbp, input logic [11:0] r,
                                       output logic [7:0] d, output int kind,
                                       output int syn);
    int dp [8] = '{3, 5, 6, 7, 9, 10, 11, 12};
    logic [11:0] w;
    w = ref_from_wire(sbp, r);
    syn = 0;
    for (int p = 1; p <= 12; p++) if (w[p-1]) syn ^= p;
    if (syn == 0) kind = 0;
    else if (syn <= 12) begin kind = 1; w[syn-1] = ~w[syn-1]; end
    else kind = 2;
    for (int i = 0; i < 8; i++) d[7-i] = w[dp[i]-1];
  endfunction

  // Transpose of four 4-bit words, word index 0..3 here (word 1 = index 0).
  function automatic logic [15:0] ref_transpose(logic [15:0] m);
    // m[15:12] is word 1, m[3:0] word 4; bit 3 of a word is its first bit
    logic [15:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[15 - 4*c - r] = m[15 - 4*r - c];
    return o;
  endfunction

  // Whole-block reference: decode four received 12-bit words (word 1 first in
  // rx[47:36]) and return the data words, packed word 1 first, plus the
  // number of outer detections and inner double errors.
  function automatic void ref_block_dec(input bit sbp, input logic [47:0] rx,
                                        output logic [31:0] dec8,
                                        output logic [15:0] data,
                                        output int o_det, output int i_det,
                                        output int o_cor, output int i_cor);
    logic [7:0] d8;
    logic [3:0] d4;
    logic [15:0] inner;
    int kind_o, kind_i, syn;
    o_det = 0; i_det = 0; o_cor = 0; i_cor = 0;
    for (int k = 0; k < 4; k++) begin
      ref_h128_dec(sbp, rx[47-12*k -: 12], d8, kind_o, syn);
      dec8[31-8*k -: 8] = d8;
      ref_secded_dec(d8, d4, kind_i);
      inner[15-4*k -: 4] = d4;
      if (kind_o == 2) o_det++;
      if (kind_o == 1) o_cor++;
      if (kind_i == 2) i_det++;
      if (kind_i == 1) i_cor++;
    end
    data = ref_transpose(inner);
  endfunction

  // Whole-block reference encoder: four data words to four wire words.
  function automatic logic [47:0] ref_block_enc(bit sbp, logic [15:0] data);
    logic [15:0] t;
    logic [47:0] o;
    t = ref_transpose(data);
    for (int k = 0; k < 4; k++)
      o[47-12*k -: 12] = ref_h128_enc(sbp, ref_secded_enc(t[15-4*k -: 4]));
    return o;
  endfunction

endpackage
