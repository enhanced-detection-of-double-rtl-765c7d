// hamming_sbp_top: the complete encode - store/transmit - decode path.
//
// Four 4-bit data words are encoded by hamming_encoder into four 12-bit words
// (tx).  Between encoder and decoder sits the storage or transmission medium,
// modelled here by err_mask: every one bit of err_mask[k] flips the matching
// wire bit of word k, so any error pattern can be applied.  hamming_decoder
// then corrects and checks the received words and returns the data words
// (org_data) with a validity flag.
//
// Interface: all ports are plain unpacked arrays indexed 1..4; tx[k][12] and
// err_mask[k][12] are wire slot 1, the neighbour of slot 2 and so on.  SBP
// selects the selective bit placement (1, default) or the plain order (0).
// Purely combinational.  The error-injection port is this design's own way of
// exercising the error paths; the rest follows the encoder and decoder of the
// method.
module hamming_sbp_top #(
  parameter bit SBP = 1'b1
) (
  input  logic [4:1]  data            [1:4],
  input  logic [12:1] err_mask        [1:4],
  output logic [7:0]  code            [1:4],
  output logic [4:1]  int_data        [1:4],
  output logic [12:1] tx              [1:4],
  output logic [7:0]  dec_out         [1:4],
  output logic [4:1]  org_data        [1:4],
  output logic        flag,
  output logic [4:1]  outer_corrected,
  output logic [4:1]  outer_detected,
  output logic [4:1]  inner_corrected,
  output logic [4:1]  inner_detected
);
  logic [12:1] rx [1:4];

  hamming_encoder #(.SBP(SBP)) u_enc (
    .data(data), .code(code), .int_data(int_data), .tx(tx));

  always_comb
    for (int k = 1; k <= 4; k++) rx[k] = tx[k] ^ err_mask[k];

  hamming_decoder #(.SBP(SBP)) u_dec (
    .data_dec_in(rx), .dec_out(dec_out), .org_data(org_data), .flag(flag),
    .outer_corrected(outer_corrected), .outer_detected(outer_detected),
    .inner_corrected(inner_corrected), .inner_detected(inner_detected));
endmodule
