// hamming_decoder: decoder for a block of four 12-bit words.
//
// Data path, all combinational, the reverse of hamming_encoder:
//   1. each received word goes through the (12,8) decoder, which corrects a
//      single error and reports a syndrome above 12 as a detected error
//      (dec_out, the recovered 8-bit inner code words);
//   2. each inner word goes through the (8,4) SEC-DED decoder, which corrects
//      a single error and detects a double error;
//   3. the four recovered 4-bit words are transposed back (org_data).
// flag is high when the block is believed good: no word had an outer error
// that was only detected, and no word had an inner double error.  Per-word
// status is also brought out.
//
// Interface: data_dec_in[k][12] is wire slot 1; dec_out[k][7] is inner c1;
// org_data[k] is data word k.  No clock.
// The ports data_dec_in, dec_out, org_data and flag are those of the
// published decoder waveform.  The meaning of flag (block valid) and the
// per-word status outputs are this design's own choice.
module hamming_decoder #(
  parameter bit SBP = 1'b1
) (
  input  logic [12:1] data_dec_in [1:4],
  output logic [7:0]  dec_out     [1:4],
  output logic [4:1]  org_data    [1:4],
  output logic        flag,
  output logic [4:1]  outer_corrected,
  output logic [4:1]  outer_detected,
  output logic [4:1]  inner_corrected,
  output logic [4:1]  inner_detected
);
  logic [4:1] inner_data [1:4];

  for (genvar k = 1; k <= 4; k++) begin : g_word
    hamming_pkg::osyn_t osyn;
    hamming_pkg::isyn_t isyn;
    hamming128_dec #(.SBP(SBP)) u_outer (
      .code(data_dec_in[k]), .data(dec_out[k]), .syndrome(osyn),
      .corrected(outer_corrected[k]), .detected(outer_detected[k]));
    secded84_dec u_inner (
      .code(dec_out[k]), .d(inner_data[k]), .syndrome(isyn),
      .single_err(inner_corrected[k]), .double_err(inner_detected[k]));
  end

  bit_transpose u_deinterleave (.in_w(inner_data), .out_w(org_data));

  assign flag = !(|outer_detected) && !(|inner_detected);
endmodule
