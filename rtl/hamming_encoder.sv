// hamming_encoder: encoder for a block of four 4-bit data words.
//
// Data path, all combinational:
//   1. each data word is encoded on its own with the (8,4) SEC-DED code
//      (outputs code[1..4], the row code words);
//   2. the four data words are transposed as a 4x4 bit matrix (int_data),
//      so that interleaved word k holds bit k of every data word;
//   3. each interleaved word is encoded with the (8,4) SEC-DED code, and the
//      resulting 8 bits are encoded again with the (12,8) shortened Hamming
//      code whose bits are put on the wire in the selective order (tx).
// An error burst confined to one transmitted word therefore touches at most
// one bit of each data word after the inner code has cleaned it up.
//
// Interface: data[k] is data word k (bit 4 first); code[k][7:0], int_data[k]
// and tx[k][12:1] as above, tx[k][12] being wire slot 1.  No clock: the
// outputs follow the inputs after the gate delay.
// The port set, the transpose and both codes are those shown in the published
// encoder waveform.  That the row code words are an output only, and that the
// (12,8) stage takes the SEC-DED word of the interleaved data, is this
// design's reading of that waveform.
module hamming_encoder #(
  parameter bit SBP = 1'b1
) (
  input  logic [4:1]  data     [1:4],
  output logic [7:0]  code     [1:4],
  output logic [4:1]  int_data [1:4],
  output logic [12:1] tx       [1:4]
);
  logic [7:0] inner [1:4];

  bit_transpose u_interleave (.in_w(data), .out_w(int_data));

  for (genvar k = 1; k <= 4; k++) begin : g_word
    secded84_enc u_row   (.d(data[k]),     .code(code[k]));
    secded84_enc u_inner (.d(int_data[k]), .code(inner[k]));
    hamming128_enc #(.SBP(SBP)) u_outer (.data(inner[k]), .code(tx[k]));
  end
endmodule
