// bit_transpose: transposes four 4-bit words taken as a 4x4 bit matrix.
//
// Row r of the matrix is word r+1 (most significant bit in column 0).  Output
// word c+1 is column c of the matrix, read from row 0 at its most significant
// bit down to row 3.  In the encoder this interleaves the data so that each
// protected word carries one bit of every input word; the decoder uses the
// same block to undo it, since the transpose is its own inverse.
//
// Interface: unpacked arrays of four 4-bit words, index 1..4, bits [4:1].
// Pure wiring, combinational.  The mapping is read from the published
// encoder waveform (data words and their interleaved counterparts).
module bit_transpose (
  input  logic [4:1] in_w  [1:4],
  output logic [4:1] out_w [1:4]
);
  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        out_w[c+1][4-r] = in_w[r+1][4-c];
endmodule
