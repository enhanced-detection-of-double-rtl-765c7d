// hamming128_dec: (12,8) shortened Hamming decoder with selective bit
// placement.
//
// The received wire bits are first put back into code positions 1..12 using
// the same placement table as the encoder.  The syndrome is the XOR of the
// position numbers of all one bits:
//   0      : no error
//   1..12  : single error at that position, which is flipped (a double
//            error that lands here is miscorrected; the inner code downstream
//            may still catch it)
//   13..15 : no single error gives this value; the error is reported as
//            detected and the data are passed on uncorrected
// Data bits d1..d8 are read from positions 3, 5, 6, 7, 9, 10, 11, 12.
//
// Interface: code[12] is wire slot 1.  data[7] is d1.  corrected and
// detected are the status of the word, syndrome its raw syndrome.  Purely
// combinational.  The syndrome test against the code length follows the
// method; the output signals are this design's own.
module hamming128_dec #(
  parameter bit SBP = 1'b1
) (
  input  logic [12:1]          code,
  output logic [7:0]           data,
  output hamming_pkg::osyn_t   syndrome,
  output logic                 corrected,
  output logic                 detected
);
  import hamming_pkg::*;

  logic [12:1] pos;

  always_comb begin
    pos = '0;
    for (int s = 1; s <= 12; s++) pos[slot_pos(SBP, s)] = code[13-s];
    syndrome = '0;
    for (int p = 1; p <= 12; p++)
      if (pos[p]) syndrome ^= osyn_t'(p);
    corrected = (syndrome != '0) && (syndrome <= osyn_t'(OUTER_N));
    detected  = (syndrome >  osyn_t'(OUTER_N));
    if (corrected) pos[syndrome] = ~pos[syndrome];
    for (int i = 0; i < OUTER_K; i++) data[7-i] = pos[OUTER_DATA_POS[i]];
  end
endmodule
