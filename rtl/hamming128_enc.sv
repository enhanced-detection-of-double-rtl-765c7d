// hamming128_enc: (12,8) shortened Hamming encoder with selective bit
// placement.
//
// The eight data bits go to code positions 3, 5, 6, 7, 9, 10, 11 and 12.  The
// parity bit at position 2^r (1, 2, 4, 8) is the XOR of the data positions
// whose binary number has bit r set, so every code word has syndrome zero.
// The twelve code positions are then put on the wire in the order given by
// hamming_pkg: with SBP set, the selective order, which makes most double
// errors in neighbouring wire bits produce a syndrome above 12 (detected, not
// miscorrected); with SBP clear, the plain order 1..12.  The placement costs
// no logic, only wiring.
//
// Interface: data[7] is d1 ... data[0] is d8.  code[12] is wire slot 1 and
// code[1] is slot 12.  Purely combinational.  The code construction follows
// the method; the particular wire order and the SBP switch are this design's.
module hamming128_enc #(
  parameter bit SBP = 1'b1
) (
  input  logic [7:0]  data,
  output logic [12:1] code
);
  import hamming_pkg::*;

  logic [12:1] pos;    // pos[p] is code position p

  always_comb begin
    pos = '0;
    for (int i = 0; i < OUTER_K; i++) pos[OUTER_DATA_POS[i]] = data[7-i];
    for (int r = 0; r < 4; r++)
      for (int p = 1; p <= 12; p++)
        if (p != (1 << r) && p[r]) pos[1 << r] ^= pos[p];
    for (int s = 1; s <= 12; s++) code[13-s] = pos[slot_pos(SBP, s)];
  end
endmodule
