// secded84_enc: (8,4) SEC-DED encoder for one 4-bit word.
//
// Positions c1..c7 form a (7,4) Hamming code word laid out p1 p2 d1 p3 d2 d3
// d4.  Each parity bit at position 2^r covers the positions whose binary number
// has bit r set:
//   p1 = d1 ^ d2 ^ d4,  p2 = d1 ^ d3 ^ d4,  p3 = d2 ^ d3 ^ d4.
// c8 is the parity of c1..c7, which turns the single-error-correcting code
// into a single-error-correcting, double-error-detecting one.
//
// Interface: d[4] is d1 and d[1] is d4.  code[7] is c1, code[1] is c7 and
// code[0] is the overall parity c8.  Purely combinational, no clock.
// The layout and parity equations follow the generation algorithm of the
// method; placing c1 in the most significant bit matches its published
// waveforms.
module secded84_enc (
  input  logic [4:1] d,
  output logic [7:0] code
);
  logic d1, d2, d3, d4, p1, p2, p3;

  always_comb begin
    {d1, d2, d3, d4} = d;
    p1 = d1 ^ d2 ^ d4;
    p2 = d1 ^ d3 ^ d4;
    p3 = d2 ^ d3 ^ d4;
    code[7:1] = {p1, p2, d1, p3, d2, d3, d4};
    code[0]   = ^code[7:1];
  end
endmodule
