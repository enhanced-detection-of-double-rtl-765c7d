// secded84_dec: (8,4) SEC-DED decoder for one 8-bit word.
//
// The syndrome is the XOR of the position numbers (1..7) of all one bits among
// c1..c7; a single error in position p gives syndrome p.  The overall parity
// check q is the XOR of all eight bits.
//   syndrome 0, q 0   : no error
//   q 1               : single error; at c8 when the syndrome is 0, else at
//                       the position the syndrome names, which is flipped
//   syndrome != 0, q 0: double error, detected but not correctable
// The data bits are taken from positions 3, 5, 6 and 7 after correction.
//
// Interface: code[7] is c1 ... code[1] is c7, code[0] is c8 (as produced by
// secded84_enc).  d[4] is d1.  single_err and double_err are the status of
// the word.  Purely combinational.  The syndrome rule and the SEC-DED
// decision follow the method; the output signals are this design's own.
module secded84_dec (
  input  logic [7:0]              code,
  output logic [4:1]              d,
  output hamming_pkg::isyn_t      syndrome,
  output logic                    single_err,
  output logic                    double_err
);
  logic [7:1] c;       // c[p] is code position p
  logic       q;

  always_comb begin
    for (int p = 1; p <= 7; p++) c[p] = code[8-p];
    syndrome = '0;
    for (int p = 1; p <= 7; p++)
      if (c[p]) syndrome ^= hamming_pkg::isyn_t'(p);
    q = ^code;
    single_err = q;
    double_err = !q && (syndrome != '0);
    if (q && syndrome != '0) c[syndrome] = ~c[syndrome];
    d = {c[3], c[5], c[6], c[7]};
  end
endmodule
