// hamming_pkg: constants, types and placement tables shared by the Hamming
// encoder and decoder blocks.
//
// Two codes are used.  The inner code is the (8,4) single-error-correcting,
// double-error-detecting (SEC-DED) code: a (7,4) Hamming code whose positions
// c1..c7 hold p1 p2 d1 p3 d2 d3 d4, extended by an overall parity bit c8.
// The outer code is the (12,8) shortened Hamming code: positions 1..12, parity
// bits at the power-of-two positions 1, 2, 4 and 8, data bits d1..d8 in the
// other positions in increasing order.  The syndrome of a received word is the
// XOR of the position numbers of all its one bits, so a single error in
// position p gives syndrome p.  Syndromes 13, 14 and 15 cannot come from a
// single error; a double error that yields one of them is detected instead of
// being miscorrected.
//
// Selective bit placement changes only the order in which the twelve code
// positions are put on the wire.  SBP_ORDER lists, for wire slot 1 (the most
// significant bit) to slot 12, the code position carried there.  It was chosen
// so that 9 of the 11 pairs of neighbouring slots have position numbers whose
// XOR exceeds 12; with the plain order 1..12 only the pair (7,8) does.  Nine is
// the most possible: positions 1, 2 and 3 pair above 12 only with position 12,
// so at least one of them has no good neighbour.  The order itself is this
// design's own result of the search the method prescribes.
package hamming_pkg;

  localparam int unsigned OUTER_N = 12;   // (12,8) code length
  localparam int unsigned OUTER_K = 8;    // (12,8) data bits
  localparam int unsigned OUTER_M = 4;    // (12,8) check bits

  typedef logic [OUTER_M-1:0] osyn_t;     // outer syndrome
  typedef logic [2:0]         isyn_t;     // inner (7,4) syndrome

  typedef int unsigned order_t [OUTER_N];

  // Wire slot s (index s-1) carries code position SBP_ORDER[s-1].
  localparam order_t SBP_ORDER   = '{3, 1, 12, 2, 4, 9, 7, 10, 5, 8, 6, 11};
  // Plain lexicographic order, slot s carries position s.
  localparam order_t PLAIN_ORDER = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12};

  // Code positions of data bits d1..d8 of the (12,8) code.
  localparam order_t OUTER_DATA_POS = '{3, 5, 6, 7, 9, 10, 11, 12, 0, 0, 0, 0};

  // Code position carried by wire slot s (1..12).
  function automatic int unsigned slot_pos(bit sbp, int unsigned slot);
    return sbp ? SBP_ORDER[slot-1] : PLAIN_ORDER[slot-1];
  endfunction

endpackage
