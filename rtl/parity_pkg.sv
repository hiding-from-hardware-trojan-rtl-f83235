// parity_pkg: shared type and helpers for parity-valued logic.
//
// In parity-valued logic one logical bit is carried on a pair of wires and
// its value is the parity of the pair: even parity (2'b00 or 2'b11) is
// logic-1, odd parity (2'b01 or 2'b10) is logic-0. The wires of a pair can
// therefore toggle while the logical value stays the same. The gates in this
// design only ever produce 2'b11 for logic-1; 2'b00 is never generated and the
// pAND gate treats it as an impossible input.
package parity_pkg;

  // One parity-valued bit (a wire pair).
  typedef logic [1:0] pbit_t;

  // Logical value of a parity-valued bit: 1 for even parity.
  function automatic logic pval(pbit_t p);
    return ~(p[1] ^ p[0]);
  endfunction

endpackage
