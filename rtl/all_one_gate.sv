// all_one_gate: converts a 4-bit slice of common-valued logic into one
// parity-valued bit that is logic-1 exactly when all four inputs are one.
//
// The output pair is 2'b11 for a = 4'b1111. For every other input exactly
// one of the two wires is high (odd parity, logic-0), and the 15 non-matching
// inputs are split into two sets of almost equal size (8 and 7), so the wires
// keep toggling when the input changes even though the logical result stays 0.
// 2'b00 is never produced, which the following pAND gates rely on.
//
// The two output functions are read off the published Karnaugh map of the
// gate, with a = in[3], b = in[2], c = in[1], d = in[0]:
//   y[1] = (~a & d) | (c & d) | (a & ~b)
//   y[0] = (~a & ~d) | (a & b)
// Which map function drives which output wire, and which input bit is a, b,
// c or d, is this design's choice. Purely combinational, no clock.
module all_one_gate
  import parity_pkg::*;
(
  input  logic [3:0] in,
  output pbit_t      y
);

  logic a, b, c, d;

  assign {a, b, c, d} = in;

  always_comb begin
    y[1] = (~a & d) | (c & d) | (a & ~b);
    y[0] = (~a & ~d) | (a & b);
  end

endmodule
