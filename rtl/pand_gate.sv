// pand_gate: AND of two parity-valued bits.
//
// Inputs x = {a, b} and z = {c, d} are parity-valued bits as produced by the
// all-one gate or by another pAND gate: 2'b11 is logic-1, 2'b01 and 2'b10 are
// logic-0, 2'b00 never occurs and is a don't-care. The output is 2'b11 when
// both inputs are 2'b11 and has exactly one wire high otherwise, so it is
// again a legal input for the next pAND gate. Read off the published
// Karnaugh map of the gate:
//   y[1] = (~a & b) | (b & d)
//   y[0] = (a & ~b) | (a & c)
// Four two-input NAND gates suffice for this; the RTL writes the sum of
// products and leaves the mapping to synthesis. Which map function drives
// which output wire is this design's choice. Purely combinational.
module pand_gate
  import parity_pkg::*;
(
  input  pbit_t x,
  input  pbit_t z,
  output pbit_t y
);

  logic a, b, c, d;

  assign {a, b} = x;
  assign {c, d} = z;

  always_comb begin
    y[1] = (~a & b) | (b & d);
    y[0] = (a & ~b) | (a & c);
  end

endmodule
