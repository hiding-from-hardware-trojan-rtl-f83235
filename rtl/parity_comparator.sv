// parity_comparator: equality comparator with a parity-valued result.
//
// eq is 2'b11 (even parity, logic-1) when in0 == in1 and has exactly one
// wire high (odd parity, logic-0) otherwise. No internal net carries the
// rare "all bits equal" condition on a single wire: the comparison is built
// so that every net, the output pair included, keeps toggling under random
// inputs.
//
// Structure:
//   1. eqv = in0 ~^ in1, a bitwise equality vector.
//   2. WIDTH/4 all-one gates turn each 4-bit slice eqv[4k+3:4k] into one
//      parity-valued bit.
//   3. A balanced tree of pAND gates (pand_tree) reduces these to one
//      parity-valued bit. For WIDTH = 128 the tree has 32 leaves and 5
//      levels of pAND gates; slices [3:0] and [7:4] meet in the first gate.
// The tree shape for slice counts that are not a power of two is this
// design's choice. WIDTH must be a multiple of 4. Purely combinational.
module parity_comparator
  import parity_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output pbit_t            eq
);

  localparam int unsigned NSLICE = WIDTH / 4;

  logic [WIDTH-1:0]    eqv;
  pbit_t [NSLICE-1:0]  slice_one;

  assign eqv = in0 ~^ in1;

  for (genvar s = 0; s < NSLICE; s++) begin : g_ao
    all_one_gate u_ao (
      .in (eqv[4*s +: 4]),
      .y  (slice_one[s])
    );
  end

  pand_tree #(
    .N (NSLICE)
  ) u_tree (
    .leaf (slice_one),
    .y    (eq)
  );

endmodule
