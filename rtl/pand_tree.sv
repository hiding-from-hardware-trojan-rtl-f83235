// pand_tree: reduces N parity-valued bits to one with a tree of pAND gates.
//
// The result is logic-1 (2'b11) only if every leaf is logic-1, and is a
// legal parity bit (one wire high) otherwise. The tree is laid out as a
// binary heap in one vector of 2N-1 nodes: leaf k sits at node N-1+k, and
// every inner node i (0 <= i < N-1) is a pand_gate of its children 2i+1 and
// 2i+2; node 0 is the result. For N a power of two this pairs neighbouring
// leaves first ([0] with [1], [2] with [3], ...), then neighbouring pairs, and
// so on, giving log2(N) gate levels and N-1 gates. Leaves must never be
// 2'b00, as guaranteed by all_one_gate and pand_gate. The heap layout (and
// hence the shape for N not a power of two) is this design's choice.
// Purely combinational.
module pand_tree
  import parity_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  pbit_t [N-1:0] leaf,
  output pbit_t         y
);

  pbit_t [2*N-2:0] node;

  assign node[2*N-2:N-1] = leaf;

  for (genvar i = 0; i < int'(N) - 1; i++) begin : g_p
    pand_gate u_p (
      .x (node[2*i+1]),
      .z (node[2*i+2]),
      .y (node[i])
    );
  end

  assign y = node[0];

endmodule
