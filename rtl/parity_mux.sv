// parity_mux: two-way multiplexer controlled by a parity-valued select.
//
// t = p ^ q is the difference between the two data inputs. XOR-ing t onto a
// value that is either p or q turns it into the other one. The multiplexer
// starts from p and applies two such toggle stages, the first enabled by
// sel[0] and the second by sel[1]:
//   out = p ^ (t & sel[0]) ^ (t & sel[1])
// Even parity of sel (logic-1) toggles zero or two times and yields p; odd
// parity (logic-0) toggles once and yields q. Both select wires can change
// without the selection changing. Purely combinational.
module parity_mux
  import parity_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] q,
  input  pbit_t            sel,
  output logic [WIDTH-1:0] out
);

  logic [WIDTH-1:0] t;
  logic [WIDTH-1:0] stage0;

  always_comb begin
    t      = p ^ q;
    stage0 = p ^ (t & {WIDTH{sel[0]}});
    out    = stage0 ^ (t & {WIDTH{sel[1]}});
  end

endmodule
