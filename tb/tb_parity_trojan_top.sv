// tb_parity_trojan_top: end-to-end test of the infected output stage at its
// default parameters (128-bit data, default activation key).
//
// The functional unit is replaced by a stand-in: fu_out is a fixed
// scrambling of inp (rotate and XOR), and enc_key is a fixed random secret.
// The test runs
//   1. 1000 random inputs: out must equal fu_out (normal operation);
//   2. the activation key: out must equal enc_key (key leak);
//   3. the activation key with each single bit flipped: out must equal fu_out;
//   4. the activation key again after random traffic.
// It counts each mechanism (normal pass-through, activation, near-miss
// rejection, act toggling while staying logic-0) and fails if one never
// occurs. It also measures, over the random phase, the toggle rate of both
// act wires and the lowest toggle rate among the 128 first-stage wires of the
// multiplexer, and requires all of them to be above 0.1.
module tb_parity_trojan_top;
  import parity_pkg::*;

  localparam int unsigned W = 128;
  localparam logic [W-1:0] KEY = 128'h0123456789abcdef_fedcba9876543210;

  logic [W-1:0] inp, fu_out, enc_key, out;
  logic         clk = 1'b0;
  int           checks = 0;
  int           failures = 0;

  int n_pass = 0, n_act = 0, n_reject = 0, n_silent = 0;

  parity_trojan_top u_dut (.inp(inp), .fu_out(fu_out), .enc_key(enc_key), .out(out));

  // Stand-in for the functional unit's result.
  always_comb fu_out = {inp[W-2:0], inp[W-1]} ^ 128'h5a5a_5a5a_a5a5_a5a5_3c3c_3c3c_c3c3_c3c3;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int k = 0; k < W / 32; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  task automatic apply(input logic [W-1:0] v);
    @(posedge clk);
    inp = v;
    #1;
    checks++;
    if (v == KEY) begin
      if (out !== enc_key) begin
        failures++;
        $display("FAIL activation: out=%h expected key %h", out, enc_key);
      end else n_act++;
    end else begin
      if (out !== fu_out) begin
        failures++;
        $display("FAIL inp=%h out=%h expected fu_out %h", v, out, fu_out);
      end else n_pass++;
    end
  endtask

  initial begin : stimulus
    pbit_t        prev_act;
    logic [W-1:0] prev_st;
    int           tog_act1, tog_act0, min_st;
    int           tog_st [W];

    enc_key = rand_word();
    inp     = rand_word();
    #1;
    prev_act = u_dut.act;
    prev_st  = u_dut.u_mux.stage0;
    tog_act1 = 0;
    tog_act0 = 0;
    for (int i = 0; i < int'(W); i++) tog_st[i] = 0;

    // 1. Normal operation on random inputs.
    for (int n = 0; n < 1000; n++) begin
      apply(rand_word());
      tog_act1 += int'(u_dut.act[1] != prev_act[1]);
      tog_act0 += int'(u_dut.act[0] != prev_act[0]);
      if (u_dut.act != prev_act && !pval(u_dut.act) && !pval(prev_act)) n_silent++;
      for (int i = 0; i < int'(W); i++)
        tog_st[i] += int'(u_dut.u_mux.stage0[i] != prev_st[i]);
      prev_act = u_dut.act;
      prev_st  = u_dut.u_mux.stage0;
    end

    // 2. Activation.
    apply(KEY);

    // 3. Near misses: every single-bit deviation from the key.
    for (int i = 0; i < int'(W); i++) begin
      apply(KEY ^ (W'(1) << i));
      checks++;
      if (pval(u_dut.act)) begin
        failures++;
        $display("FAIL trigger fired on a near miss, bit %0d", i);
      end else n_reject++;
    end

    // 4. Activation again after more random traffic.
    for (int n = 0; n < 10; n++) apply(rand_word());
    apply(KEY);

    min_st = tog_st[0];
    for (int i = 1; i < int'(W); i++) if (tog_st[i] < min_st) min_st = tog_st[i];
    $display("act toggle rates %0.3f %0.3f, lowest mux stage rate %0.3f",
             real'(tog_act1) / 1000.0, real'(tog_act0) / 1000.0, real'(min_st) / 1000.0);
    $display("pass-through=%0d activations=%0d near-miss rejections=%0d silent act toggles=%0d",
             n_pass, n_act, n_reject, n_silent);

    checks++;
    if (tog_act1 <= 100 || tog_act0 <= 100 || min_st <= 100) begin
      failures++;
      $display("FAIL a trojan wire toggles at or below rate 0.1");
    end
    checks++;
    if (n_pass == 0)   begin failures++; $display("FAIL no normal pass-through"); end
    checks++;
    if (n_act != 2)    begin failures++; $display("FAIL expected 2 activations, saw %0d", n_act); end
    checks++;
    if (n_reject == 0) begin failures++; $display("FAIL no near-miss rejection"); end
    checks++;
    if (n_silent == 0) begin failures++; $display("FAIL act never toggled silently"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
