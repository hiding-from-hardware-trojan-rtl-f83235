// tb_parity_comparator: checks the parity comparator at its default width
// (128) and at width 20, whose five all-one slices give a pAND tree with an
// odd leftover at two levels.
//
// Stimulus: random operand pairs, equal pairs, and pairs that differ in one
// bit at every bit position. For each, the result must be a legal parity bit
// (never 2'b00), exactly 2'b11 when the operands are equal and of odd parity
// otherwise. With one operand held at a fixed key and the other random, the
// toggle rate of each output wire is measured over 2000 vectors and must be
// above 0.1, the usual threshold below which a net counts as rarely toggling.
module tb_parity_comparator;
  import parity_pkg::*;

  localparam int unsigned W  = 128;
  localparam int unsigned WS = 20;

  logic [W-1:0]  a, b;
  pbit_t         eq;
  logic [WS-1:0] as, bs;
  pbit_t         eqs;
  logic          clk = 1'b0;
  int            checks = 0;
  int            failures = 0;

  parity_comparator u_dut (.in0(a), .in1(b), .eq(eq));
  parity_comparator #(.WIDTH(WS)) u_small (.in0(as), .in1(bs), .eq(eqs));

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

  task automatic check_big();
    #1;
    checks++;
    if ((a == b) ? (eq !== 2'b11) : (eq == 2'b00 || pval(eq))) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h eq=%b", W, a, b, eq);
    end
  endtask

  task automatic check_small();
    #1;
    checks++;
    if ((as == bs) ? (eqs !== 2'b11) : (eqs == 2'b00 || pval(eqs))) begin
      failures++;
      $display("FAIL W=%0d a=%h b=%h eq=%b", WS, as, bs, eqs);
    end
  endtask

  initial begin : stimulus
    logic [W-1:0] key;
    pbit_t        prev;
    int           tog1, tog0, silent;

    // Random pairs, then equal pairs.
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      a = rand_word();
      b = (n % 5 == 0) ? a : rand_word();
      check_big();
    end
    // One differing bit at every position.
    for (int i = 0; i < int'(W); i++) begin
      @(posedge clk);
      b = rand_word();
      a = b ^ (W'(1) << i);
      check_big();
    end

    // Width 20: random, equal and single-bit-difference pairs.
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      as = WS'($urandom);
      case (n % 4)
        0:       bs = as;
        1:       bs = as ^ (WS'(1) << (n % WS));
        default: bs = WS'($urandom);
      endcase
      check_small();
    end

    // Toggle activity of the output wires with a fixed key operand.
    key    = rand_word();
    b      = key;
    a      = rand_word();
    #1;
    prev   = eq;
    tog1   = 0;
    tog0   = 0;
    silent = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      a = rand_word();
      check_big();
      tog1 += int'(eq[1] != prev[1]);
      tog0 += int'(eq[0] != prev[0]);
      if (eq != prev && !pval(eq) && !pval(prev)) silent++;
      prev = eq;
    end
    $display("output wire toggle rates: eq[1]=%0.3f eq[0]=%0.3f, silent toggles=%0d",
             real'(tog1) / 2000.0, real'(tog0) / 2000.0, silent);
    checks++;
    if (tog1 <= 200 || tog0 <= 200) begin
      failures++;
      $display("FAIL an output wire toggles at or below rate 0.1");
    end
    checks++;
    if (silent == 0) begin
      failures++;
      $display("FAIL output never toggled while staying logic-0");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
