// tb_all_one_gate: exhaustive check of the all-one gate.
//
// All 16 input values are applied. Each output is compared with a table
// written out cell by cell from the gate's Karnaugh map (which of the two
// output functions covers each cell), and three properties are checked on
// their own: the output is never 2'b00, its parity value is 1 only for
// 4'b1111, and the two output wires are high for 9 and 8 of the 16 inputs
// (the near-even split that keeps them toggling).
module tb_all_one_gate;
  import parity_pkg::*;

  logic [3:0] in;
  pbit_t      y;
  logic       clk = 1'b0;
  int         checks = 0;
  int         failures = 0;

  // Expected output indexed by {a,b,c,d}: 2'b10 = first function only,
  // 2'b01 = second function only, 2'b11 = both.
  localparam pbit_t EXP [16] = '{
    2'b01, 2'b10, 2'b01, 2'b10,   // ab=00, cd=00,01,10,11
    2'b01, 2'b10, 2'b01, 2'b10,   // ab=01
    2'b10, 2'b10, 2'b10, 2'b10,   // ab=10
    2'b01, 2'b01, 2'b01, 2'b11    // ab=11
  };

  all_one_gate u_dut (.in(in), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int n_hi1, n_hi0;
    n_hi1 = 0;
    n_hi0 = 0;
    for (int v = 0; v < 16; v++) begin
      @(posedge clk);
      in = 4'(v);
      #1;
      checks++;
      if (y !== EXP[v]) begin
        failures++;
        $display("FAIL in=%b y=%b expected %b", in, y, EXP[v]);
      end
      checks++;
      if (y == 2'b00) begin
        failures++;
        $display("FAIL in=%b produced 2'b00", in);
      end
      checks++;
      if (pval(y) != (in == 4'hf)) begin
        failures++;
        $display("FAIL in=%b parity value %0b", in, pval(y));
      end
      n_hi1 += int'(y[1]);
      n_hi0 += int'(y[0]);
    end
    checks++;
    if (n_hi1 != 9 || n_hi0 != 8) begin
      failures++;
      $display("FAIL wire balance y[1]=%0d y[0]=%0d of 16", n_hi1, n_hi0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
