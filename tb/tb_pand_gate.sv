// tb_pand_gate: exhaustive check of the parity AND gate over its legal inputs.
//
// Both operands take the three values a parity gate in this design can
// produce (2'b01, 2'b10, 2'b11; 2'b00 never occurs). Each output is compared
// with a table written out from the gate's Karnaugh map, and checked to be a
// legal parity bit whose value is the AND of the operands' values.
module tb_pand_gate;
  import parity_pkg::*;

  pbit_t x, z, y;
  logic  clk = 1'b0;
  int    checks = 0;
  int    failures = 0;

  // Expected output indexed by {x,z}; entries with an operand of 2'b00 are
  // don't-cares and never applied.
  localparam pbit_t EXP [16] = '{
    2'b00, 2'b00, 2'b00, 2'b00,   // x=00 (impossible)
    2'b00, 2'b10, 2'b10, 2'b10,   // x=01: z=00,01,10,11
    2'b00, 2'b01, 2'b01, 2'b01,   // x=10
    2'b00, 2'b10, 2'b01, 2'b11    // x=11
  };

  pand_gate u_dut (.x(x), .z(z), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 1; i < 4; i++) begin
      for (int j = 1; j < 4; j++) begin
        @(posedge clk);
        x = 2'(i);
        z = 2'(j);
        #1;
        checks++;
        if (y !== EXP[{x, z}]) begin
          failures++;
          $display("FAIL x=%b z=%b y=%b expected %b", x, z, y, EXP[{x, z}]);
        end
        checks++;
        if (y == 2'b00 || pval(y) != (pval(x) & pval(z))) begin
          failures++;
          $display("FAIL x=%b z=%b y=%b is not the parity AND", x, z, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
