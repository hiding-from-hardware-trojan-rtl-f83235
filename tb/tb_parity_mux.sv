// tb_parity_mux: checks the parity multiplexer at its default width (128).
//
// For random data and every select pair, the output must be p for even
// select parity (2'b00, 2'b11) and q for odd parity (2'b01, 2'b10). A
// second pass changes the select wires between two encodings of the same
// value and checks that the output does not move.
module tb_parity_mux;
  import parity_pkg::*;

  localparam int unsigned W = 128;

  logic [W-1:0] p, q, out;
  pbit_t        sel;
  logic         clk = 1'b0;
  int           checks = 0;
  int           failures = 0;

  parity_mux u_dut (.p(p), .q(q), .sel(sel), .out(out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int k = 0; k < W / 32; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  initial begin : stimulus
    logic [W-1:0] prev;
    for (int n = 0; n < 200; n++) begin
      p = rand_word();
      q = rand_word();
      for (int s = 0; s < 4; s++) begin
        @(posedge clk);
        sel = 2'(s);
        #1;
        checks++;
        if (out !== ((s == 0 || s == 3) ? p : q)) begin
          failures++;
          $display("FAIL sel=%b out=%h p=%h q=%h", sel, out, p, q);
        end
      end
      // Same logical select, other wire encoding: output must hold.
      @(posedge clk);
      sel = 2'b01;
      #1;
      prev = out;
      sel = 2'b10;
      #1;
      checks++;
      if (out !== prev || out !== q) begin
        failures++;
        $display("FAIL odd-parity re-encoding changed the output");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
