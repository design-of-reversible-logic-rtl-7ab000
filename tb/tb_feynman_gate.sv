// Self-checking testbench for feynman_gate.
//
// Applies all four input pairs and compares P and Q with the Feynman gate
// truth table written out as constants, then checks that the four output
// pairs are all different (the gate is reversible). Combinational: one
// check per input after a 1 ns settle; a watchdog ends a hung run.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // Expected {P,Q} for inputs {A,B} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 2'(i), {p, q}, EXP[i]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen != 4'hf) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
