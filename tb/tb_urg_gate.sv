// Self-checking testbench for urg_gate.
//
// Applies all eight input patterns and compares P, Q, R with the URG truth
// table written out as constants, then checks that the eight output
// patterns are all different (the gate is reversible). Combinational; a
// watchdog ends a hung run.
module tb_urg_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // Expected {P,Q,R} for inputs {A,B,C} = 000 ... 111.
  localparam logic [2:0] EXP [8] =
    '{3'b000, 3'b101, 3'b011, 3'b110, 3'b001, 3'b100, 3'b111, 3'b010};
  logic [7:0] seen;

  urg_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(i), {p, q, r}, EXP[i]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
