// Self-checking testbench for fredkin_gate.
//
// Applies all eight input patterns and compares P, Q, R with a reference
// model written from the gate's behaviour (B and C swap when A is 1), then checks that the
// eight output patterns are all different (the gate is reversible).
// Combinational; a watchdog ends a hung run.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  function automatic logic [2:0] model(input logic ia, ib, ic);
    // Controlled swap.
    if (ia) return {ia, ic, ib};
    return {ia, ib, ic};
  endfunction

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      if ({p, q, r} !== model(a, b, c)) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(i), {p, q, r}, model(a, b, c));
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
