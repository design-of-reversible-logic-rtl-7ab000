// Self-checking testbench for hng_gate.
//
// Applies all sixteen input patterns. The reference model uses the gate's
// full-adder reading: R is the sum bit of A+B+C and S is the carry bit of
// A+B+C xor D, computed with integer addition. It then checks that the
// sixteen output patterns are all different (the gate is reversible).
// Combinational; a watchdog ends a hung run.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;
  logic [3:0] exp_out;
  int total;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      exp_out = {a, b, total[0], total[1] ^ d};
      checks++;
      if ({p, q, r, s} !== exp_out) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 4'(i), {p, q, r, s}, exp_out);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen != 16'hffff) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
