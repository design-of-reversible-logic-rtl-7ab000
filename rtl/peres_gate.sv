// Peres gate (PG), 3x3 reversible.
//
// P = A, Q = A xor B, R = AB xor C: a Toffoli gate followed by a Feynman
// gate on the first two lines, in one gate. With C tied to 0 it gives the
// XOR and the AND of A and B, i.e. a reversible half adder. It is part of
// the reversible gate library but is not used by the code converters.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
