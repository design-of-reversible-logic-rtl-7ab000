// Universal reversible gate (URG), 3x3.
//
// P = C xor AB, Q = B, R = C xor (A or B). B passes through; the other two
// outputs fold an AND and an OR of A and B into C, which makes the gate a
// bijection on its eight input patterns. Tying C to 0 gives AND on P and
// OR on R; tying B to 1 gives P = A xor C and R = not C.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
module urg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = c ^ (a & b);
  assign q = b;
  assign r = c ^ (a | b);
endmodule
