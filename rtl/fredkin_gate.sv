// Fredkin gate (FRG), the 3x3 reversible controlled swap.
//
// A is the control and passes through to P. When A is 0, B goes to Q and C
// to R; when A is 1 the two are swapped: Q = A'B xor AC, R = A'C xor AB.
// The gate conserves the number of ones. It is part of the reversible gate
// library but is not used by the code converters.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
