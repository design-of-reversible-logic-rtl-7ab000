// HNG gate, 4x4 reversible.
//
// P = A, Q = B, R = A xor B xor C, S = (A xor B)C xor AB xor D. With D tied
// to 0, R is the sum and S the carry of a full adder on A, B and C, so one
// gate makes a reversible full adder. It is part of the reversible gate
// library but is not used by the code converters.
//
// Interface: a, b, c, d in; p, q, r, s out. Purely combinational, no clock.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic a_xor_b;
  assign a_xor_b = a ^ b;
  assign p = a;
  assign q = b;
  assign r = a_xor_b ^ c;
  assign s = (a_xor_b & c) ^ (a & b) ^ d;
endmodule
