// Toffoli gate (TG), the 3x3 reversible controlled-controlled-NOT gate.
//
// A and B are controls and pass through to P and Q; the target C is
// inverted when both controls are 1: R = AB xor C. With C tied to 0 the
// gate computes AND reversibly. It is part of the reversible gate library
// but is not used by the code converters.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
