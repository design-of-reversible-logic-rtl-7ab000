// Feynman gate (FG), the 2x2 reversible controlled-NOT gate.
//
// Input A is the control and passes straight through to P; input B is the
// target and leaves as Q = A xor B. The mapping (A,B) -> (P,Q) is a
// bijection, so the inputs can always be recovered from the outputs. With
// B tied to 0 the gate copies A onto both outputs (the reversible way to
// fan a signal out); with B tied to 1, Q is the inverse of A.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
