// Reversible BCD to excess-3 code converter.
//
// Excess-3 represents a decimal digit n as the 4-bit binary value n+3. With
// the BCD digit on A (MSB), B, C, D (LSB) the output bits are
//   W = A + B(C+D)   X = B ^ (C+D)   Y = ~(C ^ D)   Z = ~D
// The network uses two reversible gates: the URG (P = C^AB, Q = B,
// R = C^(A+B)) and the Feynman gate (P = A, Q = A^B). Gate by gate:
//   u_or    URG(C, D, 0)        R = C+D; P = CD and Q = D are garbage
//   u_copy  FG(C+D, 0)          two copies of C+D (no fan-out)
//   u_and   URG(B, C+D, 0)      P = B(C+D)
//   u_w     URG(A, 1, B(C+D))   P = A ^ B(C+D) = W
//   u_x     URG(B, 1, C+D)      P = B ^ (C+D) = X
//   u_xy    URG(C, 1, D)        P = C ^ D
//   u_y     FG(C^D, 1)          Q = ~(C^D) = Y
//   u_z     FG(D, 1)            Q = ~D = Z
// W uses xor in place of or: for digits 0-9, A=1 forces B=0, so the two
// terms never are 1 together. That is 8 gates, 8 constant inputs and 12
// garbage outputs. Inputs 10-15 are not BCD; they give whatever the network
// gives (not a defined excess-3 code).
//
// The gate network is the published one; the exact pin each signal drives
// and the order of the garbage bits are this design's reading of it.
// garbage[k-1] is G<k> of the drawing for k = 1..11; garbage[11] is the
// unused R output of u_w.
//
// Interface: bcd in (bcd[3] = A), xs3 out (xs3[3] = W), garbage out.
// Purely combinational, no clock.
module bcd2xs3
  import rev_pkg::*;
(
  input  nibble_t                    bcd,
  output nibble_t                    xs3,
  output logic [BCD2XS3_GARBAGE-1:0] garbage
);
  logic a, b, c, d;
  logic c_or_d, c_or_d_0, c_or_d_1;
  logic b_and_cd;
  logic c_xor_d;

  assign {a, b, c, d} = bcd;

  urg_gate u_or (
    .a(c), .b(d), .c(1'b0),
    .p(garbage[5]), .q(garbage[6]), .r(c_or_d)
  );

  feynman_gate u_copy (
    .a(c_or_d), .b(1'b0),
    .p(c_or_d_0), .q(c_or_d_1)
  );

  urg_gate u_and (
    .a(b), .b(c_or_d_0), .c(1'b0),
    .p(b_and_cd), .q(garbage[1]), .r(garbage[2])
  );

  urg_gate u_w (
    .a(a), .b(1'b1), .c(b_and_cd),
    .p(xs3[3]), .q(garbage[0]), .r(garbage[11])
  );

  urg_gate u_x (
    .a(b), .b(1'b1), .c(c_or_d_1),
    .p(xs3[2]), .q(garbage[3]), .r(garbage[4])
  );

  urg_gate u_xy (
    .a(c), .b(1'b1), .c(d),
    .p(c_xor_d), .q(garbage[8]), .r(garbage[9])
  );

  feynman_gate u_y (
    .a(c_xor_d), .b(1'b1),
    .p(garbage[7]), .q(xs3[1])
  );

  feynman_gate u_z (
    .a(d), .b(1'b1),
    .p(garbage[10]), .q(xs3[0])
  );
endmodule
