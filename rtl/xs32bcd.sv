// Reversible excess-3 to BCD code converter.
//
// The inverse of the BCD to excess-3 converter: it subtracts 3 from an
// excess-3 code (3..12) to give the BCD digit 0..9. With the code on
// A (MSB), B, C, D (LSB) the output bits are
//   W = A(B + CD)   X = B ^ ~(CD)   Y = C ^ D   Z = ~D
// built from URG gates (P = C^AB, Q = B, R = C^(A+B)) and Feynman gates
// (P = A, Q = A^B). Gate by gate:
//   u_and   URG(C, D, 0)         P = CD; Q = D and R = C+D are garbage
//   u_split FG(CD, 1)            P = CD, Q = ~(CD)
//   u_or    URG(B, CD, 0)        R = B + CD
//   u_w     URG(A, B+CD, 0)      P = A(B+CD) = W
//   u_x     URG(B, 1, ~(CD))     P = B ^ ~(CD) = X
//   u_xy    URG(C, 1, D)         P = C ^ D
//   u_y     FG(C^D, 1)           P = C^D = Y, Q = ~(C^D) is garbage
//   u_z     FG(D, 1)             Q = ~D = Z
// That is 8 gates, 8 constant inputs and 12 garbage outputs.
//
// The gate network is the published one with one deliberate difference:
// the published drawing puts Y on the inverting output of u_y, which would
// give Y = ~(C^D) and map code 0011 to 0010 instead of 0000. Here Y is
// taken from the copy output of u_y, so every code 3..12 converts
// correctly; the gate, constant and garbage counts are unchanged. Codes
// 0-2 and 13-15 are not excess-3 digits and give whatever the network
// gives. garbage[k-1] is G<k> of the drawing.
//
// Interface: xs3 in (xs3[3] = A), bcd out (bcd[3] = W), garbage out.
// Purely combinational, no clock.
module xs32bcd
  import rev_pkg::*;
(
  input  nibble_t                    xs3,
  output nibble_t                    bcd,
  output logic [XS32BCD_GARBAGE-1:0] garbage
);
  logic a, b, c, d;
  logic c_and_d, cd_copy, cd_n;
  logic b_or_cd;
  logic c_xor_d;

  assign {a, b, c, d} = xs3;

  urg_gate u_and (
    .a(c), .b(d), .c(1'b0),
    .p(c_and_d), .q(garbage[4]), .r(garbage[5])
  );

  feynman_gate u_split (
    .a(c_and_d), .b(1'b1),
    .p(cd_copy), .q(cd_n)
  );

  urg_gate u_or (
    .a(b), .b(cd_copy), .c(1'b0),
    .p(garbage[2]), .q(garbage[3]), .r(b_or_cd)
  );

  urg_gate u_w (
    .a(a), .b(b_or_cd), .c(1'b0),
    .p(bcd[3]), .q(garbage[0]), .r(garbage[1])
  );

  urg_gate u_x (
    .a(b), .b(1'b1), .c(cd_n),
    .p(bcd[2]), .q(garbage[6]), .r(garbage[7])
  );

  urg_gate u_xy (
    .a(c), .b(1'b1), .c(d),
    .p(c_xor_d), .q(garbage[8]), .r(garbage[9])
  );

  feynman_gate u_y (
    .a(c_xor_d), .b(1'b1),
    .p(bcd[1]), .q(garbage[10])
  );

  feynman_gate u_z (
    .a(d), .b(1'b1),
    .p(garbage[11]), .q(bcd[0])
  );
endmodule
