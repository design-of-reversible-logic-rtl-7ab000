// Reversible code converters and reversible gate library, side by side.
//
// Reversible logic keeps a one-to-one mapping between input and output
// vectors, so no information is erased inside a gate. Signals that are not
// part of the result leave as garbage outputs, and constant 0/1 inputs feed
// gates where a plain function (copy, AND, OR, NOT) is wanted. This top
// holds four independent code converters built only from Feynman (FG) and
// universal reversible (URG) gates:
//   bin2gray  binary to Gray        3 FG
//   gray2bin  Gray to binary        5 FG
//   bcd2xs3   BCD to excess-3       5 URG + 3 FG
//   xs32bcd   excess-3 to BCD       5 URG + 3 FG
// and, on a shared 4-bit input, one instance of each gate of the reversible
// gate library (Feynman, Toffoli, Fredkin, Peres, URG, HNG), so that each
// gate can be exercised from the pins.
//
// The converters are not connected to one another; each has its own ports,
// and every garbage output is brought out. Bit 3 of a 4-bit port is the
// most significant bit. Note the letter order of the Gray to binary
// converter: its MSB is input D (see gray2bin).
//
// gate_in = {A, B, C, D}; fg_out = {P, Q}; tg_out, frg_out, pg_out,
// urg_out = {P, Q, R}; hng_out = {P, Q, R, S}. The two-input Feynman gate
// uses A and B; the three-input gates use A, B, C.
//
// Purely combinational, no clock or reset.
module rev_code_converters_top
  import rev_pkg::*;
#(
  parameter int unsigned GRAY_WIDTH = 4
) (
  input  logic [GRAY_WIDTH-1:0]      b2g_bin,
  output logic [GRAY_WIDTH-1:0]      b2g_gray,
  output logic [GRAY_WIDTH-2:0]      b2g_garbage,

  input  logic [GRAY_WIDTH-1:0]      g2b_gray,
  output logic [GRAY_WIDTH-1:0]      g2b_bin,
  output logic [GRAY_WIDTH-2:0]      g2b_garbage,

  input  nibble_t                    bcd_in,
  output nibble_t                    xs3_out,
  output logic [BCD2XS3_GARBAGE-1:0] bcd2xs3_garbage,

  input  nibble_t                    xs3_in,
  output nibble_t                    bcd_out,
  output logic [XS32BCD_GARBAGE-1:0] xs32bcd_garbage,

  input  logic [3:0]                 gate_in,
  output logic [1:0]                 fg_out,
  output logic [2:0]                 tg_out,
  output logic [2:0]                 frg_out,
  output logic [2:0]                 pg_out,
  output logic [2:0]                 urg_out,
  output logic [3:0]                 hng_out
);
  // ---------------------------------------------------------------- converters
  bin2gray #(.WIDTH(GRAY_WIDTH)) u_bin2gray (
    .bin(b2g_bin), .gray(b2g_gray), .garbage(b2g_garbage)
  );

  gray2bin #(.WIDTH(GRAY_WIDTH)) u_gray2bin (
    .gray(g2b_gray), .bin(g2b_bin), .garbage(g2b_garbage)
  );

  bcd2xs3 u_bcd2xs3 (
    .bcd(bcd_in), .xs3(xs3_out), .garbage(bcd2xs3_garbage)
  );

  xs32bcd u_xs32bcd (
    .xs3(xs3_in), .bcd(bcd_out), .garbage(xs32bcd_garbage)
  );

  // -------------------------------------------------------------- gate library
  feynman_gate u_fg (
    .a(gate_in[3]), .b(gate_in[2]),
    .p(fg_out[1]), .q(fg_out[0])
  );

  toffoli_gate u_tg (
    .a(gate_in[3]), .b(gate_in[2]), .c(gate_in[1]),
    .p(tg_out[2]), .q(tg_out[1]), .r(tg_out[0])
  );

  fredkin_gate u_frg (
    .a(gate_in[3]), .b(gate_in[2]), .c(gate_in[1]),
    .p(frg_out[2]), .q(frg_out[1]), .r(frg_out[0])
  );

  peres_gate u_pg (
    .a(gate_in[3]), .b(gate_in[2]), .c(gate_in[1]),
    .p(pg_out[2]), .q(pg_out[1]), .r(pg_out[0])
  );

  urg_gate u_urg (
    .a(gate_in[3]), .b(gate_in[2]), .c(gate_in[1]),
    .p(urg_out[2]), .q(urg_out[1]), .r(urg_out[0])
  );

  hng_gate u_hng (
    .a(gate_in[3]), .b(gate_in[2]), .c(gate_in[1]), .d(gate_in[0]),
    .p(hng_out[3]), .q(hng_out[2]), .r(hng_out[1]), .s(hng_out[0])
  );
endmodule
