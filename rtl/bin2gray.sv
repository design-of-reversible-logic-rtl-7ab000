// Reversible binary to Gray code converter.
//
// A Gray code changes in exactly one bit between neighbouring values, which
// cuts switching activity on a counter or bus. Gray bit i is binary bit i
// xor binary bit i+1, and the most significant bit is unchanged. Here every
// xor is a Feynman gate whose control is the more significant binary bit and
// whose target is the bit itself: the target output is the Gray bit and the
// control output, a copy of the control, is garbage. A WIDTH-bit converter
// takes WIDTH-1 gates, no constant inputs and has WIDTH-1 garbage outputs
// (3, 0 and 3 for the 4-bit circuit).
//
// Bit order follows the 4-bit circuit drawn with inputs A..D and outputs
// W..Z: bin[3] = A is the MSB and passes to gray[3] = W; X = A^B, Y = B^C,
// Z = C^D. garbage[0] (G1) comes from the gate next to the MSB. The gate
// structure is the published one; the WIDTH generalisation and the choice of
// the upper line as each gate's control are this design's.
//
// Interface: bin in, gray and garbage out. Purely combinational, no clock.
module bin2gray #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] gray,
  output logic [WIDTH-2:0] garbage
);
  if (WIDTH < 2) begin : g_width_check
    $error("bin2gray: WIDTH must be at least 2");
  end

  // The MSB needs no gate.
  assign gray[WIDTH-1] = bin[WIDTH-1];

  for (genvar i = 0; i < WIDTH - 1; i++) begin : g_fg
    // Gate G(k+1) with k = WIDTH-2-i: control bin[i+1], target bin[i].
    feynman_gate u_fg (
      .a(bin[i+1]),
      .b(bin[i]),
      .p(garbage[WIDTH-2-i]),
      .q(gray[i])
    );
  end
endmodule
