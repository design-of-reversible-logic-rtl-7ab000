// Reversible Gray to binary code converter.
//
// Binary bit i is the xor of all Gray bits from the MSB down to bit i, so
// the result is a running xor that ripples from the MSB towards the LSB.
// Each step is a Feynman gate whose control is the running xor so far and
// whose target is the next Gray bit; its target output is the new running
// xor and its control output is garbage. A reversible circuit may not fan a
// signal out, so wherever the running xor is needed both as an output bit
// and as the control of the next step, a Feynman gate with its target tied
// to 0 makes a copy. A WIDTH-bit converter takes WIDTH-1 xor gates and
// WIDTH-2 copy gates (5 gates, 2 constant inputs and 3 garbage outputs for
// the 4-bit circuit).
//
// Bit order follows the 4-bit circuit drawn with inputs A..D and outputs
// W..Z, in which D is the MSB: gray[3] = D, gray[0] = A, bin[3] = Z = D,
// bin[2] = Y = C^D, bin[1] = X = B^C^D, bin[0] = W = A^B^C^D. Note that this
// is the opposite letter order from the binary to Gray converter.
// garbage[i] is the control output of the xor gate that produces bin[i]
// (G1 next to W). The gate structure is the published one; which gate input
// is the control, and the WIDTH generalisation, are this design's.
//
// Interface: gray in, bin and garbage out. Purely combinational, no clock.
module gray2bin #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] gray,
  output logic [WIDTH-1:0] bin,
  output logic [WIDTH-2:0] garbage
);
  if (WIDTH < 2) begin : g_width_check
    $error("gray2bin: WIDTH must be at least 2");
  end

  // run[i]: running xor of gray[WIDTH-1:i] as it leaves the xor gate.
  // ctl[i]: the copy of run[i] that controls the next xor gate (none for i=0).
  logic [WIDTH-2:0] run;
  logic [WIDTH-1:1] ctl;

  assign ctl[WIDTH-1] = gray[WIDTH-1];
  assign bin[WIDTH-1] = gray[WIDTH-1];

  for (genvar i = WIDTH - 2; i >= 0; i--) begin : g_stage
    feynman_gate u_xor (
      .a(ctl[i+1]),
      .b(gray[i]),
      .p(garbage[i]),
      .q(run[i])
    );
    if (i > 0) begin : g_copy
      // Copy gate: target tied to 0, both outputs equal run[i].
      feynman_gate u_copy (
        .a(run[i]),
        .b(1'b0),
        .p(ctl[i]),
        .q(bin[i])
      );
    end else begin : g_last
      assign bin[i] = run[i];
    end
  end
endmodule
