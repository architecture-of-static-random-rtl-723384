// fredkin_and_array: partial-product generator, p = a AND b, for a W-bit
// word a and a single bit b.
//
// Each bit is one Fredkin gate with the multiplier bit b as control, 0 on the
// B input and a[i] on the C input: Q = b'.0 + b.a[i] = a[i] AND b.  The other
// two outputs are garbage.  Combinational.  The 12-bit word and 1-bit operand
// follow the design; the gate assignment is this implementation's.
module fredkin_and_array #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic         b,
  output logic [W-1:0] p
);

  logic [W-1:0] g_p, g_r;   // garbage outputs

  for (genvar i = 0; i < W; i++) begin : g_bit
    fredkin_gate u_and (
      .a(b), .b(1'b0), .c(a[i]),
      .p(g_p[i]), .q(p[i]), .r(g_r[i])
    );
  end

endmodule
