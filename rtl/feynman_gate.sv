// feynman_gate: 2-input, 2-output reversible controlled-NOT gate.
//
//   P = A
//   Q = A xor B
//
// With B tied to 0 the gate copies A onto both outputs, which is how the
// reversible SRAM cell fans its stored bit out without an irreversible
// branch.  Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
