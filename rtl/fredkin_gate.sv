// fredkin_gate: 3-input, 3-output reversible controlled-swap gate.
//
//   P = A
//   Q = A'B + AC
//   R = A'C + AB
//
// When the control A is 0 the two data inputs pass straight through (Q=B,
// R=C); when A is 1 they are exchanged (Q=C, R=B).  The gate is written in the
// AND / OR / NOT form it is usually drawn in.  It is purely combinational.
//
// The gate itself is the standard Fredkin gate.  The WIDTH parameter is this
// implementation's convenience: WIDTH > 1 gives a bank of WIDTH gates that
// share one control bit, which is how the wider datapaths use it.
module fredkin_gate #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             a,   // control
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic             p,   // control passed on
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] r
);

  logic [WIDTH-1:0] a_v;

  always_comb begin
    a_v = {WIDTH{a}};
    p   = a;
    q   = (~a_v & b) | (a_v & c);
    r   = (~a_v & c) | (a_v & b);
  end

endmodule
