// fredkin_full_adder: one-bit full adder built from three Fredkin gates and
// two inverters.
//
//   g0: A=a,  B=b,   C=~b   ->  Q = a'b + a~b       = a xor b   (= hp)
//   g1: A=hp, B=cin, C=~cin ->  Q = hp xor cin      = sum
//   g2: A=hp, B=a,   C=cin  ->  Q = hp' a + hp cin  = carry
//
// If a and b are equal the carry is a, otherwise it is the incoming carry,
// which is exactly the controlled selection a Fredkin gate makes.  That the
// adder consists of Fredkin gates and NOT gates follows the design; this
// particular three-gate arrangement is this implementation's.  Combinational.
module fredkin_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic b_n, cin_n;
  logic hp;
  logic g0_p, g0_r, g1_p, g1_r, g2_p, g2_r;   // garbage outputs

  always_comb begin
    b_n   = ~b;
    cin_n = ~cin;
  end

  fredkin_gate u_g0 (.a(a),  .b(b),   .c(b_n),   .p(g0_p), .q(hp),   .r(g0_r));
  fredkin_gate u_g1 (.a(hp), .b(cin), .c(cin_n), .p(g1_p), .q(s),    .r(g1_r));
  fredkin_gate u_g2 (.a(hp), .b(a),   .c(cin),   .p(g2_p), .q(cout), .r(g2_r));

endmodule
