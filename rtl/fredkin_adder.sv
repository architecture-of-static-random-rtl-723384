// fredkin_adder: unsigned ripple-carry adder made of S_W Fredkin full adders.
//
// Both operands are zero-extended to S_W bits and added by a chain of S_W
// fredkin_full_adder cells, carry in of the first cell tied to 0.  With the
// default sizes a 15-bit and a 16-bit operand give a 17-bit sum using 17 full
// adders, the sizes the design gives for its adder; the sum cannot overflow
// 17 bits, so cout is then always 0.  cout is exposed for other sizes.
// Combinational; the delay is S_W full-adder carry stages.
module fredkin_adder #(
  parameter int unsigned A_W = 15,
  parameter int unsigned B_W = 16,
  parameter int unsigned S_W = 17
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [S_W-1:0] s,
  output logic           cout
);

  logic [S_W-1:0] a_x, b_x;
  logic [S_W:0]   carry;

  always_comb begin
    a_x = S_W'(a);
    b_x = S_W'(b);
  end

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < S_W; i++) begin : g_fa
    fredkin_full_adder u_fa (
      .a   (a_x[i]),
      .b   (b_x[i]),
      .cin (carry[i]),
      .s   (s[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[S_W];

endmodule
