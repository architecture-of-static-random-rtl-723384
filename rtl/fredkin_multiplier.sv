// fredkin_multiplier: unsigned A_W x B_W shift-and-add multiplier
// (12 x 4 -> 16 bits by default).
//
// For every multiplier bit b[i] a fredkin_and_array forms the partial product
// a AND b[i]; a bit_shifter moves it i places towards the MSB; a chain of
// fredkin_adder ripple adders accumulates the shifted partial products:
//
//   acc0 = pp0
//   acc_i = acc_{i-1} + (pp_i << i)        i = 1 .. B_W-1
//   p = acc_{B_W-1}
//
// With the default sizes each adder adds a 15-bit shifted partial product to
// a 16-bit accumulator into a 17-bit sum (17 Fredkin full adders); the top
// bit is always 0 because the product fits 16 bits.  The 12-bit and 4-bit
// inputs, 16-bit product and the use of arrays, shifters and Fredkin adders
// follow the design; the accumulation order is this implementation's.
// Combinational.
module fredkin_multiplier
  import rlogic_pkg::*;
#(
  parameter int unsigned A_W = 12,
  parameter int unsigned B_W = 4,
  parameter int unsigned P_W = A_W + B_W
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [P_W-1:0] p
);

  localparam int unsigned SH_W = A_W + B_W - 1;   // widest shifted partial product
  localparam int unsigned MAXS = (B_W > 1) ? B_W - 1 : 1;
  localparam int unsigned AMT_W = (MAXS < 2) ? 1 : $clog2(MAXS + 1);

  logic [A_W-1:0]  pp  [B_W];
  logic [A_W+MAXS-1:0] pps [B_W];
  logic [P_W-1:0]  acc [B_W];

  for (genvar i = 0; i < B_W; i++) begin : g_pp
    fredkin_and_array #(.W(A_W)) u_arr (.a(a), .b(b[i]), .p(pp[i]));
    bit_shifter #(.IN_W(A_W), .MAX_SHIFT(MAXS)) u_sh (
      .d(pp[i]), .amt(AMT_W'(i)), .dir(SHIFT_LEFT), .q(pps[i])
    );
  end

  assign acc[0] = P_W'(pps[0]);

  for (genvar i = 1; i < B_W; i++) begin : g_acc
    logic [P_W:0] sum;
    logic         co_unused;
    fredkin_adder #(.A_W(SH_W), .B_W(P_W), .S_W(P_W + 1)) u_add (
      .a(SH_W'(pps[i])), .b(acc[i-1]), .s(sum), .cout(co_unused)
    );
    assign acc[i] = sum[P_W-1:0];
  end

  assign p = acc[B_W-1];

endmodule
