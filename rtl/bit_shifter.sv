// bit_shifter: shifts an IN_W-bit word by 0..MAX_SHIFT places into an
// (IN_W+MAX_SHIFT)-bit result.
//
// The input is zero-extended to the output width and then moved amt places
// towards the MSB (dir = SHIFT_LEFT, i.e. multiplied by 2**amt, nothing lost)
// or towards the LSB (dir = SHIFT_RIGHT, zero filled, low bits dropped).
// Built as a log-depth barrel of 2:1 Fredkin selections, one stage per bit of
// amt.  Combinational.
//
// The default 12-bit input, shift of two places and 14-bit output follow the
// design; the variable amount and the direction input are this
// implementation's generalisation so the multiplier can use it for every
// partial-product weight.  An amt above MAX_SHIFT is clamped to MAX_SHIFT.
module bit_shifter
  import rlogic_pkg::*;
#(
  parameter int unsigned IN_W      = 12,
  parameter int unsigned MAX_SHIFT = 2,
  localparam int unsigned OUT_W    = IN_W + MAX_SHIFT,
  localparam int unsigned AMT_W    = (MAX_SHIFT < 2) ? 1 : $clog2(MAX_SHIFT + 1)
) (
  input  logic [IN_W-1:0]  d,
  input  logic [AMT_W-1:0] amt,
  input  shift_dir_e       dir,
  output logic [OUT_W-1:0] q
);

  logic [AMT_W-1:0] amt_c;
  logic [OUT_W-1:0] stage [AMT_W+1];
  logic [AMT_W-1:0] g_p;   // unused control copies

  always_comb begin
    amt_c    = (32'(amt) > MAX_SHIFT) ? AMT_W'(MAX_SHIFT) : amt;
    stage[0] = OUT_W'(d);
  end

  for (genvar k = 0; k < AMT_W; k++) begin : g_stage
    logic [OUT_W-1:0] moved, r_unused;
    always_comb begin
      if (dir == SHIFT_LEFT) moved = stage[k] << (1 << k);
      else                   moved = stage[k] >> (1 << k);
    end
    // Fredkin selection: amt bit clear keeps the word, set takes the moved one
    fredkin_gate #(.WIDTH(OUT_W)) u_sel (
      .a(amt_c[k]), .b(stage[k]), .c(moved),
      .p(g_p[k]), .q(stage[k+1]), .r(r_unused)
    );
  end

  assign q = stage[AMT_W];

endmodule
