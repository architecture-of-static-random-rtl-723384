// rsram_cell: one bit of the reversible SRAM.
//
// Gates, in signal order:
//   access  Fredkin  A=wl_in, B=bit_in, C=stored  -> P = wl_out (word line
//           passed on to the next cell of the row), R = wl_in ? bit_in : stored
//   latch   Fredkin  A=we, B=access.R, C=stored   -> R = next stored value
//   fan-out Feynman  A=stored, B=0                -> two copies of the bit
//   read    Fredkin  A=wl_in, B=0, C=re           -> Q = row read select
//   drive   Fredkin  A=copy, B=rd_sel, C=0        -> Q = bit-bar line, R = bit line
//
// So a clock edge with wl_in and we high stores bit_in; otherwise the cell
// keeps its value.  With wl_in and re high the cell drives bl = stored,
// blb = ~stored; otherwise it drives both lines low, so the column lines can
// be ORed over the rows.
//
// The access gate's behaviour (third output is the stored data when WL=0 and
// the bit line when WL=1), the Feynman + Fredkin latch, the bit / bit-bar
// outputs for a sense amplifier and the word line passed on from cell to
// cell follow the design.  The write- and read-enable gating, the OR-able
// read lines and the clocked (edge-triggered) storage are this
// implementation's choices.  The stored bit has no reset, as in an SRAM.
module rsram_cell (
  input  logic clk,
  input  logic wl_in,
  input  logic we,
  input  logic re,
  input  logic bit_in,
  output logic wl_out,
  output logic bl,
  output logic blb
);

  logic stored, sel, nxt, copy_a, copy_b, rd_sel;
  logic acc_q, lat_p, lat_q, rd_p, rd_r, drv_p;

  fredkin_gate u_access (.a(wl_in), .b(bit_in), .c(stored), .p(wl_out), .q(acc_q), .r(sel));
  fredkin_gate u_latch  (.a(we),    .b(sel),    .c(stored), .p(lat_p),  .q(lat_q), .r(nxt));
  feynman_gate u_fanout (.a(stored), .b(1'b0), .p(copy_a), .q(copy_b));
  fredkin_gate u_rdsel  (.a(wl_in), .b(1'b0),   .c(re),     .p(rd_p),   .q(rd_sel), .r(rd_r));
  fredkin_gate u_drive  (.a(copy_b), .b(rd_sel), .c(1'b0),  .p(drv_p),  .q(blb),   .r(bl));

  always_ff @(posedge clk) stored <= nxt;

endmodule
