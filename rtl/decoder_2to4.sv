// decoder_2to4: 2-to-4 line decoder with enable.
//
// y[i] = en AND (a == i).  With en low every output is 0.  Combinational.
// It is the building block of the SRAM row decoder; its gate-level form is
// this implementation's, as the design only names it.
module decoder_2to4 (
  input  logic       en,
  input  logic [1:0] a,
  output logic [3:0] y
);

  always_comb begin
    y[0] = en & ~a[1] & ~a[0];
    y[1] = en & ~a[1] &  a[0];
    y[2] = en &  a[1] & ~a[0];
    y[3] = en &  a[1] &  a[0];
  end

endmodule
