// sense_amp: column sense amplifier of the reversible SRAM, digital form.
//
// On a rising clock edge with sae (sense enable) high it resolves the
// differential bit / bit-bar pair: bl=1, blb=0 latches a 1 and bl=0, blb=1
// latches a 0.  If the pair is not differential (both low: no cell driving)
// the previous output is kept.  Outside sensing the output holds.  Reset is
// asynchronous, active low, and clears dout.
//
// That the bit and bit-bar lines of a cell feed a sense amplifier which
// produces the read data follows the design.  The real circuit is an analog
// differential amplifier; this is its logic-level equivalent, and the
// clocked latching of the result is this implementation's choice.
//
// Timing: dout is valid one clock after the sensing edge.
module sense_amp (
  input  logic clk,
  input  logic rst_n,
  input  logic sae,
  input  logic bl,
  input  logic blb,
  output logic dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dout <= 1'b0;
    else if (sae && (bl ^ blb)) dout <= bl;
  end

  // While sensing, one and only one cell must drive the column.
  a_differential : assert property (@(posedge clk) disable iff (!rst_n) sae |-> (bl ^ blb))
    else $error("sense_amp: bit lines not differential while sensing (bl=%0b blb=%0b)", bl, blb);

endmodule
