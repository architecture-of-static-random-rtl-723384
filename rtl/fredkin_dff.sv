// fredkin_dff: WIDTH-bit edge-triggered D flip-flop whose next state is
// chosen by a Fredkin gate.
//
// A Fredkin gate with the load enable as control, the new data d on its B
// input and the fed-back state q on its C input gives R = en ? d : q; that
// value is stored at the rising clock edge.  With en held at 1 it is a plain
// D flip-flop, the form shown in the design (data, clock, q).  Reset is
// asynchronous and active low and clears q to 0.
//
// Building the flip-flop from a Fredkin gate and an inverter follows the
// design.  The design's cell is a pair of clocked Fredkin latches; here the
// storage is an ordinary edge-triggered register, and the enable and reset
// inputs are this implementation's additions.
//
// Timing: q takes d one clock after a rising edge that sees en = 1.
module fredkin_dff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] nxt, g_q;
  logic             g_p;

  fredkin_gate #(.WIDTH(WIDTH)) u_sel (
    .a(en), .b(d), .c(q), .p(g_p), .q(g_q), .r(nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= nxt;
  end

endmodule
