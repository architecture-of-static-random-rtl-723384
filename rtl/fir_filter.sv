// fir_filter: four-tap direct-form FIR filter built from reversible-logic
// blocks,
//
//   y[n] = c0*x[n] + c1*x[n-1] + c2*x[n-2] + c3*x[n-3]      (all unsigned)
//
// Structure
//   * delay line: TAPS fredkin_dff registers.  On a clock edge with in_valid
//     high, x_in enters tap 0 and every tap moves one place down the line.
//     With in_valid low the line holds (a stall).
//   * one fredkin_multiplier per tap (DATA_W x COEF_W -> PROD_W bits).
//   * a chain of fredkin_adder ripple adders sums the products into OUT_W
//     bits; OUT_W = PROD_W + log2(TAPS), so the sum never overflows.
//   * an output fredkin_dff register.
//
// Interface: coef[k] is the coefficient of tap k; it is read combinationally
// and should be held steady while samples flow.  Reset (asynchronous, active
// low) clears the delay line, so the first outputs see zeros for samples
// before the first one.
//
// Timing: a sample accepted on clock edge E (in_valid = 1) produces its
// output on edge E+1: y_out and out_valid change one cycle after the sample
// enters the line, i.e. they are valid two cycles after x_in is presented.
// out_valid is a one-cycle pulse per accepted sample; one sample per cycle.
//
// Four coefficients, 12-bit samples, 4-bit coefficients, and the use of
// Fredkin multipliers, Fredkin D flip-flops and Fredkin adders follow the
// design.  Unsigned arithmetic, the valid handshake, coefficients as an input
// port and the output register are this implementation's choices.
module fir_filter
  import rlogic_pkg::*;
#(
  parameter int unsigned TAPS   = FIR_TAPS,
  parameter int unsigned DATA_W = FIR_DATA_W,
  parameter int unsigned COEF_W = FIR_COEF_W,
  parameter int unsigned OUT_W  = DATA_W + COEF_W + $clog2(TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x_in,
  input  logic [COEF_W-1:0] coef [TAPS],
  output logic              out_valid,
  output logic [OUT_W-1:0]  y_out
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic [DATA_W-1:0] tap  [TAPS];
  logic [PROD_W-1:0] prod [TAPS];
  logic [OUT_W-1:0]  acc  [TAPS];
  logic              valid_q;

  // ---- delay line ---------------------------------------------------------
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic [DATA_W-1:0] tap_d;
    if (k == 0) begin : g_first
      assign tap_d = x_in;
    end else begin : g_rest
      assign tap_d = tap[k-1];
    end
    fredkin_dff #(.WIDTH(DATA_W)) u_reg (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .d(tap_d), .q(tap[k])
    );
    fredkin_multiplier #(.A_W(DATA_W), .B_W(COEF_W), .P_W(PROD_W)) u_mul (
      .a(tap[k]), .b(coef[k]), .p(prod[k])
    );
  end

  // ---- adder chain --------------------------------------------------------
  assign acc[0] = OUT_W'(prod[0]);

  for (genvar k = 1; k < TAPS; k++) begin : g_sum
    logic [OUT_W:0] s;
    logic           co_unused;
    fredkin_adder #(.A_W(PROD_W), .B_W(OUT_W), .S_W(OUT_W + 1)) u_add (
      .a(prod[k]), .b(acc[k-1]), .s(s), .cout(co_unused)
    );
    assign acc[k] = s[OUT_W-1:0];
  end

  // ---- output register ----------------------------------------------------
  fredkin_dff #(.WIDTH(1)) u_vld (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(in_valid), .q(valid_q)
  );
  fredkin_dff #(.WIDTH(OUT_W)) u_out (
    .clk(clk), .rst_n(rst_n), .en(valid_q), .d(acc[TAPS-1]), .q(y_out)
  );
  fredkin_dff #(.WIDTH(1)) u_ovld (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .d(valid_q), .q(out_valid)
  );

endmodule
