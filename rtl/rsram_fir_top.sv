// rsram_fir_top: the two reversible-logic designs side by side.
//
//   * rsram_array - a 16-word x 8-bit SRAM of reversible cells (Fredkin
//     access gate, Feynman + Fredkin latch, chained word line, 2-to-4 row
//     decoders, write circuit and column sense amplifiers).
//   * fir_filter  - a four-tap FIR filter of Fredkin multipliers, Fredkin
//     ripple adders and Fredkin D flip-flops.
//
// The two share only the clock and the reset; each has its own ports, with
// the timing described in its own module.  Pairing them in one top level is
// this implementation's packaging: the two designs do not exchange data.
module rsram_fir_top
  import rlogic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // SRAM port
  input  logic [SRAM_ADDR_W-1:0] mem_addr,
  input  logic                   mem_we,
  input  logic                   mem_re,
  input  logic [SRAM_BITS-1:0]   mem_din,
  output logic [SRAM_BITS-1:0]   mem_dout,
  output logic                   mem_dout_valid,
  // FIR filter port
  input  logic                   fir_in_valid,
  input  logic [FIR_DATA_W-1:0]  fir_x,
  input  logic [FIR_COEF_W-1:0]  fir_coef [FIR_TAPS],
  output logic                   fir_out_valid,
  output logic [FIR_OUT_W-1:0]   fir_y
);

  rsram_array u_sram (
    .clk       (clk),
    .rst_n     (rst_n),
    .addr      (mem_addr),
    .we        (mem_we),
    .re        (mem_re),
    .din       (mem_din),
    .dout      (mem_dout),
    .dout_valid(mem_dout_valid)
  );

  fir_filter u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .coef     (fir_coef),
    .out_valid(fir_out_valid),
    .y_out    (fir_y)
  );

endmodule
