// rlogic_pkg: sizes and types shared by the reversible-logic FIR filter and
// the reversible SRAM array.
//
// The FIR filter has four taps, 12-bit samples and 4-bit coefficients, so each
// tap product is 16 bits wide; these numbers, and the 16 x 8 organisation of
// the SRAM array, are the design's published sizes.  The 18-bit filter output
// (16-bit product plus two growth bits for four taps) and the shift-direction
// encoding are choices of this implementation.
package rlogic_pkg;

  // FIR filter
  localparam int unsigned FIR_TAPS   = 4;
  localparam int unsigned FIR_DATA_W = 12;
  localparam int unsigned FIR_COEF_W = 4;
  localparam int unsigned FIR_PROD_W = FIR_DATA_W + FIR_COEF_W;      // 16
  localparam int unsigned FIR_OUT_W  = FIR_PROD_W + $clog2(FIR_TAPS); // 18

  // SRAM array
  localparam int unsigned SRAM_WORDS  = 16;
  localparam int unsigned SRAM_BITS   = 8;
  localparam int unsigned SRAM_ADDR_W = $clog2(SRAM_WORDS);

  // Direction of the general-purpose shifter.
  typedef enum logic {
    SHIFT_LEFT  = 1'b0,   // towards the MSB (multiply by 2**amt)
    SHIFT_RIGHT = 1'b1    // towards the LSB, zero filled
  } shift_dir_e;

endpackage
