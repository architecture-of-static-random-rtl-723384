// row_decoder: 4-to-16 word-line decoder for the 16-row SRAM array.
//
// Four decoder_2to4 row decoders, one per group of four rows, decode the low
// address bits; their enable inputs come from a fifth decoder_2to4 that
// decodes the two high address bits under the global enable.  Exactly one
// word line is high when en is high, none when it is low.  Combinational.
//
// The use of four enabled 2-to-4 decoders follows the design; the fifth
// decoder that produces their enables is this implementation's.
module row_decoder (
  input  logic        en,
  input  logic [3:0]  addr,
  output logic [15:0] wl
);

  logic [3:0] grp_en;

  decoder_2to4 u_pre (.en(en), .a(addr[3:2]), .y(grp_en));

  for (genvar g = 0; g < 4; g++) begin : g_grp
    decoder_2to4 u_dec (.en(grp_en[g]), .a(addr[1:0]), .y(wl[4*g +: 4]));
  end

endmodule
