// Stored-product multiplier: one ROM block that replaces a coefficient multiplier.
//
// The ROM holds, for every sample magnitude the filter can carry, the product of a fixed
// coefficient COEF and the quantization level of that sample, rounded to the nearest
// 2^-FRAC and stored as a 13-bit two's complement word. Because a sample only ever takes
// one of a few hundred quantized values, the whole multiplication collapses into one
// table read, addressed directly by the sample code with no code conversion.
//
// Address: {fine, L, q, ext}. fine = 1 selects the finer level assignment used for the
// output of the first stage (32 quanta in segments 5..7); with fine = 0 the ext bit is
// ignored and the 8-bit code's standard levels apply. The sample's sign is not part of
// the address: the ROM holds COEF * |level| and the accumulator adds or subtracts it.
// That sign handling, the 512-word address map (of which 304 words are distinct) and the
// exact-rounding rule are this design's choices; the document fixes the coefficient, the
// 13-bit word and the per-block binary point.
//
// Timing: synchronous read, the product of the address presented at one clock edge is on
// `prod` after that edge.
module product_rom
  import pcm_filter_pkg::*;
#(
  parameter real COEF = 0.2726230,
  parameter int  FRAC = 1
) (
  input  logic                     clk,
  input  logic                     fine,
  input  scode_t                   code,
  output logic signed [PROD_W-1:0] prod
);

  localparam int DEPTH = 1 << ROM_AW;

  logic signed [PROD_W-1:0] rom [DEPTH];
  logic [ROM_AW-1:0]        addr;

  for (genvar a = 0; a < DEPTH; a++) begin : g_word
    assign rom[a] = PROD_W'(product_word(COEF, rom_addr_level_x2(a), FRAC));
  end

  assign addr = {fine, code.seg, code.step, code.ext & fine};

  always_ff @(posedge clk) prod <= rom[addr];

endmodule
