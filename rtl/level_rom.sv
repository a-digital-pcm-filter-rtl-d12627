// Quantization level ROM of one companding segment (one of the ROMs L0..L7).
//
// Given the characteristic sequence of a number inside segment SEG (the four bits that
// follow its leading one, plus a fifth bit in the fine assignment), the ROM returns the
// level of that quantum: the mid value of the integers it holds. Values are the magnitude
// field of a 13-bit linear level, i.e. twice the level (one fraction bit).
//   L = 0 : q             L = 1 : q + 16
//   L >= 2: 2^(L-1) * (q + 16.5) - 0.5                        (standard assignment)
//   L >= 5, fine: 2^(L-2) * (q5 + 32.5) - 0.5, q5 = {q, ext}  (32 quanta per segment)
// The fine input models the document's extra address input of L5..L7, gated by an AND
// gate that is enabled only during the first-stage pass; in segments below 5 it has no
// effect.
//
// Only the segment whose leading-one detector fires enables its ROM; a disabled ROM
// drives zero so that the eight outputs can simply be ORed onto one bus.
// Timing: combinational; the quantizer registers the ORed result.
module level_rom
  import pcm_filter_pkg::*;
#(
  parameter int SEG = 7
) (
  input  logic             en,
  input  logic             fine,
  input  logic [3:0]       step,
  input  logic             ext,
  output logic [MAG_W-1:0] level
);

  logic [MAG_W-1:0] rom [64];  // address {fine, q, ext}

  for (genvar a = 0; a < 64; a++) begin : g_word
    assign rom[a] = MAG_W'(level_x2(SEG, (a >> 1) & 15, a & 1, a >= 32));
  end

  always_comb begin
    level = '0;
    if (en) level = rom[{fine, step, ext & fine}];
  end

endmodule
