// Quantization network of the third-order section: negation, segment detection and the
// level ROMs L0..L7.
//
// The rounded accumulator sum is turned into the nearest quantization level of the
// segmented companding law in three clocked steps:
//   1. negation: the integer part of a negative sum is negated in two's complement,
//      giving sign and magnitude. A magnitude above 2047 (the sum lies outside the
//      range of the 11-bit level scale) is clipped to 2047, which selects the top level.
//   2. segment detection: the position of the leading one gives the segment L (L = 0 for
//      magnitudes below 16) and the four bits after it are the characteristic sequence q;
//      in fine mode segments 5..7 take a fifth bit (ext).
//   3. level read: the detected segment enables its level ROM, the others drive zero,
//      and the ORed result is the 13-bit level.
// fine = 1 selects the first-stage assignment (32 quanta in segments 5..7), fine = 0 the
// standard one. The document gives these steps and the ROM split, and its simulation maps
// every sum at or beyond full scale to the top level; doing that by clipping here, and
// the pipeline registers between the steps, are this design's choices.
//
// Interface: `start` with `acc` and `fine` launches one quantization; three cycles later
// `valid` is high for one cycle with the sample code, the 13-bit level
// {sign, twice the magnitude} and `clip` if step 1 clipped.
module quantizer
  import pcm_filter_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    fine,
  input  logic signed [ACC_W-1:0] acc,
  output logic                    valid,
  output scode_t                  code,
  output logic [LIN_W-1:0]        level,
  output logic                    clip
);

  // ---- step 1: sign and magnitude of the rounded sum
  logic signed [ACC_W-ACC_FRAC:0] int_part;   // one bit wider, so negation cannot overflow
  logic signed [ACC_W-ACC_FRAC:0] mag_full;
  logic                           too_big;
  logic                           a_valid, a_sign, a_fine, a_clip;
  logic [INT_W-1:0]               a_mag;

  always_comb begin
    int_part = (ACC_W-ACC_FRAC+1)'(acc >>> ACC_FRAC);
    mag_full = acc[ACC_W-1] ? -int_part : int_part;
    too_big  = |mag_full[ACC_W-ACC_FRAC:INT_W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_sign  <= 1'b0;
      a_fine  <= 1'b0;
      a_clip  <= 1'b0;
      a_mag   <= '0;
    end else begin
      a_valid <= start;
      if (start) begin
        a_sign <= acc[ACC_W-1];
        a_fine <= fine;
        a_clip <= too_big;
        a_mag  <= too_big ? {INT_W{1'b1}} : mag_full[INT_W-1:0];
      end
    end
  end

  // ---- step 2: leading-one (segment) detection and characteristic sequence
  logic       b_valid, b_sign, b_fine, b_clip;
  logic [2:0] b_seg, seg_d;
  logic [3:0] b_step, step_d;
  logic       b_ext, ext_d;

  always_comb begin
    seg_d  = '0;
    step_d = a_mag[3:0];
    ext_d  = 1'b0;
    for (int p = 4; p < INT_W; p++) begin
      if (a_mag[p]) begin
        seg_d  = 3'(p - 3);
        step_d = a_mag[p-1 -: 4];
        ext_d  = (a_fine && p >= 8) ? a_mag[p-5] : 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_sign  <= 1'b0;
      b_fine  <= 1'b0;
      b_clip  <= 1'b0;
      b_seg   <= '0;
      b_step  <= '0;
      b_ext   <= 1'b0;
    end else begin
      b_valid <= a_valid;
      if (a_valid) begin
        b_sign <= a_sign;
        b_fine <= a_fine;
        b_clip <= a_clip;
        b_seg  <= seg_d;
        b_step <= step_d;
        b_ext  <= ext_d;
      end
    end
  end

  // ---- step 3: level ROMs L0..L7, one enabled, outputs ORed
  logic [MAG_W-1:0] rom_out [8];
  logic [MAG_W-1:0] level_or;

  for (genvar s = 0; s < 8; s++) begin : g_lrom
    level_rom #(.SEG(s)) u_lrom (
      .en   (b_seg == 3'(s)),
      .fine (b_fine),
      .step (b_step),
      .ext  (b_ext),
      .level(rom_out[s])
    );
  end

  always_comb begin
    level_or = '0;
    for (int s = 0; s < 8; s++) level_or |= rom_out[s];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      code  <= '0;
      level <= '0;
      clip  <= 1'b0;
    end else begin
      valid <= b_valid;
      if (b_valid) begin
        code  <= '{sign: b_sign, seg: b_seg, step: b_step, ext: b_ext};
        level <= {b_sign, level_or};
        clip  <= b_clip;
      end
    end
  end

endmodule
