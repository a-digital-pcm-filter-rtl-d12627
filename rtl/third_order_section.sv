// Datapath of one direct-form third-order section with stored products.
//
//   y(n) = Q( A0 x(n) + A1 x(n-1) + A2 x(n-2) + A3 x(n-3) - B1 y(n-1) - B2 y(n-2) - B3 y(n-3) )
//
// R1..R4 hold x(n)..x(n-3) and R6..R8 hold y(n-1)..y(n-3), all as sample codes. Seven
// product ROMs (A0..A3, B1..B3), all read in parallel, turn each code into its product
// with the coefficient; the recursive ROMs store -Bk so that every product is added.
// The gating G1 passes one product per cycle, shifted so that its binary point lines up
// with the accumulator's, and the sample's sign bit selects add or subtract (the ROMs
// hold products of magnitudes). The accumulator, preset to +0.5, rounds the sum; the
// quantizer maps it to a level and a code.
//
// The same section serves as first stage (stage2 = 0) and second stage (stage2 = 1) of
// the sixth-order filter. In stage 1 the section's input samples carry standard codes,
// its outputs the fine (32 quanta in segments 5..7) assignment; in stage 2 the inputs are
// the fine codes of stage 1 and the outputs standard codes. The `fine` address bit of
// each ROM and of the quantizer follows from that.
//
// Interface and timing (driven by section_controller): `load` copies x_in into R1 and
// st_in into R2..R4, R6..R8; ROM outputs are valid from the second cycle after; each
// `acc_en` cycle adds product `tap_sel`; `q_start` launches the quantizer, whose result
// (`q_valid`, y_code, y_level) arrives three cycles later together with st_out, the
// advanced state to store for the next sample of this channel and stage.
// The coefficients, ROM word length, binary points and gating follow the document;
// holding codes rather than linear values in R1..R8 is this design's choice.
module third_order_section
  import pcm_filter_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stage2,
  input  logic             load,
  input  scode_t           x_in,
  input  sec_state_t       st_in,
  input  logic             acc_preset,
  input  logic             acc_en,
  input  logic [2:0]       tap_sel,
  input  logic             q_start,
  output logic             q_valid,
  output scode_t           y_code,
  output logic [LIN_W-1:0] y_level,
  output sec_state_t       st_out,
  output logic             acc_ovf,
  output logic             q_clip
);

  // ---- unit-delay registers
  scode_t r1, r2, r3, r4, r6, r7, r8;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {r1, r2, r3, r4, r6, r7, r8} <= '0;
    end else if (load) begin
      r1 <= x_in;
      r2 <= st_in.x1;
      r3 <= st_in.x2;
      r4 <= st_in.x3;
      r6 <= st_in.y1;
      r7 <= st_in.y2;
      r8 <= st_in.y3;
    end
  end

  // ---- product ROMs
  logic signed [PROD_W-1:0] prod [N_TAPS];
  scode_t                   tap_code [N_TAPS];
  localparam real           TAP_COEF [N_TAPS] = '{COEF_A0, COEF_A1, COEF_A2, COEF_A3,
                                                  -COEF_B1, -COEF_B2, -COEF_B3};
  localparam int            TAP_FRAC [N_TAPS] = '{FRAC_A0, FRAC_A1, FRAC_A2, FRAC_A3,
                                                  FRAC_B1, FRAC_B2, FRAC_B3};

  assign tap_code = '{r1, r2, r3, r4, r6, r7, r8};

  for (genvar t = 0; t < N_TAPS; t++) begin : g_rom
    product_rom #(.COEF(TAP_COEF[t]), .FRAC(TAP_FRAC[t])) u_rom (
      .clk (clk),
      .fine(t < 4 ? stage2 : !stage2),
      .code(tap_code[t]),
      .prod(prod[t])
    );
  end

  // ---- gating G1: one product per cycle, binary points aligned
  logic signed [ACC_W-1:0] aligned [N_TAPS];
  logic signed [ACC_W-1:0] operand;
  logic                    sub;

  for (genvar t = 0; t < N_TAPS; t++) begin : g_align
    assign aligned[t] = ACC_W'(prod[t]) <<< (ACC_FRAC - TAP_FRAC[t]);
  end

  always_comb begin
    operand = '0;
    sub     = 1'b0;
    for (int t = 0; t < N_TAPS; t++) begin
      if (tap_sel == 3'(t)) begin
        operand |= aligned[t];
        sub     |= tap_code[t].sign;
      end
    end
  end

  // ---- adder accumulator
  logic signed [ACC_W-1:0] acc;

  adder_accumulator u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .preset (acc_preset),
    .en     (acc_en),
    .sub    (sub),
    .operand(operand),
    .acc    (acc),
    .ovf    (acc_ovf)
  );

  // ---- quantization network
  quantizer u_quant (
    .clk  (clk),
    .rst_n(rst_n),
    .start(q_start),
    .fine (!stage2),
    .acc  (acc),
    .valid(q_valid),
    .code (y_code),
    .level(y_level),
    .clip (q_clip)
  );

  // ---- advanced state for write-back
  always_comb begin
    st_out.x1 = r1;
    st_out.x2 = r2;
    st_out.x3 = r3;
    st_out.y1 = y_code;
    st_out.y2 = r6;
    st_out.y3 = r7;
  end

endmodule
