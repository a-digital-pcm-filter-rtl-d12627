// 24-channel digital PCM transmit channel filter using stored products.
//
// The filter sits after the channel bank's encoder and works directly on the 8-bit
// compressed codes. It is a sixth-order low-pass made of two identical third-order
// direct-form sections in tandem (24 kHz sampling), but only one section exists in
// hardware: every sample passes through it twice. Multipliers are replaced by ROMs that
// store coefficient x sample-level products, which is possible because every sample the
// ROMs see is quantized to one of a few hundred levels: the input by the encoder, the
// section output by the quantizer after the adder. The first pass quantizes to a finer
// level set (32 quanta in segments 5..7), the second to the standard companding levels,
// whose code is the filter output.
//
// Blocks: section_controller (sequence of events), channel_state_mem (unit delays of all
// channels and stages), third_order_section (registers, product ROMs, gating, adder,
// quantizer), code_converter (block D, 13-bit linear level to 8-bit code).
//
// Interface: offer a sample with in_valid/in_chan/in_code; it is taken when in_ready is
// high. 34 clocks later (two 17-clock passes) plus one clock for the code conversion,
// out_valid pulses with out_chan, out_code and the 13-bit linear level out_linear.
// sat_event pulses with out_valid when a pass of that sample was out of range and was
// limited to the top level (or, on a fault, the accumulator saturated). Samples of one
// channel must arrive in time order; channels may interleave freely. At a 20 MHz clock
// (the document's 50 ns adder interval) a sample takes 1.70 us and the 24 channels
// 40.8 us, within the 41.7 us frame of the 24 kHz sampling rate.
// The handshake, the per-channel state organisation and the overload rule are this
// design's choices; the arithmetic, tables, coefficients and timing follow the document.
module pcm_filter
  import pcm_filter_pkg::*;
#(
  parameter int N_CH  = 24,
  parameter int T_ADV = 3,
  parameter int T_ROM = 3,
  parameter int T_QNT = 4,
  localparam int CH_W = $clog2(N_CH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [CH_W-1:0]   in_chan,
  input  logic [CODE_W-1:0] in_code,
  output logic              out_valid,
  output logic [CH_W-1:0]   out_chan,
  output logic [CODE_W-1:0] out_code,
  output logic [LIN_W-1:0]  out_linear,
  output logic              sat_event
);

  logic            accept, stage2, sec_load, acc_preset, acc_en, q_start, wb;
  scode_t          y_code;
  logic [LIN_W-1:0] y_level;
  logic            q_valid, acc_ovf, q_clip;
  logic [CH_W-1:0] chan;
  logic [2:0]      tap_sel;

  section_controller #(
    .N_CH(N_CH), .T_ADV(T_ADV), .T_ROM(T_ROM), .T_QNT(T_QNT)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_chan   (in_chan),
    .in_ready  (in_ready),
    .accept    (accept),
    .chan      (chan),
    .stage2    (stage2),
    .sec_load  (sec_load),
    .acc_preset(acc_preset),
    .acc_en    (acc_en),
    .tap_sel   (tap_sel),
    .q_start   (q_start),
    .wb        (wb)
  );

  // ---- sample input register; the stage-1 result is the stage-2 input
  scode_t in_reg, mid_reg, x_in;
  logic   sat_seen;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_reg   <= '0;
      mid_reg  <= '0;
      sat_seen <= 1'b0;
    end else begin
      if (accept) in_reg <= '{sign: in_code[7], seg: in_code[6:4], step: in_code[3:0], ext: 1'b0};
      if (wb && !stage2) mid_reg <= y_code;
      if (wb) sat_seen <= stage2 ? 1'b0 : (acc_ovf | q_clip);
    end
  end

  assign x_in = stage2 ? mid_reg : in_reg;

  // ---- channel state memory
  sec_state_t st_rd, st_wr;

  channel_state_mem #(.N_CH(N_CH)) u_state (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_chan (chan),
    .rd_stage(stage2),
    .rd_data (st_rd),
    .we      (wb),
    .wr_chan (chan),
    .wr_stage(stage2),
    .wr_data (st_wr)
  );

  // ---- the third-order section
  third_order_section u_sec (
    .clk       (clk),
    .rst_n     (rst_n),
    .stage2    (stage2),
    .load      (sec_load),
    .x_in      (x_in),
    .st_in     (st_rd),
    .acc_preset(acc_preset),
    .acc_en    (acc_en),
    .tap_sel   (tap_sel),
    .q_start   (q_start),
    .q_valid   (q_valid),
    .y_code    (y_code),
    .y_level   (y_level),
    .st_out    (st_wr),
    .acc_ovf   (acc_ovf),
    .q_clip    (q_clip)
  );

  // ---- output: block D converts the second-stage level to the compressed code
  logic out_take;
  assign out_take = wb && stage2;

  code_converter u_conv (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(out_take),
    .linear  (y_level),
    .valid   (out_valid),
    .code    (out_code)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_chan   <= '0;
      out_linear <= '0;
      sat_event  <= 1'b0;
    end else begin
      sat_event <= out_take && (sat_seen | acc_ovf | q_clip);
      if (out_take) begin
        out_chan   <= chan;
        out_linear <= y_level;
      end
    end
  end

  // The quantizer result must arrive exactly in the write-back cycle.
  assert property (@(posedge clk) disable iff (!rst_n) wb |-> q_valid)
    else $error("pcm_filter: quantizer result not ready at write-back");

endmodule
