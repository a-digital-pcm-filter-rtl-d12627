// Sequencer of the multiplexed third-order section.
//
// Every input sample is processed by two passes through the same section: pass 1 is the
// first third-order stage (fine level assignment at its output), pass 2 the second stage
// (standard assignment). Each pass runs the sequence of events of the section, one clock
// per 50 ns adder interval:
//   ADV  T_ADV cycles  unit-delay registers advanced/loaded (first cycle) and the
//                      accumulator preset to +0.5; the previous output is converted to
//                      the compressed code meanwhile                      (150 ns)
//   ROM  T_ROM cycles  all seven product ROMs accessed in parallel          (150 ns)
//   ACC  7 cycles      products gated into the adder in the order A0 A1 A2 A3 B1 B2 B3
//   QNT  T_QNT cycles  negation, segment detection, level read (first cycle starts the
//                      quantizer), state write-back on the last cycle      (215 ns -> 200)
// A pass takes T_ADV + T_ROM + 7 + T_QNT = 17 cycles (850 ns), a sample 34 cycles
// (1.70 us), so 24 channels fit in the 41.7 us frame of the 24 kHz sampling rate at a
// 20 MHz clock. The phase lengths follow the document's times; rounding the 215 ns
// quantization slot to four cycles is this design's choice, and T_QNT must equal the
// quantizer's three-cycle latency plus the write-back cycle.
//
// Interface: a sample is accepted when in_valid && in_ready; in_ready is high when idle
// and in the last cycle of a sample's second pass, so back-to-back samples need no idle
// cycle.
module section_controller #(
  parameter int N_CH  = 24,
  parameter int T_ADV = 3,
  parameter int T_ROM = 3,
  parameter int T_QNT = 4,
  localparam int CH_W = $clog2(N_CH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [CH_W-1:0] in_chan,
  output logic            in_ready,
  output logic            accept,     // sample taken this cycle
  output logic [CH_W-1:0] chan,       // channel of the pass in progress
  output logic            stage2,     // 0: first stage, 1: second stage
  output logic            sec_load,   // load R1..R8 from input and state memory
  output logic            acc_preset,
  output logic            acc_en,
  output logic [2:0]      tap_sel,    // 0..6 = A0 A1 A2 A3 B1 B2 B3
  output logic            q_start,
  output logic            wb          // end of pass: write back state, take result
);

  typedef enum logic [2:0] {S_IDLE, S_ADV, S_ROM, S_ACC, S_QNT} state_t;

  state_t     state;
  logic [3:0] cnt;
  logic       last;

  always_comb begin
    unique case (state)
      S_ADV:   last = (cnt == 4'(T_ADV - 1));
      S_ROM:   last = (cnt == 4'(T_ROM - 1));
      S_ACC:   last = (cnt == 4'd6);
      S_QNT:   last = (cnt == 4'(T_QNT - 1));
      default: last = 1'b1;
    endcase
    sec_load   = (state == S_ADV) && (cnt == 4'd0);
    acc_preset = sec_load;
    acc_en     = (state == S_ACC);
    tap_sel    = acc_en ? cnt[2:0] : 3'd0;
    q_start    = (state == S_QNT) && (cnt == 4'd0);
    wb         = (state == S_QNT) && last;
    in_ready   = (state == S_IDLE) || (wb && stage2);
    accept     = in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      chan   <= '0;
      stage2 <= 1'b0;
    end else begin
      cnt <= last ? 4'd0 : cnt + 4'd1;
      unique case (state)
        S_IDLE: ;
        S_ADV:  if (last) state <= S_ROM;
        S_ROM:  if (last) state <= S_ACC;
        S_ACC:  if (last) state <= S_QNT;
        S_QNT:  if (last) begin
                  if (!stage2) begin
                    stage2 <= 1'b1;
                    state  <= S_ADV;
                  end else begin
                    state <= S_IDLE;
                  end
                end
        default: state <= S_IDLE;
      endcase
      if (accept) begin
        chan   <= in_chan;
        stage2 <= 1'b0;
        state  <= S_ADV;
        cnt    <= '0;
      end
    end
  end

  initial begin
    assert (T_ADV >= 1 && T_ADV <= 16 && T_ROM >= 1 && T_ROM <= 16)
      else $error("section_controller: T_ADV and T_ROM must be 1..16");
    assert (T_QNT == 4)
      else $error("section_controller: T_QNT must match the quantizer latency (4)");
  end

  assert property (@(posedge clk) disable iff (!rst_n) accept |-> int'(in_chan) < N_CH)
    else $error("section_controller: channel %0d out of range", in_chan);

endmodule
