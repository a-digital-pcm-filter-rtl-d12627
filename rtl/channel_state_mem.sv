// Channel state memory: the unit-delay contents of every channel and stage.
//
// One physical third-order section serves 24 channels, and each channel uses it twice
// per sample (stage 1, then stage 2). The delayed samples x(n-1..n-3) and y(n-1..n-3)
// of every (channel, stage) pair therefore live here between passes: a pass reads its
// entry into the section's registers R2..R4 and R6..R8, and at the end writes back the
// advanced contents (R1 -> R2, R2 -> R3, R3 -> R4, new y -> R6, R6 -> R7, R7 -> R8).
// The document names the need for a 24-channel multiplexing arrangement but does not
// show one; this register-file organisation, indexed by {channel, stage}, is this
// design's choice.
//
// Interface: combinational read of entry {rd_chan, rd_stage}; synchronous write of
// {wr_chan, wr_stage} when `we`. Reset clears every entry (silent history).
module channel_state_mem
  import pcm_filter_pkg::*;
#(
  parameter int N_CH = 24,
  localparam int CH_W = $clog2(N_CH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CH_W-1:0] rd_chan,
  input  logic            rd_stage,
  output sec_state_t      rd_data,
  input  logic            we,
  input  logic [CH_W-1:0] wr_chan,
  input  logic            wr_stage,
  input  sec_state_t      wr_data
);

  sec_state_t mem [N_CH][2];

  assign rd_data = mem[rd_chan][rd_stage];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        mem[c][0] <= '0;
        mem[c][1] <= '0;
      end
    end else if (we) begin
      mem[wr_chan][wr_stage] <= wr_data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) we |-> int'(wr_chan) < N_CH)
    else $error("channel_state_mem: write to channel %0d beyond %0d", wr_chan, N_CH);

endmodule
