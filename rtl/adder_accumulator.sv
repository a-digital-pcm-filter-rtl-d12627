// Adder accumulator of the third-order section (accumulator AC, full adders FA and the
// incident register R5 together form the parallel adder).
//
// The document's adder is 16 bits wide: sign, 11 integer bits, 4 fraction bits. Here two
// guard bits are added above the integer part (18 bits, 13 integer bits), because partial
// sums of a full-scale signal reach about 3400 even when the final sum is in range; with
// saturation at 16 bits such a partial sum would corrupt the result. The document's
// simulation instead limits only the final sum, which the quantizer does here.
// `preset` clears the accumulator to +0.5 (only the 1/2 bit set), so that simply dropping
// the fraction of the final sum rounds it to the nearest integer. Each cycle with `en`
// set adds (sub = 0) or subtracts (sub = 1) one product already aligned to the
// accumulator's binary point. A result outside the 18-bit range saturates to the nearest
// extreme and sets the sticky `ovf` flag until the next preset; with the filter's
// coefficients and levels the sum stays below 5200 in magnitude, so in the filter `ovf`
// flags a fault rather than a signal condition.
//
// Timing: one addition per clock (the 50 ns adder interval); preset and en are exclusive.
module adder_accumulator
  import pcm_filter_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    preset,
  input  logic                    en,
  input  logic                    sub,
  input  logic signed [ACC_W-1:0] operand,
  output logic signed [ACC_W-1:0] acc,
  output logic                    ovf
);

  localparam logic signed [ACC_W-1:0] ROUND_HALF = ACC_W'(1 << (ACC_FRAC - 1));
  localparam logic signed [ACC_W-1:0] MAX_VAL    = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] MIN_VAL    = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [ACC_W:0] sum_wide;
  logic                  over_hi, over_lo;

  always_comb begin
    sum_wide = sub ? (ACC_W+1)'(acc) - (ACC_W+1)'(operand)
                   : (ACC_W+1)'(acc) + (ACC_W+1)'(operand);
    over_hi  = sum_wide > (ACC_W+1)'(MAX_VAL);
    over_lo  = sum_wide < (ACC_W+1)'(MIN_VAL);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= ROUND_HALF;
      ovf <= 1'b0;
    end else if (preset) begin
      acc <= ROUND_HALF;
      ovf <= 1'b0;
    end else if (en) begin
      if (over_hi)      acc <= MAX_VAL;
      else if (over_lo) acc <= MIN_VAL;
      else              acc <= sum_wide[ACC_W-1:0];
      ovf <= ovf | over_hi | over_lo;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(preset && en))
    else $error("adder_accumulator: preset and en in the same cycle");

endmodule
