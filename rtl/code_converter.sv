// Output code converter (block D): 13-bit linear level to 8-bit compressed code.
//
// The filter's final output leaves the section as a 13-bit sign-magnitude linear level
// (one fraction bit). The converter finds the segment from the leading one of the
// integer part and takes the four bits after it as the step number, giving the code
// {sign, L[2:0], q[3:0]} of the standard assignment. For a value that is already a
// standard level (which is all the filter ever presents) the conversion is exact; any
// other value is mapped to the code of the quantum that contains its integer part.
// The document describes block D only as a ROM that performs this conversion; the
// leading-one logic used here in place of a table is this design's choice.
//
// Timing: registered; `code` and `valid` follow `in_valid` by one clock, inside the
// advance slot of the next pass.
module code_converter
  import pcm_filter_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [LIN_W-1:0]  linear,
  output logic              valid,
  output logic [CODE_W-1:0] code
);

  logic [MAG_W-2:0] n;       // integer part of the magnitude, 11 bits
  logic [2:0]       seg;
  logic [3:0]       step;

  always_comb begin
    n    = linear[MAG_W-1:1];
    seg  = '0;
    step = n[3:0];
    for (int p = 4; p < MAG_W - 1; p++) begin
      if (n[p]) begin
        seg  = 3'(p - 3);
        step = n[p-1 -: 4];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      code  <= '0;
    end else begin
      valid <= in_valid;
      if (in_valid) code <= {linear[LIN_W-1], seg, step};
    end
  end

endmodule
