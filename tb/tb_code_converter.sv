// Code converter (block D) test: every standard quantization level, positive and
// negative, must convert back to its own 8-bit code; random 13-bit linear values must
// give the code of the segment and step they fall in (threshold reference quantizer).
// Also checks the one-clock latency and that the code holds when in_valid is low.
module tb_code_converter;
  import pcm_filter_pkg::*;
  import pcm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [LIN_W-1:0]  linear = '0;
  logic valid;
  logic [CODE_W-1:0] code;

  code_converter dut (.*);

  always #25 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %02h exp %02h", what, got, exp);
    end
  endtask

  task automatic convert(logic [LIN_W-1:0] lin, logic [7:0] exp, string what);
    @(negedge clk);
    in_valid = 1; linear = lin;
    @(negedge clk);
    in_valid = 0; linear = ~lin;
    check({what, " valid"}, int'(valid), 1);
    check(what, int'(code), int'(exp));
    @(negedge clk);
    check({what, " valid drop"}, int'(valid), 0);
    check({what, " hold"}, int'(code), int'(exp));
  endtask

  initial begin
    rcode_t c;
    bit     cl;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 256; k++) begin
      c = from_code8(8'(k));
      convert(rlinear(c), 8'(k), $sformatf("level of code %02h", k));
    end
    for (int i = 0; i < 2000; i++) begin
      logic [LIN_W-1:0] lin;
      logic [7:0]       exp;
      lin = LIN_W'($urandom);
      c   = rquant(int'(lin[MAG_W-1:1]), 1'b0, cl);
      exp = rcode8(c);
      exp[7] = lin[LIN_W-1];
      convert(lin, exp, $sformatf("linear %04h", lin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
