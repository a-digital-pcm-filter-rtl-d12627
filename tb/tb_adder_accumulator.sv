// Adder accumulator test: random sequences of preset, add and subtract steps with
// operands of all sizes, checked cycle by cycle against an integer model. Covers the
// +0.5 preset, both saturation directions at the 18-bit limits, the sticky overflow
// flag and its clearing by preset, and hold when en is low.
module tb_adder_accumulator;
  import pcm_filter_pkg::*;

  logic clk = 0, rst_n = 0;
  logic preset = 0, en = 0, sub = 0;
  logic signed [ACC_W-1:0] operand = '0;
  logic signed [ACC_W-1:0] acc;
  logic ovf;

  adder_accumulator dut (.*);

  always #25 clk = ~clk;

  localparam longint MAXV = (longint'(1) << (ACC_W - 1)) - 1;
  localparam longint MINV = -(longint'(1) << (ACC_W - 1));

  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0, n_sub = 0;
  longint m_acc;
  bit     m_ovf;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset value is +0.5", acc, 8);
    m_acc = 8; m_ovf = 0;
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      preset  = (r < 8);
      en      = !preset && (r < 90);
      sub     = 1'($urandom);
      case ($urandom_range(0, 3))
        0: operand = ACC_W'($urandom_range(0, 255)) - ACC_W'(128);
        1: operand = ACC_W'($urandom_range(0, 65535)) - ACC_W'(32768);
        2: operand = ACC_W'($urandom);
        default: operand = (sub ? -1 : 1) * ACC_W'($urandom_range(0, 1 << 15));
      endcase
      @(posedge clk);
      if (preset) begin
        m_acc = 8; m_ovf = 0;
      end else if (en) begin
        longint s;
        s = sub ? m_acc - longint'(operand) : m_acc + longint'(operand);
        if (sub) n_sub++;
        if (s > MAXV) begin s = MAXV; m_ovf = 1; n_sat_hi++; end
        if (s < MINV) begin s = MINV; m_ovf = 1; n_sat_lo++; end
        m_acc = s;
      end
      @(negedge clk);
      check($sformatf("acc step %0d", i), acc, m_acc);
      check($sformatf("ovf step %0d", i), ovf, m_ovf);
    end
    checks += 3;
    if (n_sat_hi == 0) begin failures++; $display("FAIL: no positive saturation"); end
    if (n_sat_lo == 0) begin failures++; $display("FAIL: no negative saturation"); end
    if (n_sub == 0)    begin failures++; $display("FAIL: no subtraction"); end
    $display("saturations: high=%0d low=%0d subtractions=%0d", n_sat_hi, n_sat_lo, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
