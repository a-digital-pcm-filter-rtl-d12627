// Section controller test, for the default phase lengths (17-clock pass) and for a
// shortened instance (T_ADV = 2, T_ROM = 1: 14-clock pass). For random sample arrivals,
// back to back and with idle gaps, every control output is compared cycle by cycle
// with the expected sequence of events of the two passes: load and preset in the first
// ADV cycle, seven accumulate cycles with taps A0 A1 A2 A3 B1 B2 B3, quantizer start,
// write-back at the end of each pass, stage bit, held channel, and in_ready only when
// idle or in the final write-back cycle.
module tb_section_controller;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // two controllers, each with its own driver and cycle model
  ctrl_harness #(.T_ADV(3), .T_ROM(3), .N_CH(24)) h_def (.clk(clk), .rst_n(rst_n));
  ctrl_harness #(.T_ADV(2), .T_ROM(1), .N_CH(7))  h_short (.clk(clk), .rst_n(rst_n));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (h_def.done && h_short.done);
    checks   = h_def.checks + h_short.checks;
    failures = h_def.failures + h_short.failures;
    $display("default: samples=%0d back_to_back=%0d gaps=%0d; short: samples=%0d back_to_back=%0d",
             h_def.n_samples, h_def.n_b2b, h_def.n_gap, h_short.n_samples, h_short.n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h_def.checks + h_short.checks,
             h_def.failures + h_short.failures + 1);
    $finish;
  end

endmodule
