// Test harness for tb_section_controller: drives one section_controller instance with
// random sample arrivals (back to back or after idle gaps of 1..40 clocks) and compares
// every control output, in the middle of each clock, with a cycle model of the two-pass
// event sequence. Parameters select the phase lengths and the channel count; `done` rises
// after 300 samples, and `checks`/`failures` are read by the enclosing testbench.
module ctrl_harness #(
  parameter int T_ADV = 3,
  parameter int T_ROM = 3,
  parameter int N_CH  = 24,
  localparam int CH_W = $clog2(N_CH)
) (
  input logic clk,
  input logic rst_n
);
  localparam int PASS = T_ADV + T_ROM + 7 + 4;

  logic            in_valid = 0, in_ready, accept, stage2, sec_load, acc_preset, acc_en;
  logic            q_start, wb;
  logic [CH_W-1:0] in_chan = '0, chan;
  logic [2:0]      tap_sel;

  section_controller #(.N_CH(N_CH), .T_ADV(T_ADV), .T_ROM(T_ROM), .T_QNT(4)) dut (.*);

  int checks = 0, failures = 0, n_samples = 0, n_b2b = 0, n_gap = 0;
  bit done = 0;

  // model: position within the current sample (0 .. 2*PASS-1), -1 when idle
  int          pos = -1;
  logic [CH_W-1:0] m_chan = '0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: T_ADV=%0d %s got %0d exp %0d (pos %0d)", T_ADV, what, got, exp, pos);
    end
  endtask

  // compare outputs in the middle of each cycle
  always @(negedge clk) begin
    if (rst_n) begin
      int p;
      bit e_load, e_en, e_q, e_wb, e_ready;
      int e_tap;
      p       = (pos < 0) ? -1 : pos % PASS;
      e_load  = (p == 0);
      e_en    = (p >= T_ADV + T_ROM) && (p < T_ADV + T_ROM + 7);
      e_tap   = e_en ? p - T_ADV - T_ROM : 0;
      e_q     = (p == T_ADV + T_ROM + 7);
      e_wb    = (p == PASS - 1);
      e_ready = (pos < 0) || (pos == 2 * PASS - 1);
      check("sec_load", sec_load, e_load);
      check("acc_preset", acc_preset, e_load);
      check("acc_en", acc_en, e_en);
      check("tap_sel", tap_sel, e_tap);
      check("q_start", q_start, e_q);
      check("wb", wb, e_wb);
      check("in_ready", in_ready, e_ready);
      if (pos >= 0) begin
        check("stage2", stage2, pos >= PASS);
        check("chan", chan, m_chan);
      end
    end
  end

  // model update at the clock edge
  always @(posedge clk) begin
    if (!rst_n) pos <= -1;
    else if (in_valid && in_ready) begin
      pos    <= 0;
      m_chan <= in_chan;
      if (pos == 2 * PASS - 1) n_b2b++;
      n_samples++;
    end else if (pos == 2 * PASS - 1) pos <= -1;
    else if (pos >= 0) pos <= pos + 1;
  end

  // stimulus: offer samples with random gaps (often none)
  initial begin
    wait (rst_n);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 40)) @(negedge clk);
        n_gap++;
      end
      in_valid = 1;
      in_chan  = CH_W'($urandom_range(0, N_CH - 1));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    @(negedge clk) in_valid = 0;
    repeat (2 * PASS + 2) @(posedge clk);
    checks++;
    if (n_b2b == 0 || n_gap == 0) begin failures++; $display("FAIL: no back-to-back or gap case"); end
    done = 1;
  end

endmodule
