// Quantizer test: feeds rounded accumulator values (every integer from -2048 to 2047
// plus out-of-range sums up to the accumulator limits, with random fraction bits, in both level assignments) and compares the code, the
// 13-bit level and the clip flag with the threshold-based reference quantizer. Also
// checks hand-worked entries of the two level tables and the three-clock latency.
module tb_quantizer;
  import pcm_filter_pkg::*;
  import pcm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, fine = 0;
  logic signed [ACC_W-1:0] acc = '0;
  logic valid, clip;
  scode_t code;
  logic [12:0] level;

  quantizer dut (.*);

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int m; bit fine; longint t; } req_t;
  req_t reqs[$];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // monitor
  always @(posedge clk) begin
    if (rst_n && valid) begin
      req_t   r;
      rcode_t c;
      bit     cl;
      int     q;
      r = reqs.pop_front();
      c = rquant(r.m, r.fine, cl);
      q = {code.step, code.ext};
      check($sformatf("latency m=%0d", r.m), int'(cycle - r.t), 3);
      check($sformatf("sign m=%0d", r.m), int'(code.sign), int'(c.sign));
      check($sformatf("seg m=%0d", r.m), int'(code.seg), c.seg);
      check($sformatf("q m=%0d f=%0d", r.m, r.fine), is_fine_seg(c) ? q : int'(code.step), c.q);
      if (!is_fine_seg(c)) check("ext zero", int'(code.ext), 0);
      check($sformatf("level m=%0d f=%0d", r.m, r.fine), int'(level), int'(rlinear(c)));
      check("clip", int'(clip), int'(cl));
    end
  end

  task automatic send(int m, bit f, int frac);
    @(negedge clk);
    start = 1;
    fine  = f;
    acc   = ACC_W'((m <<< 4) | frac);
    @(posedge clk);
    reqs.push_back('{m: m, fine: f, t: cycle});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int m = -2048; m < 2048; m++) send(m, f[0], $urandom_range(0, 15));
    for (int i = 0; i < 400; i++)
      send((i % 2 ? -1 : 1) * $urandom_range(2048, 8191) - (i % 2), i % 4 < 2, $urandom_range(0, 15));
    send(8191, 0, 15);
    send(-8192, 1, 0);
    @(negedge clk) start = 0;
    repeat (5) @(posedge clk);
    // hand-worked table entries: 1000 -> L6 q15 (1007.5) standard; fine L6 q5=30 (999.5)
    send(1000, 0, 0); @(negedge clk) start = 0; repeat (3) @(posedge clk);
    check("table 3.1 L6 q15", int'(level), 2015);
    send(1000, 1, 0); @(negedge clk) start = 0; repeat (3) @(posedge clk);
    check("table 4.8 L6 q30", int'(level), 1999);
    send(-33, 0, 0); @(negedge clk) start = 0; repeat (3) @(posedge clk);
    check("-33 -> -32.5", int'(level), 4096 + 65);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
