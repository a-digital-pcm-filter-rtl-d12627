// Third-order section test: the section is driven the way the controller drives it
// (load with preset, ROM access, seven accumulate cycles A0..B3, quantizer start) with
// random register contents, in both stage roles: stage 1 (standard input codes, fine
// feedback and output codes) and stage 2 (fine input codes, standard feedback and
// output). Each result code, level and clip flag is compared with the reference
// section, and the advanced state st_out with the shifted registers. Large full-scale
// inputs make the clipping path happen; negative samples exercise subtraction.
module tb_third_order_section;
  import pcm_filter_pkg::*;
  import pcm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic stage2 = 0, load = 0, acc_preset = 0, acc_en = 0, q_start = 0;
  logic [2:0] tap_sel = 0;
  scode_t     x_in = '0;
  sec_state_t st_in = '0;
  logic       q_valid, acc_ovf, q_clip;
  scode_t     y_code;
  logic [LIN_W-1:0] y_level;
  sec_state_t st_out;

  third_order_section dut (.*);

  always #25 clk = ~clk;

  int checks = 0, failures = 0, n_clip = 0, n_neg = 0, n_fine = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic scode_t rand_code(bit fine, bit big);
    scode_t c;
    c      = scode_t'($urandom);
    if (big) c.seg = 3'($urandom_range(6, 7));
    c.ext  = (fine && c.seg >= 5) ? c.ext : 1'b0;
    return c;
  endfunction

  function automatic rcode_t to_ref(scode_t c, bit fine);
    rcode_t r;
    r.sign = c.sign; r.seg = int'(c.seg); r.fine = fine;
    r.q    = (fine && c.seg >= 5) ? int'({c.step, c.ext}) : int'(c.step);
    return r;
  endfunction

  task automatic run_pass(bit s2, bit big);
    rcode_t xv [4], yv [3], e;
    bit     sat, clip;
    int     waited;
    bit     x_fine, y_fine;
    scode_t     lx;
    sec_state_t ls, exp_st;
    x_fine = s2;          // stage 2 inputs are stage-1 (fine) outputs
    y_fine = !s2;         // the section's own outputs
    @(negedge clk);
    stage2   = s2;
    x_in     = rand_code(x_fine, big);
    st_in.x1 = rand_code(x_fine, big);
    st_in.x2 = rand_code(x_fine, big);
    st_in.x3 = rand_code(x_fine, big);
    st_in.y1 = rand_code(y_fine, big);
    st_in.y2 = rand_code(y_fine, big);
    st_in.y3 = rand_code(y_fine, big);
    if (big) begin   // same sign everywhere so that the sum goes far out of range
      x_in.sign = st_in.y1.sign;
      {st_in.x1.sign, st_in.x2.sign, st_in.x3.sign} = {3{st_in.y1.sign}};
      st_in.y2.sign = !st_in.y1.sign;
      st_in.y3.sign = st_in.y1.sign;
    end
    xv = '{to_ref(x_in, x_fine), to_ref(st_in.x1, x_fine), to_ref(st_in.x2, x_fine),
           to_ref(st_in.x3, x_fine)};
    yv = '{to_ref(st_in.y1, y_fine), to_ref(st_in.y2, y_fine), to_ref(st_in.y3, y_fine)};
    e  = rsection(xv, yv, !s2, sat, clip);
    lx = x_in; ls = st_in;
    load = 1; acc_preset = 1;
    @(negedge clk);
    load = 0; acc_preset = 0;
    st_in = sec_state_t'({$urandom, $urandom});   // registers must hold their copy
    x_in  = scode_t'($urandom);
    repeat (5) @(negedge clk);                      // rest of ADV, ROM access
    for (int t = 0; t < 7; t++) begin
      acc_en = 1; tap_sel = 3'(t);
      @(negedge clk);
    end
    acc_en = 0; tap_sel = 0;
    q_start = 1;
    @(negedge clk);
    q_start = 0;
    waited = 1;
    while (!q_valid && waited < 10) begin @(negedge clk); waited++; end
    check("quantizer latency", waited, 3);
    check("sign", y_code.sign, e.sign);
    check("seg", y_code.seg, e.seg);
    check("q", (!s2 && e.seg >= 5) ? int'({y_code.step, y_code.ext}) : int'(y_code.step), e.q);
    check("level", y_level, rlinear(e));
    check("clip", q_clip, clip);
    check("acc_ovf", acc_ovf, sat);
    exp_st = '{x1: lx, x2: ls.x1, x3: ls.x2, y1: y_code, y2: ls.y1, y3: ls.y2};
    check("st_out", int'(st_out == exp_st), 1);
    if (clip) n_clip++;
    if (e.sign) n_neg++;
    if (!s2 && e.seg >= 5 && e.q % 2 == 1) n_fine++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) run_pass(i[0], (i % 10) == 9);
    checks += 3;
    if (n_clip == 0) begin failures++; $display("FAIL: no clipping"); end
    if (n_neg == 0)  begin failures++; $display("FAIL: no negative sum"); end
    if (n_fine == 0) begin failures++; $display("FAIL: no fine level"); end
    $display("clips=%0d negative=%0d fine_odd=%0d", n_clip, n_neg, n_fine);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
