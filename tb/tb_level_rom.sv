// Level ROM test: instantiates the eight level ROMs L0..L7 and checks every address of
// each (both assignments, every step, both values of the extra step bit) against the
// companding-law level formula of the reference model, and that a disabled ROM outputs
// zero so that the ORed ROM outputs select exactly one level. A few entries of both
// level tables are also checked as plain numbers.
module tb_level_rom;
  import pcm_filter_pkg::*;
  import pcm_ref_pkg::*;

  logic       en [8];
  logic       fine;
  logic [3:0] step;
  logic       ext;
  logic [MAG_W-1:0] level [8];

  for (genvar s = 0; s < 8; s++) begin : g_rom
    level_rom #(.SEG(s)) dut (.en(en[s]), .fine(fine), .step(step), .ext(ext), .level(level[s]));
  end

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    rcode_t c;
    int     n_fine_used = 0;
    for (int sel = 0; sel < 8; sel++) begin
      for (int s = 0; s < 8; s++) en[s] = (s == sel);
      for (int f = 0; f < 2; f++)
        for (int q = 0; q < 16; q++)
          for (int e = 0; e < 2; e++) begin
            fine = f[0]; step = 4'(q); ext = e[0];
            #1;
            c.sign = 0; c.seg = sel; c.fine = f[0];
            c.q    = (f == 1 && sel >= 5) ? 2 * q + e : q;
            if (f == 1 && sel >= 5 && e == 1) n_fine_used++;
            check($sformatf("L%0d fine=%0d q=%0d ext=%0d", sel, f, q, e),
                  int'(level[sel]), int'(2.0 * rlevel(c)));
            for (int s = 0; s < 8; s++)
              if (s != sel) check($sformatf("L%0d disabled", s), int'(level[s]), 0);
          end
    end
    // a few table entries worked by hand (twice the level): standard L7 q15 = 2015.5,
    // fine L7 q31 = 2031.5, L1 q0 = 16, fine L5 q1 = 267.5 (quantum 264..271)
    for (int s = 0; s < 8; s++) en[s] = 1'b1;
    fine = 0; step = 15; ext = 0; #1 check("L7 q15", int'(level[7]), 4031);
    fine = 1; step = 15; ext = 1; #1 check("fine L7 q31", int'(level[7]), 4063);
    fine = 0; step = 0;  ext = 0; #1 check("L1 q0", int'(level[1]), 32);
    fine = 1; step = 0;  ext = 1; #1 check("fine L5 q1", int'(level[5]), 535);
    // printed table values (twice the level): standard L3 q15 = 125.5, L5 q15 = 503.5;
    // fine L5 q31 = 507.5, L6 q17 = 791.5, L7 q16 = 1551.5, L4 q0 = 131.5
    fine = 0; step = 15; ext = 0; #1 check("L3 q15", int'(level[3]), 251);
    check("L5 q15", int'(level[5]), 1007);
    fine = 1; step = 15; ext = 1; #1 check("fine L5 q31", int'(level[5]), 1015);
    fine = 1; step = 8;  ext = 1; #1 check("fine L6 q17", int'(level[6]), 1583);
    fine = 1; step = 8;  ext = 0; #1 check("fine L7 q16", int'(level[7]), 3103);
    fine = 1; step = 0;  ext = 1; #1 check("fine L4 q0 (ext ignored)", int'(level[4]), 263);
    checks++;
    if (n_fine_used == 0) begin failures++; $display("FAIL: fine half steps not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
