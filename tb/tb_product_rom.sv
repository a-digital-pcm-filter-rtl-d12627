// Checks two product ROM blocks word by word against products computed in real
// arithmetic from the companding-law levels: the recursive block B1 (stored as -B1,
// one fraction bit) and the non-recursive block A1 (four fraction bits), for every
// standard and fine sample code. Also checks the one-clock read latency and a few
// products worked out by hand from the coefficient values.
module tb_product_rom;
  import pcm_filter_pkg::*;
  import pcm_ref_pkg::*;

  logic   clk = 0;
  logic   fine = 0;
  scode_t code = '0;
  logic signed [12:0] prod_b1, prod_a1;

  product_rom #(.COEF(0.9877751), .FRAC(1)) u_b1 (.clk, .fine, .code, .prod(prod_b1));
  product_rom #(.COEF(0.0808208), .FRAC(4)) u_a1 (.clk, .fine, .code, .prod(prod_a1));

  always #25 clk = ~clk;

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
    int nq;
    for (int f = 0; f < 2; f++) begin
      for (int l = 0; l < 8; l++) begin
        nq = (f == 1 && l >= 5) ? 32 : 16;
        for (int q = 0; q < nq; q++) begin
          c.sign = 0; c.seg = l; c.q = q; c.fine = f[0];
          @(negedge clk);
          fine = f[0];
          code = '{sign: 1'($urandom), seg: 3'(l), step: (nq == 32) ? 4'(q >> 1) : 4'(q),
                   ext: (nq == 32) ? 1'(q & 1) : 1'($urandom)};
          @(posedge clk); #1;
          check($sformatf("B1 L%0d q%0d f%0d", l, q, f), int'(prod_b1),
                int'(rprod(0.9877751, rlevel(c), 1) * 2.0));
          check($sformatf("A1 L%0d q%0d f%0d", l, q, f), int'(prod_a1),
                int'(rprod(0.0808208, rlevel(c), 4) * 16.0));
        end
      end
    end
    // hand-worked: 0.9877751 * 2015.5 = 1990.86 -> 1991.0 (x2 = 3982);
    // 0.0808208 * 2015.5 = 162.894 -> 162.875 (x16 = 2606); fine top 2031.5 * 0.9877751 = 2006.67 -> 2006.5
    @(negedge clk); fine = 0; code = '{sign: 0, seg: 7, step: 15, ext: 0};
    @(posedge clk); #1;
    check("B1 top", int'(prod_b1), 3982);
    check("A1 top", int'(prod_a1), 2606);
    @(negedge clk); fine = 1; code = '{sign: 0, seg: 7, step: 15, ext: 1};
    @(posedge clk); #1;
    check("B1 fine top", int'(prod_b1), 4013);
    // latency: the output must not follow the address before the clock edge
    @(negedge clk); fine = 0; code = '{sign: 0, seg: 0, step: 1, ext: 0};
    #1 check("read is clocked", int'(prod_b1), 4013);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
