// Channel state memory test, for the 24-channel default and a 5-channel instance:
// after reset every entry reads zero; random writes (channel, stage) followed by reads
// of random entries must match a model array, so that channels and the two stages never
// disturb each other; a write is visible on the read port from the next clock on.
module tb_channel_state_mem;
  import pcm_filter_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  // default instance
  logic [4:0] rd_chan = 0, wr_chan = 0;
  logic       rd_stage = 0, wr_stage = 0, we = 0;
  sec_state_t rd_data, wr_data = '0;

  channel_state_mem dut (.*);

  // small instance
  logic [2:0] s_rd_chan = 0, s_wr_chan = 0;
  logic       s_we = 0;
  sec_state_t s_rd_data;

  channel_state_mem #(.N_CH(5)) dut5 (
    .clk(clk), .rst_n(rst_n), .rd_chan(s_rd_chan), .rd_stage(rd_stage), .rd_data(s_rd_data),
    .we(s_we), .wr_chan(s_wr_chan), .wr_stage(wr_stage), .wr_data(wr_data));

  sec_state_t model [24][2], model5 [5][2];
  int checks = 0, failures = 0;

  task automatic check(string what, sec_state_t got, sec_state_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic sec_state_t rand_state();
    sec_state_t s;
    s = {$urandom, $urandom};
    return s;
  endfunction

  initial begin
    // scramble, then reset
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      we = 1; wr_chan = 5'($urandom_range(0, 23)); wr_stage = 1'($urandom); wr_data = rand_state();
    end
    @(negedge clk) we = 0; rst_n = 0;
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 24; c++)
      for (int s = 0; s < 2; s++) begin
        rd_chan = 5'(c); rd_stage = s[0]; #1;
        check($sformatf("reset ch%0d st%0d", c, s), rd_data, '0);
        model[c][s] = '0;
        if (c < 5) model5[c][s] = '0;
      end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we       = ($urandom_range(0, 2) != 0);
      wr_chan  = 5'($urandom_range(0, 23));
      wr_stage = 1'($urandom);
      wr_data  = rand_state();
      s_we      = we;
      s_wr_chan = 3'($urandom_range(0, 4));
      @(posedge clk);
      if (we) begin
        model[wr_chan][wr_stage] = wr_data;
        model5[s_wr_chan][wr_stage] = wr_data;
      end
      @(negedge clk);
      we = 0; s_we = 0;
      // the entry just written, then a random one
      rd_chan = wr_chan; rd_stage = wr_stage; s_rd_chan = s_wr_chan; #1;
      check("written entry", rd_data, model[rd_chan][rd_stage]);
      check("written entry (5 ch)", s_rd_data, model5[s_rd_chan][rd_stage]);
      rd_chan = 5'($urandom_range(0, 23)); rd_stage = 1'($urandom);
      s_rd_chan = 3'($urandom_range(0, 4)); #1;
      check($sformatf("ch%0d st%0d", rd_chan, rd_stage), rd_data, model[rd_chan][rd_stage]);
      check("random entry (5 ch)", s_rd_data, model5[s_rd_chan][rd_stage]);
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
