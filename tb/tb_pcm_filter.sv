// End-to-end test of the 24-channel sixth-order filter at its default parameters.
//
// Feeds every channel a different signal (low- and high-frequency sinusoids, random
// codes, full-scale square waves and a worst-case sequence that overloads the filter)
// in a random channel order, with back-to-back samples and idle gaps, and compares
// every output code and linear level with the reference model of pcm_ref_pkg, which
// runs both third-order stages per channel. It also checks the latency (35 clocks from
// acceptance to out_valid), the 34-clock sample period when samples come back to back,
// that a 24-channel frame fits in the 833 clocks of a 24 kHz frame at 20 MHz, and that
// each mechanism of the design happened: overload events (sat_event), quantizer
// clipping, fine first-stage levels, negative sums, back-to-back acceptance and idle
// gaps.
module tb_pcm_filter;
  import pcm_ref_pkg::*;

  localparam int N_CH      = 24;
  localparam int N_FRAMES  = 80;
  localparam int LATENCY   = 35;
  localparam int PERIOD    = 34;
  localparam int FRAME_MAX = 833;   // 1 / (24 kHz) at a 50 ns clock

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready;
  logic [4:0]  in_chan = 0;
  logic [7:0]  in_code = 0;
  logic        out_valid;
  logic [4:0]  out_chan;
  logic [7:0]  out_code;
  logic [12:0] out_linear;
  logic        sat_event;

  pcm_filter dut (.*);

  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // reference state per channel: stage 1 and stage 2 delay lines
  rcode_t sx1 [N_CH][3], sy1 [N_CH][3], sx2 [N_CH][3], sy2 [N_CH][3];

  typedef struct {
    int         chan;
    logic [7:0] code;
    logic [12:0] lin;
    bit         sat;
    int     t_acc;
  } exp_t;
  exp_t expq[$];

  int n_sat = 0, n_clip = 0, n_fine = 0, n_neg = 0, n_b2b = 0, n_gap = 0, n_out = 0;
  int n_chan_seen [N_CH];

  function automatic rcode_t zero_code(bit fine);
    rcode_t c;
    c.sign = 0; c.seg = 0; c.q = 0; c.fine = fine;
    return c;
  endfunction

  // Push a new sample into a three-deep reference delay line.
  function automatic void shift_in(ref rcode_t d [3], input rcode_t v);
    d[2] = d[1];
    d[1] = d[0];
    d[0] = v;
  endfunction

  // Run the reference for one accepted sample.
  function automatic exp_t ref_step(int ch, logic [7:0] code);
    rcode_t xin, m, y, xv [4], yv [3];
    bit     sat1, clip1, sat2, clip2;
    exp_t   e;
    xin = from_code8(code);
    xv  = '{xin, sx1[ch][0], sx1[ch][1], sx1[ch][2]};
    yv  = '{sy1[ch][0], sy1[ch][1], sy1[ch][2]};
    m   = rsection(xv, yv, 1'b1, sat1, clip1);
    shift_in(sx1[ch], xin);
    shift_in(sy1[ch], m);
    xv  = '{m, sx2[ch][0], sx2[ch][1], sx2[ch][2]};
    yv  = '{sy2[ch][0], sy2[ch][1], sy2[ch][2]};
    y   = rsection(xv, yv, 1'b0, sat2, clip2);
    shift_in(sx2[ch], m);
    shift_in(sy2[ch], y);
    if (is_fine_seg(m) && (m.q % 2 == 1)) n_fine++;
    if (m.sign || y.sign) n_neg++;
    if (clip1 || clip2) n_clip++;
    e.chan = ch;
    e.code = rcode8(y);
    e.lin  = rlinear(y);
    e.sat  = sat1 | sat2 | clip1 | clip2;
    return e;
  endfunction

  // Sign of the impulse response of one third-order stage at sample k (real arithmetic).
  function automatic bit h_negative(int k);
    real x [4], y [4], v;
    x = '{default: 0.0}; y = '{default: 0.0};
    for (int n = 0; n <= k; n++) begin
      x = '{(n == 0) ? 1.0 : 0.0, x[0], x[1], x[2]};
      v = 0.0;
      for (int i = 0; i < 4; i++) v += C_A[i] * x[i];
      for (int i = 0; i < 3; i++) v -= C_B[i] * y[i];
      y = '{v, y[0], y[1], y[2]};
    end
    return y[0] < 0.0;
  endfunction

  // Input signal of channel ch at sample n, as a compressed code.
  function automatic logic [7:0] stimulus(int ch, int n);
    real    v;
    rcode_t c;
    bit     clip;
    // channel 2: full-scale input matched to the time-reversed impulse response, which
    // drives the first stage beyond -2048 at sample 40 so that the quantizer clips
    if (ch == 2 && n <= 40) begin
      v = h_negative(40 - n) ? 2015.5 : -2015.5;
      c = rquant(int'($floor(v + 0.5)), 1'b0, clip);
      return rcode8(c);
    end
    case (ch % 4)
      0: v = 2015.0 * real'(ch + 1) / 25.0 * $cos(6.2831853 * 1000.0 * n / 24000.0);
      1: return 8'($urandom);
      2: v = ((n / (2 + ch / 4)) % 2 == 0) ? 2015.5 : -2015.5;
      default: v = 1800.0 * $sin(6.2831853 * (3000.0 + 250.0 * ch) * n / 24000.0);
    endcase
    c = rquant(int'($floor(v + 0.5)), 1'b0, clip);
    return rcode8(c);
  endfunction

  // ---- driver
  int last_acc = -1;
  bit     first_frame_done = 0;
  int frame_first;
  initial begin
    int order [N_CH];
    for (int c = 0; c < N_CH; c++) begin
      sx1[c] = '{default: zero_code(0)}; sy1[c] = '{default: zero_code(1)};
      sx2[c] = '{default: zero_code(1)}; sy2[c] = '{default: zero_code(0)};
      n_chan_seen[c] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < N_FRAMES; f++) begin
      for (int c = 0; c < N_CH; c++) order[c] = c;
      if (f % 2 == 1) order.shuffle();
      frame_first = -1;
      for (int i = 0; i < N_CH; i++) begin
        if (f % 5 == 4 && i % 7 == 3) begin   // occasional idle gap
          @(negedge clk);
          in_valid = 0;
          repeat ($urandom_range(1, 5)) @(negedge clk);
          n_gap++;
        end
        @(negedge clk);
        in_valid = 1;
        in_chan  = 5'(order[i]);
        in_code  = stimulus(order[i], f);
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        // accepted at this edge
        begin
          exp_t e;
          e = ref_step(order[i], in_code);
          e.t_acc = cycle;
          expq.push_back(e);
          if (last_acc >= 0 && cycle - last_acc == PERIOD) n_b2b++;
          if (last_acc >= 0) begin
            checks++;
            if (cycle - last_acc < PERIOD) begin
              failures++;
              $display("FAIL: samples accepted %0d clocks apart", cycle - last_acc);
            end
          end
          last_acc = cycle;
          if (frame_first < 0) frame_first = cycle;
          n_chan_seen[order[i]]++;
        end
      end
      @(negedge clk);
      in_valid = 0;
      // frame time: 24 back-to-back samples must fit in the 24 kHz frame
      if (f % 5 != 4) begin
        checks++;
        if (last_acc - frame_first + PERIOD > FRAME_MAX) begin
          failures++;
          $display("FAIL: frame took %0d clocks", last_acc - frame_first + PERIOD);
        end
      end
    end
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    // mechanisms
    checks++; if (n_sat  == 0) begin failures++; $display("FAIL: no overload event seen"); end
    checks++; if (n_clip == 0) begin failures++; $display("FAIL: no clipping seen"); end
    checks++; if (n_fine == 0) begin failures++; $display("FAIL: no fine level used"); end
    checks++; if (n_neg  == 0) begin failures++; $display("FAIL: no negative sum"); end
    checks++; if (n_b2b  == 0) begin failures++; $display("FAIL: no back-to-back samples"); end
    checks++; if (n_gap  == 0) begin failures++; $display("FAIL: no idle gap"); end
    for (int c = 0; c < N_CH; c++) begin
      checks++;
      if (n_chan_seen[c] != N_FRAMES) begin failures++; $display("FAIL: channel %0d", c); end
    end
    $display("mechanisms: overload_events=%0d clip=%0d fine_levels=%0d negative=%0d back_to_back=%0d gaps=%0d outputs=%0d",
             n_sat, n_clip, n_fine, n_neg, n_b2b, n_gap, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      if (expq.size() == 0) begin
        checks++; failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        checks += 4;
        if (out_chan != 5'(e.chan)) begin failures++; $display("FAIL: chan %0d exp %0d", out_chan, e.chan); end
        if (out_code != e.code) begin
          failures++;
          if (failures < 20) $display("FAIL: ch %0d code %02h exp %02h (cycle %0d)", e.chan, out_code, e.code, cycle);
        end
        if (out_linear != e.lin) begin failures++; if (failures < 20) $display("FAIL: ch %0d linear %04h exp %04h", e.chan, out_linear, e.lin); end
        if (cycle - e.t_acc != LATENCY) begin failures++; $display("FAIL: latency %0d", cycle - e.t_acc); end
        checks++;
        if (sat_event != e.sat) begin failures++; if (failures < 20) $display("FAIL: sat_event %0b exp %0b", sat_event, e.sat); end
        if (sat_event) n_sat++;
      end
    end
  end

  initial begin
    repeat (N_FRAMES * 900 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
