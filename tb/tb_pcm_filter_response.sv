// Frequency-response workload of the 24-channel filter at its default parameters.
//
// Five channels run side by side with sinusoidal inputs of 90 %, 50 %, 10 %, 100 % and
// 3 % of full scale (2015.5), quantized to 8-bit codes like the encoder's output. For
// each test frequency 576 samples (24 ms at 24 kHz) are filtered; after 96 samples of
// settling the output levels are correlated with sine and cosine at the test frequency
// to measure the gain. The gain is compared with the ideal sixth-order response
// computed from the coefficients (two identical third-order sections):
//   * pass band 300..3000 Hz: within 0.25 dB of the ideal response (0.5 dB at 10 % and
//     3 %, where the coarse low-level quantization dominates);
//   * 3400 Hz band edge: within 1 dB of the ideal response;
//   * stop band 6, 8 and 10 kHz: at least 20 dB below the input.
// The 0.25 dB figure is this testbench's tolerance for the combined coefficient and
// quantization effects, not a figure of the design specification.
module tb_pcm_filter_response;
  import pcm_ref_pkg::*;

  localparam int   N_SAMP  = 576;   // 480 measured samples: whole periods of every test tone
  localparam int   N_SETTLE = 96;
  localparam real  FS      = 24000.0;
  localparam real  PI2     = 6.283185307179586;
  localparam int   N_FREQ  = 8;
  localparam real  FREQ [N_FREQ] = '{300.0, 1000.0, 2000.0, 3000.0, 3400.0, 6000.0, 8000.0, 10000.0};
  localparam int   N_TONE = 5;
  localparam real  AMPL [N_TONE] = '{0.9 * 2015.5, 0.5 * 2015.5, 0.1 * 2015.5, 2015.5, 0.03 * 2015.5};

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

  // output sample counters and correlation sums per channel
  int  n_out [N_TONE];
  real s_sin [N_TONE], s_cos [N_TONE];
  real f_now;

  function automatic real ideal_gain_db(real f);
    real w, nr, ni, dr, di, h2;
    real a [4] = '{C_A[0], C_A[1], C_A[2], C_A[3]};
    real b [4] = '{1.0, C_B[0], C_B[1], C_B[2]};
    w = PI2 * f / FS;
    nr = 0; ni = 0; dr = 0; di = 0;
    for (int k = 0; k < 4; k++) begin
      nr += a[k] * $cos(w * k); ni -= a[k] * $sin(w * k);
      dr += b[k] * $cos(w * k); di -= b[k] * $sin(w * k);
    end
    h2 = (nr * nr + ni * ni) / (dr * dr + di * di);   // |H| squared of one section
    return 20.0 * $log10(h2);                          // two sections in tandem
  endfunction

  // monitor: correlate settled outputs with the test frequency
  always @(posedge clk) begin
    if (rst_n && out_valid && out_chan < N_TONE) begin
      int  c, n;
      real v;
      c = int'(out_chan);
      n = n_out[c];
      v = real'(out_linear[11:0]) / 2.0;
      if (out_linear[12]) v = -v;
      if (n >= N_SETTLE) begin
        s_sin[c] += v * $sin(PI2 * f_now * n / FS);
        s_cos[c] += v * $cos(PI2 * f_now * n / FS);
      end
      n_out[c] = n + 1;
    end
  end

  task automatic send(int ch, logic [7:0] code);
    @(negedge clk);
    in_valid = 1; in_chan = 5'(ch); in_code = code;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  initial begin
    rcode_t c;
    bit     cl;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int fi = 0; fi < N_FREQ; fi++) begin
      f_now = FREQ[fi];
      for (int ch = 0; ch < N_TONE; ch++) begin n_out[ch] = 0; s_sin[ch] = 0.0; s_cos[ch] = 0.0; end
      for (int n = 0; n < N_SAMP; n++)
        for (int ch = 0; ch < N_TONE; ch++) begin
          c = rquant(int'($floor(AMPL[ch] * $sin(PI2 * f_now * n / FS) + 0.5)), 1'b0, cl);
          send(ch, rcode8(c));
        end
      repeat (40) @(posedge clk);
      for (int ch = 0; ch < N_TONE; ch++) begin
        real amp, g, ideal, tol;
        bit  ok;
        amp   = 2.0 * $sqrt(s_sin[ch] ** 2 + s_cos[ch] ** 2) / real'(N_SAMP - N_SETTLE);
        g     = 20.0 * $log10(amp / AMPL[ch] + 1.0e-9);
        ideal = ideal_gain_db(f_now);
        checks++;
        if (f_now <= 3000.0) begin
          tol = (AMPL[ch] < 0.2 * 2015.5) ? 0.5 : 0.25;
          ok  = (g - ideal <= tol) && (ideal - g <= tol);
        end else if (f_now <= 3400.0) begin
          ok  = (g - ideal <= 1.0) && (ideal - g <= 1.0);
        end else begin
          ok  = (g <= -20.0);
        end
        if (n_out[ch] != N_SAMP) ok = 0;
        if (!ok) failures++;
        $display("%s f=%6.0f Hz amplitude %2.0f%%: gain %8.3f dB, ideal %8.3f dB",
                 ok ? "ok  " : "FAIL", f_now, 100.0 * AMPL[ch] / 2015.5, g, ideal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_FREQ * N_SAMP * N_TONE * 40 + 5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
