// tb_parallel_dds - end-to-end test of the parallel DDS at its default
// configuration (4 lanes, 10-bit phase, 10-bit samples, sine table).
//
// The reference is a classic one-sample-per-clock DDS modelled here: a
// phase accumulator that adds the tuning word once per output sample,
// followed by round(511*sin(2*pi*phase/1024)) in real arithmetic.  Each
// clock the test drives a tuning word k; the frame built from it must
// appear on sample_o exactly two clocks later and equal the next four
// samples of the reference stream.  The run covers: constant k with many
// accumulator wraps, k = 0 (phase held, constant output), the largest word below
// Nyquist (511) and at Nyquist (512), random changes of k every few
// clocks (phase must stay continuous), and a reset in mid-run.  Each of
// those events is counted, and an event that never happened counts as a
// failure.  It also checks that a 4-lane frame leaves every clock (four
// samples per clock) and the frequency relation F = 4*k*f_clk/1024 by
// counting rising zero crossings of the serialised output.
module tb_parallel_dds;
  localparam int unsigned LANES = 4;
  localparam int unsigned PHASE_W = 10;
  localparam int unsigned AMP_W = 10;
  localparam int unsigned MOD = 2 ** PHASE_W;
  localparam int unsigned LATENCY = 2;
  localparam real TWO_PI = 6.28318530717958647692;
  localparam int unsigned NFRAMES = 6000;

  logic                    clk = 1'b0;
  logic                    rst;
  logic [PHASE_W-1:0]      k;
  logic signed [AMP_W-1:0] sample [LANES];
  logic                    wrap;

  int checks = 0;
  int failures = 0;

  // event counters
  int n_wrap = 0;
  int n_kchange = 0;
  int n_reset = 0;
  int n_dc = 0;
  int n_nyquist = 0;
  int n_frames = 0;

  parallel_dds dut (
    .clk_i(clk), .rst_i(rst), .k_i(k), .sample_o(sample), .wrap_o(wrap)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NFRAMES + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sample(int unsigned phase);
    return $rtoi($floor(511.0 * $sin(TWO_PI * (phase % MOD) / MOD) + 0.5));
  endfunction

  // Expected frames, indexed by the clock in which their k was applied.
  int expf [NFRAMES/2][LANES];
  int unsigned ref_phase;  // reference DDS phase, one step per sample

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Tuning word for clock n of a segment.
  function automatic int unsigned pick_k(int n);
    if (n < 500)       return 5;          // slow sine, many frames per period
    else if (n < 1000) return 100;        // frequent wraps
    else if (n < 1100) return 0;          // DC
    else if (n < 1200) return 511;        // just below Nyquist
    else if (n < 1250) return 512;        // Nyquist
    else               return 7;
  endfunction

  // Zero-crossing frequency measurement for the k = 100 stretch.
  int zc = 0;
  int prev_s = 0;
  bit measuring = 0;

  initial begin
    int unsigned kk;
    int unsigned prev_k;
    int total_samples;

    rst = 1'b1;
    k   = '0;
    repeat (3) @(posedge clk);
    n_reset++;

    for (int seg = 0; seg < 2; seg++) begin
      // Leave reset: phase restarts at zero.
      @(negedge clk);
      rst = 1'b0;
      ref_phase = 0;
      prev_k = 0;
      for (int n = 0; n < NFRAMES / 2; n++) begin
        kk = (seg == 1 && n >= 200) ? ((n % 5 == 0) ? $urandom_range(MOD - 1) : prev_k)
                                    : pick_k(n);
        if (kk != prev_k && n > 0) n_kchange++;
        if (kk == 0) n_dc++;
        if (kk == MOD / 2) n_nyquist++;
        prev_k = kk;
        k = PHASE_W'(kk);
        for (int i = 0; i < LANES; i++) expf[n][i] = ref_sample(ref_phase + i * kk);
        ref_phase = (ref_phase + LANES * kk) % MOD;
        #1;
        if (wrap) n_wrap++;
        @(posedge clk);
        @(negedge clk);
        // The frame of clock n - LATENCY + 1 is on the outputs now.
        if (n >= LATENCY - 1) begin
          n_frames++;
          for (int i = 0; i < LANES; i++)
            check(int'(sample[i]) == expf[n - LATENCY + 1][i], $sformatf("lane %0d sample", i));
          if (seg == 0 && kk == 0 && n > 1003 && n < 1100)
            for (int i = 0; i < LANES; i++) check(sample[i] == sample[0], "constant output for k = 0");
          // Serialised stream: rising zero crossings while k = 100.
          if (seg == 0 && n >= 600 && n < 1000) begin
            for (int i = 0; i < LANES; i++) begin
              if (measuring && prev_s < 0 && int'(sample[i]) >= 0) zc++;
              prev_s = int'(sample[i]);
              measuring = 1;
            end
          end
        end
      end
      // Mid-run reset between the two segments.
      if (seg == 0) begin
        @(negedge clk);
        rst = 1'b1;
        #1 check(wrap == 1'b0, "no wrap during reset");
        repeat (2) @(posedge clk);
        n_reset++;
      end
    end

    // 400 clocks * 4 samples at k = 100: 1600*100/1024 = 156.25 periods.
    check(zc >= 155 && zc <= 157, "frequency F = 4*k*fclk/1024");
    total_samples = n_frames * LANES;
    check(n_frames == NFRAMES - 2 * (LATENCY - 1), "one frame per clock");
    $display("frames=%0d samples=%0d wraps=%0d k_changes=%0d resets=%0d dc_clocks=%0d nyquist_clocks=%0d zero_crossings=%0d",
             n_frames, total_samples, n_wrap, n_kchange, n_reset, n_dc, n_nyquist, zc);
    check(n_wrap > 0, "phase wrap happened");
    check(n_kchange > 0, "tuning word change happened");
    check(n_reset > 1, "mid-run reset happened");
    check(n_dc > 0, "k = 0 happened");
    check(n_nyquist > 0, "Nyquist k happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
