// tb_dab_rx_top: end-to-end test of the DAB mode I demodulator at its
// default sizes.
//
// A transmitter model (dab_signal_gen.svh) builds one frame: Null symbol,
// phase reference symbol and 10 data symbols of random bits (30728 samples,
// 30720 bits), which fills the 32768-sample source memory; the expected
// bits go into the reference memory.  The source replays the frame
// cyclically at 8 clocks per sample.
//   Phase 1: two frames are demodulated; every output bit is compared here
//            with the transmitted bits, and the on-chip counter must report
//            61440 bits and no error.
//   Phase 2: replay is stopped, 7 reference bits are flipped, the counters
//            are cleared and one more frame is run: the on-chip counter must
//            report exactly 7 errors.
//   Phase 3: 7 more frames are replayed.  The coarse frame detector, silent
//            until its first 196608-sample window has set a threshold,
//            must then flag each later Null symbol once, 0..150 samples
//            after it ends, with a threshold below the mean envelope.
//   Phases 1-3 run with no frequency correction, and the cyclic-prefix
//   frequency estimator must report an offset within 0.004 carrier spacings
//   of zero for every symbol.
//   Phase 4: one frame with a correction of +0.1 carrier spacing; the
//            estimator, which sees the corrected signal, must report -0.1
//            (within 0.004) for each of its 11 symbols.
//   Phase 5: the stored frame is turned by a carrier offset of 4 * 2048 /
//            30728 = 0.2666 spacings (4 whole turns per frame, so the
//            replay has no phase jump).  One frame runs uncorrected and its
//            estimates must be within 0.004 of that offset; their mean,
//            set as `freq_corr`, must be within 0.001, and two more frames
//            must then give no bit error, on the monitor or the on-chip
//            counter.
// Also checked: the spacing of data symbols at the output (one every
// T_S * 8 = 20416 clocks), no buffer flag raised, and that every mechanism
// occurred: FFT transforms, PRS restart of the differential demodulator
// once per frame, symbols of 3072 bits (unused carriers dropped, imaginary
// bits replayed from their FIFO), counted errors, frame detections and
// frequency estimates.  Bit-exact output also
// shows that the Null symbol and cyclic prefixes were skipped and the
// deinterleaving order is right.
module tb_dab_rx_top;
  import dab_pkg::*;
  `include "dab_signal_gen.svh"

  localparam int NDATA   = 10;
  localparam int NBITS   = NDATA * 2 * GEN_K;
  localparam int NFLIP   = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              src_ld_we = 0, run = 0, ref_ld_we = 0, ref_ld_bit = 0, err_clr = 0;
  logic [14:0]       src_ld_addr = '0, ref_ld_addr = '0;
  cplx16_t           src_ld_data = '0;
  logic [15:0]       src_len = '0, ref_len = '0;
  logic signed [15:0] freq_corr = '0;
  logic              bit_valid, bit_out, bit_first, bit_frame_first;
  logic [31:0]       bit_count, err_count;
  logic              fft_busy, sync_overflow, carrier_overflow, deint_overrun, demap_collision;
  logic              frame_env_valid, frame_thr_valid, frame_det;
  logic [16:0]       frame_env, frame_thr;
  logic              freq_est_valid;
  logic signed [15:0] freq_delta, freq_delta_avg;

  dab_rx_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // -------------------------------------------------------- bit monitor
  int  exp_ptr = 0, bit_errors = 0, bits_seen = 0, loop_errs = 0;
  int  sym_starts = 0, last_start = -1, bad_spacing = 0;
  bit  monitor_on = 0;
  always @(posedge clk) if (monitor_on && bit_valid) begin
    int p;
    p = bit_frame_first ? 0 : exp_ptr;
    if (bit_out !== gen_bits[p]) bit_errors++;
    bits_seen++;
    exp_ptr <= (p + 1) % NBITS;
    if (bit_first) begin
      if (last_start >= 0 && !bit_frame_first && cycle - last_start != 2552 * 8)
        bad_spacing++;
      last_start <= cycle;
      sym_starts++;
    end
  end

  // -------------------------------------------------------- mechanism counters
  // Seen from the ports only: FFT runs (fft_busy pulses), frame restarts of
  // the differential demodulator (bit_frame_first), data symbols of exactly
  // 3072 bits (512 unused bins dropped; 1536 real bits then 1536 bits from
  // the imaginary-bit FIFO) and error-count increments.
  int n_fft = 0, n_restart = 0, n_sym_ok = 0, n_sym_bad = 0, n_err = 0, run_bits = 0;
  logic busy_d = 0;
  logic [31:0] err_d = 0;
  always @(posedge clk) if (rst_n) begin
    busy_d <= fft_busy;
    err_d  <= err_count;
    if (fft_busy && !busy_d) n_fft++;
    if (bit_valid && bit_frame_first) n_restart++;
    if (err_count == err_d + 1) n_err++;
    if (bit_valid) begin
      if (bit_first) begin
        if (run_bits == 2 * GEN_K) n_sym_ok++; else if (run_bits != 0) n_sym_bad++;
        run_bits = 1;
      end else run_bits++;
    end
  end

  // coarse frame detections, located within the replayed frame by the time
  // since `run` rose (the source restarts at sample 0, one sample per
  // CLK_PER_SAMPLE clocks)
  localparam int FRAME_LEN = GEN_NULL + (NDATA + 1) * (GEN_N + GEN_CP);
  int  n_freq = 0, n_freq_bad = 0, n_corr = 0, n_loop_a = 0, n_loop_b = 0;
  int  corr_phase = 0;
  longint loop_sum = 0;
  // phase 5: a carrier offset of 4 turns per replayed frame (no phase jump
  // where the replay wraps), 4 * 2048 / 30728 spacings in 2^-16 units
  localparam int LOOP_OFF = 17472;
  int  n_det = 0, n_det_bad = 0, t_run = 0, last_det_frame = -1;
  longint env_sum = 0, env_n = 0;
  int  mean_env = 0;
  always @(posedge clk) begin
    if (rst_n && frame_det) begin
      int pos;
      pos = ((cycle - t_run) / int'(CLK_PER_SAMPLE)) % FRAME_LEN - int'(T_NULL);
      n_det++;
      // at most one detection per replayed frame
      if ((cycle - t_run) / int'(CLK_PER_SAMPLE) / FRAME_LEN == last_det_frame) n_det_bad++;
      last_det_frame = (cycle - t_run) / int'(CLK_PER_SAMPLE) / FRAME_LEN;
      if (pos < 0 || pos > 150) begin
        n_det_bad++;
        $display("frame detection %0d samples after the Null symbol", pos);
      end
    end
    if (rst_n && freq_est_valid) begin
      n_freq++;
      // the test signal has no frequency offset
      if (corr_phase == 0) begin
        if (freq_delta > 16'sd262 || freq_delta < -16'sd262 ||
            freq_delta_avg > 16'sd262 || freq_delta_avg < -16'sd262) n_freq_bad++;
      end else if (corr_phase == 2) begin
        // offset in the signal, no correction yet
        n_loop_a++;
        loop_sum += longint'(freq_delta);
        if (int'(freq_delta) > LOOP_OFF + 262 || int'(freq_delta) < LOOP_OFF - 262) n_freq_bad++;
      end else if (corr_phase == 3) begin
        // corrected by the measured offset: nothing left
        n_loop_b++;
        if (freq_delta > 16'sd262 || freq_delta < -16'sd262) n_freq_bad++;
      end else begin
        // a correction of +0.1 spacing leaves -0.1 in the signal
        n_corr++;
        if (freq_delta > -16'sd6554 + 16'sd262 || freq_delta < -16'sd6554 - 16'sd262) n_freq_bad++;
      end
    end
    if (rst_n && frame_env_valid) begin
      env_sum += longint'(frame_env); env_n++;
      mean_env = int'(env_sum / env_n);
    end
  end

  task automatic load_memories();
    for (int a = 0; a < gen_re.size(); a++) begin
      src_ld_we <= 1; src_ld_addr <= 15'(a);
      src_ld_data <= '{re: 16'(gen_re[a]), im: 16'(gen_im[a])};
      @(posedge clk);
    end
    src_ld_we <= 0;
    for (int a = 0; a < NBITS; a++) begin
      ref_ld_we <= 1; ref_ld_addr <= 15'(a); ref_ld_bit <= gen_bits[a];
      @(posedge clk);
    end
    ref_ld_we <= 0;
    src_len <= 16'(gen_re.size());
    ref_len <= 16'(NBITS);
    @(posedge clk);
  endtask

  initial begin
    int flip_at [NFLIP];
    gen_init();
    gen_frame(NDATA);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_memories();
    err_clr <= 1; @(posedge clk); err_clr <= 0;
    // ---------------- phase 1
    monitor_on = 1;
    run <= 1;
    while (bit_count < 32'(2 * NBITS)) @(posedge clk);
    run <= 0;
    repeat (10) @(posedge clk);
    check(bits_seen == 2 * NBITS, $sformatf("bits out %0d", bits_seen));
    check(bit_errors == 0, $sformatf("%0d bits differ from the transmitted ones", bit_errors));
    check(bit_count == 32'(2 * NBITS), "on-chip bit count");
    check(err_count == 0, $sformatf("on-chip error count %0d", err_count));
    check(sym_starts == 2 * NDATA, $sformatf("%0d data symbols", sym_starts));
    check(bad_spacing == 0, "one data symbol per 20416 clocks");
    // ---------------- phase 2: corrupt the reference
    for (int i = 0; i < NFLIP; i++) begin
      flip_at[i] = 1000 + i * 4099;
      ref_ld_we <= 1; ref_ld_addr <= 15'(flip_at[i]); ref_ld_bit <= !gen_bits[flip_at[i]];
      @(posedge clk);
    end
    ref_ld_we <= 0;
    err_clr <= 1; @(posedge clk); err_clr <= 0;
    repeat (2) @(posedge clk);
    check(bit_count == 0 && err_count == 0, "counters cleared");
    run <= 1;
    while (bit_count < 32'(NBITS)) @(posedge clk);
    run <= 0;
    repeat (10) @(posedge clk);
    check(err_count == 32'(NFLIP), $sformatf("injected %0d errors, counted %0d", NFLIP, err_count));
    check(bit_errors == 0, "output still equal to the transmitted bits");
    // ---------------- status and mechanisms
    check(!sync_overflow && !carrier_overflow && !deint_overrun && !demap_collision, "no buffer flag");
    check(n_fft == 33,      $sformatf("%0d FFTs for 3 frames of 11 symbols", n_fft));
    check(n_restart == 3,   $sformatf("frame restarts %0d", n_restart));
    check(n_sym_ok >= 29 && n_sym_bad == 0, $sformatf("symbols of 3072 bits: %0d, others %0d", n_sym_ok, n_sym_bad));
    check(n_err == NFLIP,   $sformatf("error events %0d", n_err));
    check(n_det == 0 && !frame_thr_valid, "no frame detection before the first window ends");
    // ---------------- phase 3: coarse frame detection
    // Replay 7 more frames.  The detector's first 196608-sample window
    // closes during them; every later Null symbol must then be detected
    // once, 0..150 samples after it ends (inside the PRS cyclic prefix).
    t_run = cycle;
    run <= 1;
    repeat (7 * FRAME_LEN * CLK_PER_SAMPLE) @(posedge clk);
    run <= 0;
    repeat (10) @(posedge clk);
    check(frame_thr_valid, "detector threshold set");
    check(frame_thr > 0 && frame_thr < 17'(mean_env), $sformatf("threshold %0d between 0 and the mean envelope %0d", frame_thr, mean_env));
    check(n_det >= 2, $sformatf("%0d frame detections", n_det));
    check(n_det_bad == 0, $sformatf("%0d detections outside the PRS prefix or repeated", n_det_bad));
    check(bit_errors == 0, "output equal to the transmitted bits after the third run");
    check(n_det > 0, "coarse frame detection happened");
    check(n_freq >= 7 * (NDATA + 1), $sformatf("%0d frequency estimates", n_freq));
    // ---------------- phase 4: frequency correction of +0.1 carrier spacing
    repeat (3000) @(posedge clk);       // let the last estimates out
    corr_phase = 1;
    freq_corr <= 16'sd6554;
    t_run = cycle;
    run <= 1;
    repeat (FRAME_LEN * CLK_PER_SAMPLE) @(posedge clk);
    run <= 0;
    repeat (10) @(posedge clk);
    check(n_corr == NDATA + 1, $sformatf("%0d estimates with the correction applied", n_corr));
    // ---------------- phase 5: closing the frequency loop
    // The stored frame is turned by the offset above.  One frame is run
    // uncorrected and the estimates are averaged; that average is then set
    // as the correction and two more frames must come out without a bit
    // error.
    repeat (40000) @(posedge clk);      // let phase 4 drain
    for (int a = 0; a < gen_re.size(); a++) begin
      real ph, re, im;
      ph = 2.0 * 3.141592653589793 * 4.0 * real'(a) / real'(gen_re.size());
      re = real'(gen_re[a]) * $cos(ph) - real'(gen_im[a]) * $sin(ph);
      im = real'(gen_re[a]) * $sin(ph) + real'(gen_im[a]) * $cos(ph);
      gen_re[a] = gen_clip(re);
      gen_im[a] = gen_clip(im);
    end
    load_memories();
    corr_phase = 2;
    freq_corr <= '0;
    last_det_frame = -1;
    t_run = cycle;
    run <= 1;
    repeat (FRAME_LEN * CLK_PER_SAMPLE) @(posedge clk);
    run <= 0;
    repeat (40000) @(posedge clk);      // let the uncorrected symbols drain
    check(n_loop_a == NDATA + 1, $sformatf("%0d estimates of the uncorrected offset", n_loop_a));
    corr_phase = 3;
    freq_corr <= 16'(loop_sum / longint'(n_loop_a > 0 ? n_loop_a : 1));
    err_clr <= 1; @(posedge clk); err_clr <= 0;
    repeat (2) @(posedge clk);
    loop_errs = bit_errors;
    last_det_frame = -1;
    t_run = cycle;
    run <= 1;
    while (bit_count < 32'(2 * NBITS)) @(posedge clk);
    run <= 0;
    repeat (10) @(posedge clk);
    $display("offset %0d, measured and applied %0d (units of 2^-16 spacing)", LOOP_OFF, freq_corr);
    check(int'(freq_corr) >= LOOP_OFF - 66 && int'(freq_corr) <= LOOP_OFF + 66, "averaged estimate within 0.001 spacing");
    check(bit_errors == loop_errs, $sformatf("%0d bit errors with the measured correction", bit_errors - loop_errs));
    check(err_count == 0, $sformatf("on-chip error count %0d with the measured correction", err_count));
    check(n_loop_b >= 2 * (NDATA + 1), $sformatf("%0d estimates after the correction", n_loop_b));
    check(n_freq_bad == 0, $sformatf("%0d frequency estimates off by more than 0.004", n_freq_bad));
    $display("mechanisms: fft=%0d frame_restarts=%0d full_symbols=%0d counted_errors=%0d frame_detections=%0d freq_estimates=%0d corrected_estimates=%0d loop_estimates=%0d+%0d",
             n_fft, n_restart, n_sym_ok, n_err, n_det, n_freq, n_corr, n_loop_a, n_loop_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
