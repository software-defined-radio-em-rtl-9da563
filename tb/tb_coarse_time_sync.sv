// tb_coarse_time_sync: self-checking test of the Null-symbol frame detector
// at its default sizes (one-frame window of 196608 samples, I = 8).
//
// The stimulus is 50000 samples of signal followed by 4 frames of 196608
// samples, one sample per clock.  Each frame begins with a Null symbol of
// 2656 samples of weak noise (|re|, |im| <= 20); everything else is random
// in [-2000, 2000] on both components, like an OFDM signal.  A reference
// model in double precision runs alongside: |re| + |im|, the bilinear
// first-order low-pass for 1024 Hz at 2.048 MHz, window minimum and mean,
// threshold min + (mean - min) / 8, and the rising-edge rule.
// Checked:
//   - the envelope stays within 2 of the model (every 16th sample);
//   - each window's threshold is within 2 of the model;
//   - no detection before the first window ends;
//   - after it, exactly one detection per frame, 0..150 samples after the
//     end of the Null symbol (inside the 504-sample cyclic prefix), and within
//     2 samples of the model's detection.
module tb_coarse_time_sync;
  import dab_pkg::*;
  localparam int WIN = 196608, PRE = 50000, NFR = 4, MIN_LOW = T_NULL / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid = 0;
  cplx16_t in_data  = '0;
  logic    out_valid, det, thr_valid;
  logic [SAMPLE_W:0] env, thr;

  coarse_time_sync dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (PRE + NFR * WIN + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // detections seen from the block, as sample indices
  int det_idx[$];
  int n_taken = 0;
  always @(posedge clk) begin
    if (rst_n && det && out_valid) det_idx.push_back(n_taken - 1);
    if (rst_n && in_valid) n_taken++;
  end

  // model state
  real a_c, b_c, y_m, zp_m, wmin_m, wsum_m, thr_m;
  int  wcnt_m, low_m, thr_ok_m;
  int  mdet_idx[$];
  real thr_hist[$];

  initial begin
    int total, pos, r;
    real k, z, env_prev;
    k   = $tan(3.141592653589793 * 1024.0 / 2048000.0);
    b_c = k / (1.0 + k);
    a_c = (1.0 - k) / (1.0 + k);
    y_m = 0; zp_m = 0; wmin_m = 1.0e9; wsum_m = 0; thr_m = 0;
    wcnt_m = 0; low_m = 0; thr_ok_m = 0;
    total = PRE + NFR * WIN;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < total; s++) begin
      int amp;
      pos = s - PRE;
      amp = (pos >= 0 && (pos % WIN) < int'(T_NULL)) ? 20 : 2000;
      r = $urandom_range(0, 2 * amp); in_data.re <= 16'(r - amp);
      z = (r - amp < 0) ? real'(amp - r) : real'(r - amp);
      r = $urandom_range(0, 2 * amp); in_data.im <= 16'(r - amp);
      z = z + ((r - amp < 0) ? real'(amp - r) : real'(r - amp));
      in_valid <= 1;
      // model: statistics and comparator on the envelope before this sample
      env_prev = $floor(y_m);
      if (wcnt_m == WIN - 1) begin
        real mean;
        mean  = (wsum_m) / real'(WIN - 1);
        thr_m = (mean > wmin_m) ? $floor(wmin_m + (mean - wmin_m) / 8.0) : wmin_m;
        thr_hist.push_back(thr_m);
        thr_ok_m = 1;
        wcnt_m = 0; wmin_m = env_prev; wsum_m = env_prev;
      end else begin
        wcnt_m++;
        wsum_m += env_prev;
        if (env_prev < wmin_m) wmin_m = env_prev;
      end
      if (env_prev < thr_m) begin
        if (low_m < MIN_LOW) low_m++;
      end else begin
        if (thr_ok_m != 0 && low_m == MIN_LOW) mdet_idx.push_back(s);
        low_m = 0;
      end
      y_m  = a_c * y_m + b_c * (z + zp_m);
      zp_m = z;
      @(posedge clk);
      @(negedge clk);   // outputs settled for sample s
      if (s % 16 == 0) begin
        real d;
        d = real'(env) - $floor(y_m);
        check(d <= 2.0 && d >= -2.0, $sformatf("envelope %0d vs model %0f at %0d", env, y_m, s));
      end
      if (wcnt_m == 0 && thr_ok_m != 0) begin
        real d;
        d = real'(thr) - thr_m;
        check(d <= 2.0 && d >= -2.0, $sformatf("threshold %0d vs model %0f", thr, thr_m));
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);

    // detections
    check(thr_hist.size() == (total - 1) / WIN, $sformatf("%0d windows closed", thr_hist.size()));
    for (int i = 0; i < det_idx.size(); i++)
      check(det_idx[i] >= WIN - 1, $sformatf("detection at %0d before the first threshold", det_idx[i]));
    for (int f = 0; f < NFR; f++) begin
      int null_end, n;
      null_end = PRE + f * WIN + int'(T_NULL);
      if (null_end < WIN) continue;   // threshold not yet known
      n = 0;
      foreach (det_idx[i]) begin
        if (det_idx[i] >= null_end - 1000 && det_idx[i] < null_end + 1000) begin
          n++;
          check(det_idx[i] >= null_end && det_idx[i] <= null_end + 150,
                $sformatf("frame %0d: detection %0d samples after the Null", f, det_idx[i] - null_end));
          foreach (mdet_idx[j])
            if (mdet_idx[j] >= null_end - 1000 && mdet_idx[j] < null_end + 1000)
              check(det_idx[i] - mdet_idx[j] <= 2 && mdet_idx[j] - det_idx[i] <= 2,
                    $sformatf("frame %0d: detection %0d, model %0d", f, det_idx[i], mdet_idx[j]));
        end
      end
      check(n == 1, $sformatf("frame %0d: %0d detections", f, n));
      check(thr_valid, "threshold valid");
    end
    check(det_idx.size() == NFR - 1, $sformatf("%0d detections in all", det_idx.size()));
    $display("detections at %p (model %p)", det_idx, mdet_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
