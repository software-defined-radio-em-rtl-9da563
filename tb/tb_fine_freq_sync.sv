// tb_fine_freq_sync: self-checking test of the cyclic-prefix frequency
// offset estimator at its default sizes.
//
// Four frames are sent, one sample per clock.  Each frame is a Null symbol
// (2656 zero samples) and 6 OFDM-like symbols: 2048 random complex samples
// in [-3000, 3000], preceded by a copy of their last 504 samples.  The whole
// frame is then turned by exp(j 2 pi delta n / 2048), n being the sample
// number, i.e. shifted by delta carrier spacings; delta is 0.2, -0.35, 0.45
// and 0 in the four frames.
// Checked, for every symbol: one estimate, `delta` within 0.004 carrier
// spacings of the true offset, `delta_avg` equal to the running
// average avg + floor((delta - avg) / 8) computed here, and `est_valid` set
// exactly 21 clocks (18 CORDIC steps + 3) after the last correlated sample.
module tb_fine_freq_sync;
  import dab_pkg::*;
  localparam int NSYM = 6;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid = 0, in_sof = 0;
  cplx16_t in_data = '0;
  logic    est_valid;
  logic signed [15:0] delta, delta_avg;

  fine_freq_sync dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (4 * (T_NULL + NSYM * T_SYM) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected values and the estimates seen
  real cur_delta = 0.0;
  int  t_last = -1, n_est = 0;
  real avg_model = 0.0;  // integer-valued
  always @(posedge clk) if (rst_n && est_valid) begin
    real err, d;
    n_est++;
    d   = real'(delta) / 65536.0;
    err = d - cur_delta;
    check(err < 0.004 && err > -0.004, $sformatf("estimate %f, offset %f", d, cur_delta));
    // running average with the step rounded down (arithmetic shift)
    avg_model = avg_model + $floor((real'(delta) - avg_model) / 8.0);
    check(real'(delta_avg) == avg_model, $sformatf("average %0d, model %f", delta_avg, avg_model));
    // est_valid is set on the 21st edge after the one that takes the last
    // sample; this process sees it one edge later
    check(cycle - t_last == 22, $sformatf("estimate %0d clocks after the last sample", cycle - t_last));
  end

  task automatic send(input real re, input real im, input bit sof, input int n, input real dl);
    real c, s, yr, yi;
    int  ir, ii;
    c  = $cos(2.0 * PI * dl * real'(n) / 2048.0);
    s  = $sin(2.0 * PI * dl * real'(n) / 2048.0);
    yr = re * c - im * s;
    yi = re * s + im * c;
    ir = $rtoi(yr >= 0.0 ? yr + 0.5 : yr - 0.5);
    ii = $rtoi(yi >= 0.0 ? yi + 0.5 : yi - 0.5);
    in_valid <= 1; in_sof <= sof;
    in_data  <= '{re: 16'(ir), im: 16'(ii)};
    @(posedge clk);
  endtask

  initial begin
    real dl_tab [4];
    real ur [2048], ui [2048];
    int  n, r;
    dl_tab = '{0.2, -0.35, 0.45, 0.0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      n = 0;
      cur_delta = dl_tab[f];
      for (int t = 0; t < int'(T_NULL); t++) begin send(0.0, 0.0, t == 0, n, dl_tab[f]); n++; end
      for (int sy = 0; sy < NSYM; sy++) begin
        int n_est0;
        n_est0 = n_est;
        for (int k = 0; k < 2048; k++) begin
          r = $urandom_range(0, 6000); ur[k] = real'(r - 3000);
          r = $urandom_range(0, 6000); ui[k] = real'(r - 3000);
        end
        for (int k = 0; k < int'(T_CP); k++) begin send(ur[2048 - T_CP + k], ui[2048 - T_CP + k], 0, n, dl_tab[f]); n++; end
        for (int k = 0; k < 2048; k++) begin
          send(ur[k], ui[k], 0, n, dl_tab[f]); n++;
          if (k == 380 + 2048 - int'(T_CP)) t_last = cycle;
        end
        if (sy > 0) check(n_est == n_est0 + 1, "one estimate per symbol");
      end
    end
    in_valid <= 0;
    repeat (40) @(posedge clk);
    check(n_est == 4 * NSYM, $sformatf("%0d estimates", n_est));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
