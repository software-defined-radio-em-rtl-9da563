// tb_fft_r2_burst: self-checking test of the 2048-point burst radix-2 FFT.
//
// Three transforms are loaded back to back: a complex tone on bin 300, a
// random vector, and a sum of QPSK-modulated carriers like an OFDM symbol.
// Each result is compared with a double-precision DFT divided by N, computed
// here independently of the design, within a few LSBs.  The test also checks
// natural output order (out_index), the tag, and the cycle counts: 1028
// clocks per stage (1024 butterflies plus a 4-clock drain), so `busy` lasts
// 11 * 1028 clocks, and the N outputs leave on consecutive clocks.
module tb_fft_r2_burst;
  localparam int LOG2N = 11;
  localparam int N     = 2**LOG2N;
  localparam int DW    = 16;
  localparam real PI   = 3.141592653589793;
  localparam int TOL   = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_start, in_tag, in_ready, busy, out_valid, out_tag;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  logic [LOG2N-1:0] xn_index, out_index;

  fft_r2_burst #(.LOG2N(LOG2N), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  real xr [N], xi [N], cr [N], sr [N];
  int  xs_r [N], xs_i [N];
  int  busy_cycles;

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_fft(input bit tag);
    real er, ei;
    int  k, tmo;
    // load
    for (int n = 0; n < N; n++) begin xs_r[n] = int'(xr[n]); xs_i[n] = int'(xi[n]); end
    busy_cycles = 0;
    for (int n = 0; n < N; n++) begin
      in_valid <= 1; in_start <= (n == 0); in_tag <= tag;
      in_re <= xs_r[n][DW-1:0]; in_im <= xs_i[n][DW-1:0];
      @(posedge clk);
      check(n == 0 || xn_index == LOG2N'(n), "xn_index follows the load");
    end
    in_valid <= 0; in_start <= 0;
    // wait for the first output
    tmo = 0;
    #1;
    while (!out_valid && tmo < 20000) begin @(posedge clk); #1; tmo++; end
    check(busy_cycles == LOG2N * (N/2 + 4), $sformatf("busy for %0d clocks", busy_cycles));
    for (k = 0; k < N; k++) begin
      check(out_valid, "outputs on consecutive clocks");
      check(out_index == LOG2N'(k), $sformatf("natural output order %0d %0d", out_index, k));
      check(out_tag == tag, "tag returned");
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        int m = (k * n) % N;
        er += xr[n] * cr[m] + xi[n] * sr[m];
        ei += xi[n] * cr[m] - xr[n] * sr[m];
      end
      er /= N; ei /= N;
      check(($itor(out_re) - er) < TOL && (er - $itor(out_re)) < TOL &&
            ($itor(out_im) - ei) < TOL && (ei - $itor(out_im)) < TOL,
            $sformatf("bin %0d: got %0d,%0d want %f,%f", k, out_re, out_im, er, ei));
      @(posedge clk); #1;
    end
    check(!out_valid && in_ready, "back to load after unload");
  endtask

  initial begin
    in_valid = 0; in_start = 0; in_tag = 0; in_re = 0; in_im = 0;
    for (int m = 0; m < N; m++) begin
      cr[m] = $cos(2.0 * PI * m / N);
      sr[m] = $sin(2.0 * PI * m / N);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // 1: tone on bin 300
    for (int n = 0; n < N; n++) begin
      xr[n] = $floor(20000.0 * cr[(300 * n) % N] + 0.5);
      xi[n] = $floor(20000.0 * sr[(300 * n) % N] + 0.5);
    end
    run_fft(1'b1);
    // 2: random samples
    for (int n = 0; n < N; n++) begin
      int ur, ui;
      ur = $urandom_range(0, 20000);
      ui = $urandom_range(0, 20000);
      xr[n] = $itor(ur - 10000);
      xi[n] = $itor(ui - 10000);
    end
    run_fft(1'b0);
    // 3: 64 QPSK carriers
    for (int n = 0; n < N; n++) begin xr[n] = 0; xi[n] = 0; end
    for (int c = 0; c < 64; c++) begin
      int bin = 256 + 23 * c;
      int ph  = $urandom_range(0, 3);
      real ar = (ph == 0 || ph == 3) ? 200.0 : -200.0;
      real ai = (ph < 2) ? 200.0 : -200.0;
      for (int n = 0; n < N; n++) begin
        int m = (bin * n) % N;
        xr[n] += ar * cr[m] - ai * sr[m];
        xi[n] += ar * sr[m] + ai * cr[m];
      end
    end
    for (int n = 0; n < N; n++) begin xr[n] = $floor(xr[n] + 0.5); xi[n] = $floor(xi[n] + 0.5); end
    run_fft(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
