// tb_ofdm_demod: self-checking test of the OFDM demodulation subsystem.
//
// Runs a 64-point version (prefix 16, Null symbol 20) so the reference DFT
// is cheap.  A frame of a Null symbol and 3 OFDM symbols is sent, one
// sample every 4 clocks; each symbol is a sum of 8 QPSK carriers on random
// bins with a cyclic prefix.  For each symbol the 64 outputs must appear in
// natural bin order on consecutive clocks, with out_prs set only for the
// first symbol, and match the double-precision DFT of the useful part
// divided by 64 within 4 LSBs.  `fft_busy` must last 6 * (32 + 4) clocks per
// symbol and no buffer may overflow.
module tb_ofdm_demod;
  import dab_pkg::*;
  localparam int LG = 6, N = 64, CP = 16, NUL = 20, NSYM = 3, TOL = 4;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sof = 0;
  cplx16_t in_data = '0;
  logic out_valid, out_prs, fft_busy, overflow;
  logic [LG-1:0] out_index;
  cplx16_t out_data;

  ofdm_demod #(.LOG2_N(LG), .TCP(CP), .TNULL(NUL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xr [NSYM][N], xi [NSYM][N];
  real fr [NSYM][N], fi [NSYM][N];
  int  busy_cnt = 0, sym_out = 0, bin_out = 0, busy_runs = 0, bad_busy = 0;
  logic busy_d = 0;

  always @(posedge clk) if (rst_n) begin
    busy_d <= fft_busy;
    if (fft_busy) busy_cnt++;
    if (!fft_busy && busy_d) begin
      busy_runs++;
      if (busy_cnt != LG * (N / 2 + 4)) bad_busy++;
      busy_cnt = 0;
    end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    real er, ei;
    er = fr[sym_out][bin_out]; ei = fi[sym_out][bin_out];
    check(out_index == LG'(bin_out), $sformatf("bin order %0d", bin_out));
    check(out_prs == (sym_out == 0), "PRS flag");
    check($itor(out_data.re) - er < TOL && er - $itor(out_data.re) < TOL &&
          $itor(out_data.im) - ei < TOL && ei - $itor(out_data.im) < TOL,
          $sformatf("symbol %0d bin %0d: got %0d,%0d want %f,%f", sym_out, bin_out,
                    out_data.re, out_data.im, er, ei));
    bin_out++;
    if (bin_out == N) begin bin_out = 0; sym_out++; end
  end

  task automatic send(input int re, input int im, input bit sof);
    in_valid <= 1; in_sof <= sof; in_data <= '{re: 16'(re), im: 16'(im)};
    @(posedge clk);
    in_valid <= 0; in_sof <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    real ar, ai, sr, si;
    int bin, ph;
    for (int s = 0; s < NSYM; s++) begin
      real accr [N], acci [N];
      for (int t = 0; t < N; t++) begin accr[t] = 0; acci[t] = 0; end
      for (int c = 0; c < 8; c++) begin
        bin = $urandom_range(0, N - 1);
        ph  = $urandom_range(0, 3);
        ar = (ph == 0 || ph == 3) ? 1500.0 : -1500.0;
        ai = (ph < 2) ? 1500.0 : -1500.0;
        for (int t = 0; t < N; t++) begin
          accr[t] += ar * $cos(2 * PI * bin * t / N) - ai * $sin(2 * PI * bin * t / N);
          acci[t] += ar * $sin(2 * PI * bin * t / N) + ai * $cos(2 * PI * bin * t / N);
        end
      end
      for (int t = 0; t < N; t++) begin
        xr[s][t] = $rtoi($floor(accr[t] + 0.5));
        xi[s][t] = $rtoi($floor(acci[t] + 0.5));
      end
      for (int k = 0; k < N; k++) begin
        sr = 0; si = 0;
        for (int t = 0; t < N; t++) begin
          sr += xr[s][t] * $cos(2 * PI * k * t / N) + xi[s][t] * $sin(2 * PI * k * t / N);
          si += xi[s][t] * $cos(2 * PI * k * t / N) - xr[s][t] * $sin(2 * PI * k * t / N);
        end
        fr[s][k] = sr / N; fi[s][k] = si / N;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < NUL; t++) send(0, 0, t == 0);
    for (int s = 0; s < NSYM; s++)
      for (int t = 0; t < N + CP; t++) send(xr[s][(t + N - CP) % N], xi[s][(t + N - CP) % N], 0);
    repeat (LG * (N / 2 + 4) + 3 * N + 20) @(posedge clk);
    check(sym_out == NSYM && bin_out == 0, $sformatf("%0d symbols out", sym_out));
    check(busy_runs == NSYM && bad_busy == 0, "FFT compute time per symbol");
    check(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
