// tb_freq_deinterleaver: self-checking test of the frequency deinterleaver.
//
// Two symbols of 1536 carriers with known values (carrier c of symbol s
// holds re = 1000*s + c, im = -c) are written on consecutive clocks.  Output
// n must be carrier PI_n, where PI_n is the mode I sequence computed here
// from the standard's rule PI(i) = (13 PI(i-1) + 511) mod 2048, keeping
// 256..1792 except 1024 (it must start 255, 754, 1096 and end with 964).
// Timing: the first output follows the first input by 1538 clocks, the last
// one by 3073 (3074 clocks per symbol), outputs are consecutive.  Finally,
// writing during the read phase must raise `overrun`.
module tb_freq_deinterleaver;
  localparam int W = 33, K = 1536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_first = 0, in_frame_first = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_first, out_frame_first, overrun;
  logic signed [W-1:0] out_re, out_im;

  freq_deinterleaver dut (.*);

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

  int seq [K];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_out = 0, sym = 0, t_in0 = 0, t_out0 = 0, t_outl = 0;
  bit mon_on = 1;
  always @(posedge clk) if (rst_n && out_valid && mon_on) begin
    int n, s;
    n = n_out % K;
    s = n_out / K;
    if (n == 0) t_out0 = cycle;
    if (n == K - 1) t_outl = cycle;
    check(out_re == W'(1000 * s + seq[n]) && out_im == W'(-seq[n]),
          $sformatf("symbol %0d output %0d: got %0d want %0d", s, n, out_re, 1000 * s + seq[n]));
    check(out_first == (n == 0), "out_first");
    check(out_frame_first == (n == 0 && s == 0), "out_frame_first");
    n_out++;
  end

  initial begin
    int p, m;
    p = 0; m = 0;
    for (int i = 0; i < 2048; i++) begin
      if (i > 0) p = (13 * p + 511) % 2048;
      if (p >= 256 && p <= 1792 && p != 1024) begin
        seq[m] = (p < 1024) ? p - 256 : p - 257;
        m++;
      end
    end
    check(seq[0] == 255 && seq[1] == 754 && seq[2] == 1096 && seq[K-1] == 964, "reference sequence");
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < K; c++) begin
        in_valid <= 1; in_first <= (c == 0); in_frame_first <= (c == 0 && s == 0);
        in_re <= W'(1000 * s + c); in_im <= W'(-c);
        @(posedge clk);
        if (c == 0) t_in0 = cycle;
      end
      in_valid <= 0; in_first <= 0;
      repeat (K + 10) @(posedge clk);
      check(t_out0 - t_in0 == 1538, $sformatf("first-output latency %0d", t_out0 - t_in0));
      check(t_outl - t_in0 == 3073, $sformatf("last output after %0d clocks", t_outl - t_in0));
      check(n_out == (s + 1) * K, $sformatf("%0d outputs", n_out));
    end
    check(!overrun, "no overrun in normal use");
    // overrun: a new symbol while the previous one is still being read
    mon_on = 0;
    for (int c = 0; c < K + 20; c++) begin
      in_valid <= 1; in_first <= (c == 0); in_re <= '0; in_im <= '0;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    check(overrun, "overrun flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
