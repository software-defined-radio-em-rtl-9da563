// tb_diff_demod: self-checking test of the differential demodulator.
//
// Feeds symbols of 2048 random bins in natural order, as the FFT delivers
// them: frame A = PRS + 3 data symbols, frame B = PRS + 2 data symbols.
// For every data symbol the 1536 outputs must equal, in bin order over bins
// 256..1023 and 1025..1792, Z_l * conj(Z_{l-1}) computed here with integer
// arithmetic, where Z_{l-1} is the previous symbol of the same frame (the
// PRS for the first one).  Also checked: no output for a PRS, 1536
// consecutive outputs per symbol, out_first / out_frame_first, a fixed
// delay from bin 256 to the first product, and no FIFO overflow.
module tb_diff_demod;
  localparam int W = 16, N = 2048, K = 1536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_prs = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_first, out_frame_first, a_overflow;
  logic signed [2*W:0] out_re, out_im;

  diff_demod dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int prev_re [N], prev_im [N], cur_re [N], cur_im [N];
  longint exp_re [$], exp_im [$];
  bit     exp_first [$], exp_fframe [$];
  int     cycle = 0, t_bin256 = -1, t_first_out = -1, outs = 0, runlen = 0, max_run = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      longint er, ei;
      bit ef, eff;
      if (t_first_out < 0) t_first_out = cycle;
      outs++;
      runlen++;
      if (runlen > max_run) max_run = runlen;
      if (exp_re.size() == 0) check(0, "unexpected output");
      else begin
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        ef = exp_first.pop_front(); eff = exp_fframe.pop_front();
        check(out_re == er && out_im == ei,
              $sformatf("product %0d: got %0d,%0d want %0d,%0d", outs, out_re, out_im, er, ei));
        check(out_first == ef && out_frame_first == eff, $sformatf("flags at output %0d", outs));
      end
    end else runlen = 0;
  end

  task automatic send_symbol(input bit prs, input bit first_data);
    int r, i;
    for (int b = 0; b < N; b++) begin
      r = $urandom_range(0, 16000); i = $urandom_range(0, 16000);
      cur_re[b] = r - 8000; cur_im[b] = i - 8000;
    end
    if (!prs) begin
      int n = 0;
      for (int b = 0; b < N; b++) begin
        if (b >= 256 && b <= 1792 && b != 1024) begin
          longint a = cur_re[b], bb = cur_im[b], c = prev_re[b], d = prev_im[b];
          exp_re.push_back(a * c + bb * d);
          exp_im.push_back(bb * c - a * d);
          exp_first.push_back(n == 0);
          exp_fframe.push_back(n == 0 && first_data);
          n++;
        end
      end
    end
    for (int b = 0; b < N; b++) begin
      in_valid <= 1; in_prs <= prs; in_re <= cur_re[b][W-1:0]; in_im <= cur_im[b][W-1:0];
      @(posedge clk);
      if (b == 256 && t_bin256 < 0 && !prs) t_bin256 = cycle - 1;
      prev_re[b] = cur_re[b]; prev_im[b] = cur_im[b];
    end
    in_valid <= 0;
    repeat (50) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // frame A
    send_symbol(1, 0);
    send_symbol(0, 1);
    send_symbol(0, 0);
    send_symbol(0, 0);
    // frame B
    send_symbol(1, 0);
    send_symbol(0, 1);
    send_symbol(0, 0);
    repeat (20) @(posedge clk);
    check(outs == 5 * K, $sformatf("%0d outputs, want %0d", outs, 5 * K));
    check(exp_re.size() == 0, "all expected products seen");
    check(max_run == K, $sformatf("longest output burst %0d", max_run));
    check(t_first_out - t_bin256 == 7, $sformatf("latency %0d clocks", t_first_out - t_bin256));
    check(!a_overflow, "carrier FIFO never overflows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
