// tb_qpsk_demapper: self-checking test of the QPSK demapper.
//
// Three symbols of 1536 random QPSK values (including exact zeros) are fed
// on consecutive clocks.  For each, the 3072 output bits must be: bit n =
// (re_n < 0) in the same clock as input n, then bit 1536 + n = (im_n < 0) on
// the 1536 clocks that immediately follow, with out_first on bit 0 and
// out_frame_first only for the first symbol.  Finally, a symbol sent while
// the imaginary bits are still leaving must raise `collision`.
module tb_qpsk_demapper;
  localparam int W = 33, K = 1536;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_first = 0, in_frame_first = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid, out_bit, out_first, out_frame_first, collision;

  qpsk_demapper dut (.*);

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

  bit exp_bits [$];
  bit exp_first [$];
  bit exp_ff [$];

  // every clock from the first real bit of a symbol to its last imaginary
  // bit must carry a bit
  always @(negedge clk) if (rst_n && exp_bits.size() > 0 && exp_bits.size() <= K) begin
    check(out_valid, "imaginary bits on consecutive clocks");
  end
  bit mon_on = 1;
  int nbits = 0;
  always @(negedge clk) if (rst_n && mon_on && out_valid) begin
    bit eb, ef, eff;
    if (exp_bits.size() == 0) check(0, "unexpected bit");
    else begin
      eb = exp_bits.pop_front(); ef = exp_first.pop_front(); eff = exp_ff.pop_front();
      check(out_bit == eb, $sformatf("bit %0d", nbits));
      check(out_first == ef && out_frame_first == eff, $sformatf("flags at bit %0d", nbits));
    end
    nbits++;
  end

  task automatic send_symbol(input bit ff);
    int re [K], im [K], r;
    bit imb [K];
    for (int n = 0; n < K; n++) begin
      r = $urandom_range(0, 20); re[n] = (r == 0) ? 0 : r - 10;
      r = $urandom_range(0, 20); im[n] = (r == 0) ? 0 : r - 10;
      re[n] *= 1000; im[n] *= 1000;
      imb[n] = im[n] < 0;
    end
    for (int n = 0; n < K; n++) begin
      @(posedge clk);
      in_valid <= 1; in_first <= (n == 0); in_frame_first <= ff && (n == 0);
      in_re <= W'(re[n]); in_im <= W'(im[n]);
      exp_bits.push_back(re[n] < 0); exp_first.push_back(n == 0); exp_ff.push_back(ff && n == 0);
    end
    for (int n = 0; n < K; n++) begin
      exp_bits.push_back(imb[n]); exp_first.push_back(0); exp_ff.push_back(0);
    end
    @(posedge clk);
    in_valid <= 0; in_first <= 0;
    repeat (K + 20) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_symbol(1);
    send_symbol(0);
    send_symbol(0);
    check(nbits == 3 * 2 * K, $sformatf("%0d bits", nbits));
    check(exp_bits.size() == 0, "all bits seen");
    check(!collision, "no collision in normal use");
    mon_on = 0;
    for (int n = 0; n < K + 10; n++) begin
      @(posedge clk);
      in_valid <= 1; in_first <= (n == 0); in_re <= '0; in_im <= '0;
    end
    @(posedge clk);
    in_valid <= 0;
    @(posedge clk);
    check(collision, "collision flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
