// tb_ofdm_input_sync: self-checking test of the symbol framing buffer.
//
// Runs at reduced sizes (T_U = 16, prefix 4, Null symbol 6) so every phase
// is short.  A frame of a Null symbol and 4 OFDM symbols is sent, one
// sample every 3 clocks, with sample values that encode their position.
// Each burst handed to the FFT must hold exactly the 16 useful samples of
// one symbol, in order, on consecutive clocks, with out_start on the first
// and out_prs only for the first symbol of the frame.  The FFT is held busy
// (fft_ready low) during the second symbol, so that burst must wait and
// then still be complete.  A second frame checks the restart on in_sof, and
// a third one, with fft_ready held low throughout, must raise `overflow`.
module tb_ofdm_input_sync;
  import dab_pkg::*;
  localparam int TU = 16, TCP = 4, TNULL = 6, NSYM = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_sof = 0, fft_ready = 1;
  cplx16_t in_data = '0;
  logic out_valid, out_start, out_prs, overflow;
  cplx16_t out_data;

  ofdm_input_sync #(.TU(TU), .TCP(TCP), .TNULL(TNULL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample value: 1000*frame + 100*symbol + position within the symbol
  // (position counts the prefix too); Null symbol samples are -1
  int frame_no = 0;
  int exp_sym = 0, exp_pos = 0, bursts = 0, prs_bursts = 0;
  bit mon_on = 1, in_burst = 0, waiting = 0;
  int waited_bursts = 0;
  always @(negedge clk) if (rst_n && mon_on) begin
    if (out_valid) begin
      int want;
      if (!in_burst) begin
        check(out_start, "burst begins with out_start");
        in_burst = 1; exp_pos = 0; bursts++;
        check(!waiting, "burst only when the FFT is ready");
        if (out_prs) prs_bursts++;
        check(out_prs == (exp_sym == 0), $sformatf("PRS flag of symbol %0d", exp_sym));
      end else check(!out_start, "single start per burst");
      want = 1000 * frame_no + 100 * exp_sym + TCP + exp_pos;
      check(out_data.re == 16'(want) && out_data.im == 16'(-want),
            $sformatf("symbol %0d sample %0d: got %0d want %0d", exp_sym, exp_pos, out_data.re, want));
      exp_pos++;
    end else if (in_burst) begin
      check(exp_pos == TU, $sformatf("burst of %0d samples", exp_pos));
      in_burst = 0;
      exp_sym = (exp_sym + 1) % NSYM;
    end
  end

  task automatic send_sample(input int v, input bit sof);
    in_valid <= 1; in_sof <= sof; in_data <= '{re: 16'(v), im: 16'(-v)};
    @(posedge clk);
    in_valid <= 0; in_sof <= 0;
    @(posedge clk);
    @(posedge clk);
  endtask

  task automatic send_frame(input int f, input bit hold_ready_sym1);
    for (int t = 0; t < TNULL; t++) send_sample(-1, t == 0);
    for (int s = 0; s < NSYM; s++) begin
      for (int p = 0; p < TCP + TU; p++) begin
        if (hold_ready_sym1 && s == 1 && p == TCP + TU - 2) begin
          fft_ready <= 0;
          waiting = 1;
        end
        if (hold_ready_sym1 && s == 2 && p == 3) begin
          check(!out_valid && !in_burst, "no burst while the FFT is busy");
          fft_ready <= 1;
          waiting = 0;
        end
        send_sample(1000 * f + 100 * s + p, 0);
      end
    end
    fft_ready <= 1;
    repeat (3 * TU) @(posedge clk);
    if (hold_ready_sym1) waited_bursts++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    frame_no = 0; send_frame(0, 1);
    frame_no = 1; send_frame(1, 0);
    check(bursts == 2 * NSYM, $sformatf("%0d bursts", bursts));
    check(prs_bursts == 2, "one PRS per frame");
    check(waited_bursts == 1, "one burst had to wait for the FFT");
    check(!overflow, "no overflow while the FFT keeps up");
    mon_on = 0;
    fft_ready <= 0;
    for (int t = 0; t < TNULL; t++) send_sample(-1, t == 0);
    for (int p = 0; p < 2 * (TCP + TU) + 2; p++) send_sample(p, 0);
    check(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
