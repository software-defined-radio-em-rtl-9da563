// tb_dfe_source: self-checking test of the cyclic I/Q sample source.
//
// 20 samples are loaded, the replay length is set to 13 and `run` is raised
// for 40 samples.  With the default 8 clocks per sample, a sample must
// appear exactly every 8 clocks, the addresses must run 0..12 and wrap, the
// data must match what was loaded and `out_sof` must mark address 0 only.
// Dropping `run` must stop the stream and restart it at address 0.
module tb_dfe_source;
  import dab_pkg::*;
  localparam int AW = 6, LEN = 13;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_we = 0, run = 0;
  logic [AW-1:0] ld_addr = '0;
  cplx16_t ld_data = '0;
  logic [AW:0] len = '0;
  logic out_valid, out_sof;
  cplx16_t out;

  dfe_source #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0, last_t = -1, n_out = 0, bad_gap = 0;
  bit mon_on = 1;
  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) if (rst_n && out_valid && mon_on) begin
    int a;
    a = n_out % LEN;
    check(out.re == 16'(100 * a + 7) && out.im == 16'(-3 * a), $sformatf("sample %0d data", n_out));
    check(out_sof == (a == 0), $sformatf("sof at sample %0d", n_out));
    if (last_t >= 0 && cycle - last_t != CLK_PER_SAMPLE) bad_gap++;
    last_t = cycle;
    n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      ld_we <= 1; ld_addr <= AW'(i); ld_data <= '{re: 16'(100 * i + 7), im: 16'(-3 * i)};
      @(posedge clk);
    end
    ld_we <= 0;
    len <= (AW+1)'(LEN);
    @(posedge clk);
    run <= 1;
    repeat (40 * CLK_PER_SAMPLE) @(posedge clk);
    run <= 0;
    repeat (20) @(posedge clk);
    check(n_out == 40, $sformatf("%0d samples", n_out));
    check(bad_gap == 0, "one sample every CLK_PER_SAMPLE clocks");
    check(!out_valid, "stream stops with run low");
    // restart: the first sample after run rises is address 0 again
    n_out = 0; last_t = -1;
    run <= 1;
    repeat (5 * CLK_PER_SAMPLE) @(posedge clk);
    run <= 0;
    repeat (3) @(posedge clk);
    check(n_out == 5, "restart from address 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
