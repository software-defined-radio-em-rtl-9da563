// tb_freq_correction: self-checking test of the digital frequency
// correction at its default sizes.
//
// Random samples in [-12000, 12000] are sent one per clock, in four runs
// with offsets of 0, +0.3, -0.45 and +3.7 carrier spacings (in 2^-16 units).
// The model turns sample n by exp(-j 2 pi phi), where phi is the phase
// (in turns) the block should have reached, n * offset / (2^16 * 2048),
// reduced to the 1/1024-turn resolution of its table.  Checked: with a
// zero offset the output equals the input exactly; otherwise each output
// is within 2 LSB of the model; every output comes a fixed two register
// stages after its input, with the start-of-frame flag carried along.
module tb_freq_correction;
  import dab_pkg::*;
  localparam real PI = 3.141592653589793;
  localparam int  NS = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid = 0, in_sof = 0;
  cplx16_t            in_data = '0;
  logic signed [15:0] offset = '0;
  logic               out_valid, out_sof;
  cplx16_t            out_data;

  freq_correction dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (4 * NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, in order, with the clock they were sent on
  real exp_re[$], exp_im[$];
  int  exp_t[$], exp_sof[$];
  int  cycle = 0;
  bit  exact = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      real er, ei;
      int  t, sf;
      if (exp_re.size() == 0) check(0, "unexpected output");
      else begin
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        t  = exp_t.pop_front();  sf = exp_sof.pop_front();
        // two register stages: the time stamp is taken as the sample is
        // driven and this process sees the output one edge after it is
        // registered, so 3 counts apart
        check(cycle - t == 3, $sformatf("latency %0d", cycle - t));
        check(out_sof == sf[0], "start-of-frame flag");
        if (exact)
          check(real'(out_data.re) == er && real'(out_data.im) == ei, "zero offset passes samples unchanged");
        else
          check(real'(out_data.re) - er <= 2.0 && real'(out_data.re) - er >= -2.0 &&
                real'(out_data.im) - ei <= 2.0 && real'(out_data.im) - ei >= -2.0,
                $sformatf("output (%0d,%0d), model (%f,%f)", out_data.re, out_data.im, er, ei));
      end
    end
  end

  initial begin
    int  offs [4];
    longint acc;   // phase in 2^-32 turns
    offs = '{0, 19661, -29491, 242483};
    repeat (3) @(posedge clk);
    rst_n = 1;
    acc = 0;
    for (int run = 0; run < 4; run++) begin
      offset <= 16'(offs[run] > 32767 ? 32767 : offs[run]);
      exact  = (offs[run] == 0);
      @(posedge clk);
      for (int n = 0; n < NS; n++) begin
        int  r, i_re, i_im, off;
        real ph, c, s;
        off = offs[run] > 32767 ? 32767 : offs[run];
        r = $urandom_range(0, 24000); i_re = r - 12000;
        r = $urandom_range(0, 24000); i_im = r - 12000;
        ph = real'((acc >> 22) & 1023) / 1024.0;
        c  = $cos(2.0 * PI * ph);
        s  = $sin(2.0 * PI * ph);
        exp_re.push_back(real'(i_re) * c + real'(i_im) * s);
        exp_im.push_back(real'(i_im) * c - real'(i_re) * s);
        exp_t.push_back(cycle);
        exp_sof.push_back(int'(n == 0));
        in_valid <= 1; in_sof <= (n == 0);
        in_data  <= '{re: 16'(i_re), im: 16'(i_im)};
        acc = (acc + longint'(off) * 32) & 64'hffff_ffff;
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (5) @(posedge clk);
    end
    check(exp_re.size() == 0, "every sample came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
