// tb_bit_error_counter: self-checking test of the on-chip bit comparator.
//
// A 100-bit reference is loaded, replayed cyclically (len = 100).  A stream
// of 250 bits equal to the reference but with 10 chosen bits flipped must
// give bit_count 250 and err_count 10.  Then the stream is restarted in the
// middle of the reference with in_frame_first, which must bring the pointer
// back to bit 0 (no new error); this is repeated from three different
// pointer positions, where the reference bit differs from bit 0.  clr must zero both counters.
module tb_bit_error_counter;
  localparam int AW = 10, LEN = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_we = 0, ld_bit = 0, clr = 0, in_valid = 0, in_bit = 0, in_frame_first = 0;
  logic [AW-1:0] ld_addr = '0;
  logic [AW:0]   len = '0;
  logic [31:0]   bit_count, err_count;

  bit_error_counter #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ref_bits [LEN];

  task automatic send(input bit b, input bit ff);
    in_valid <= 1; in_bit <= b; in_frame_first <= ff;
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 0; in_frame_first <= 0;
    @(posedge clk);
  endtask

  initial begin
    int r, nflip;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LEN; i++) begin
      r = $urandom_range(0, 1); ref_bits[i] = r[0];
      // bit 0 differs from the bits at the restart points 50, 30 and 13
      if (i == 0) ref_bits[i] = 1'b1;
      if (i == 13 || i == 30 || i == 50) ref_bits[i] = 1'b0;
      ld_we <= 1; ld_addr <= AW'(i); ld_bit <= ref_bits[i];
      @(posedge clk);
    end
    ld_we <= 0; len <= (AW+1)'(LEN);
    clr <= 1; @(posedge clk); clr <= 0;
    nflip = 0;
    for (int i = 0; i < 250; i++) begin
      bit flip;
      flip = (i % 27 == 5);
      if (flip) nflip++;
      send(ref_bits[i % LEN] ^ flip, i == 0);
      if (i % 7 == 3) idle();      // gaps between bits
    end
    idle();
    repeat (2) @(posedge clk);
    check(nflip == 10, "test plan");
    check(bit_count == 250, $sformatf("bit_count %0d", bit_count));
    check(err_count == 32'(nflip), $sformatf("err_count %0d want %0d", err_count, nflip));
    // restart mid-reference
    for (int i = 0; i < 30; i++) send(ref_bits[i], i == 0);
    idle();
    repeat (2) @(posedge clk);
    check(bit_count == 280, "bits after restart");
    check(err_count == 32'(nflip), "frame restart realigns the pointer");
    // two more restarts, from pointer 30 and from pointer 13
    for (int i = 0; i < 13; i++) send(ref_bits[i], i == 0);
    idle();
    for (int i = 0; i < 40; i++) send(ref_bits[i], i == 0);
    idle();
    repeat (2) @(posedge clk);
    check(bit_count == 333, $sformatf("bits after restarts %0d", bit_count));
    check(err_count == 32'(nflip), $sformatf("err_count after restarts %0d", err_count));
    clr <= 1; @(posedge clk); clr <= 0;
    @(posedge clk);
    check(bit_count == 0 && err_count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
