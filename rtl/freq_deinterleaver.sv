// freq_deinterleaver: DAB frequency deinterleaver for one OFDM symbol.
//
// The transmitter spreads the K = 1536 QPSK symbols of an OFDM symbol over
// the carriers with a fixed pseudo-random permutation.  Here the 1536
// differentially demodulated carriers of a symbol are written, in carrier
// order, into a single-port RAM for I and one for Q; the RAMs are then read
// in the order held by a ROM, so that output n is the carrier that carried
// QPSK symbol n.
//
// ROM contents: the mode I permutation of the DAB standard (EN 300 401,
// frequency interleaving), PI(0) = 0, PI(i) = (13 * PI(i-1) + N/4 - 1) mod N,
// N = 2048.  Walking i = 0..N-1 and keeping the values d with
// N/2 - K/2 <= d <= N/2 + K/2, d != N/2, gives the FFT bin of QPSK symbol
// n = 0, 1, ...; the ROM holds that bin's position among the active carriers
// (bin - 256 below the centre, bin - 257 above).  The sequence begins
// 255, 754, 1096 and ends with 964.  It is computed at elaboration by a
// constant function.  Loading the inverse sequence would make the same
// block an interleaver.
//
// Interface and timing: `in_first` marks carrier 0 of a symbol.  After the
// K-th write the block reads for K clocks; output n appears 2 clocks after
// its ROM address is issued, so with continuous input the first output
// follows the first input by K + 2 = 1538 clocks and the last one by
// 2K + 1 (3074 clocks for the whole symbol).  Input that arrives while the
// RAMs are being read is dropped and sets the sticky `overrun` flag.
module freq_deinterleaver
  import dab_pkg::*;
#(
  parameter int unsigned W      = 2 * SAMPLE_W + 1,
  parameter int unsigned LOG2_N = LOG2N,
  parameter int unsigned K      = K_CARR
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_first,
  input  logic                in_frame_first,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_first,
  output logic                out_frame_first,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                overrun
);
  localparam int unsigned N  = 2**LOG2_N;
  localparam int unsigned AW = $clog2(K);

  typedef logic [AW-1:0] seq_rom_t [K];

  function automatic seq_rom_t gen_seq();
    seq_rom_t    r;
    int unsigned pi, n, lo, hi, dc;
    lo = (N - K) / 2;
    hi = (N + K) / 2;
    dc = N / 2;
    pi = 0;
    n  = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (i > 0) pi = (13 * pi + N / 4 - 1) % N;
      if (pi >= lo && pi <= hi && pi != dc && n < K) begin
        r[n] = AW'((pi < dc) ? pi - lo : pi - lo - 1);
        n++;
      end
    end
    return r;
  endfunction

  localparam seq_rom_t SEQ = gen_seq();

  typedef enum logic {S_FILL, S_READ} state_t;
  state_t state;

  logic [W-1:0]  ram_re [K];
  logic [W-1:0]  ram_im [K];
  logic [AW-1:0] wr_cnt, rd_cnt, seq_q, ram_addr;
  logic          ram_we, wr_ok;
  logic          rd_v1, rd_v2, first_v1, first_v2, frame_q, frame_v1, frame_v2;

  // a write is taken in S_FILL unless the RAM port is busy with a read
  assign wr_ok    = (state == S_FILL) && !rd_v1;
  assign ram_we   = in_valid && wr_ok;
  assign ram_addr = rd_v1 ? seq_q : (in_first ? '0 : wr_cnt);

  // single-port RAMs, registered read
  always_ff @(posedge clk) begin
    if (ram_we) begin
      ram_re[ram_addr] <= in_re;
      ram_im[ram_addr] <= in_im;
    end
    out_re <= ram_re[ram_addr];
    out_im <= ram_im[ram_addr];
  end

  // sequence ROM, registered
  always_ff @(posedge clk) seq_q <= SEQ[rd_cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FILL;
      wr_cnt   <= '0;
      rd_cnt   <= '0;
      rd_v1    <= 1'b0;
      rd_v2    <= 1'b0;
      first_v1 <= 1'b0;
      first_v2 <= 1'b0;
      frame_q  <= 1'b0;
      frame_v1 <= 1'b0;
      frame_v2 <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      rd_v1    <= (state == S_READ);
      rd_v2    <= rd_v1;
      first_v1 <= (state == S_READ) && (rd_cnt == '0);
      first_v2 <= first_v1;
      frame_v1 <= (state == S_READ) && (rd_cnt == '0) && frame_q;
      frame_v2 <= frame_v1;
      if (in_valid && !wr_ok) overrun <= 1'b1;
      unique case (state)
        S_FILL: if (ram_we) begin
          if (in_first) frame_q <= in_frame_first;
          if ((in_first ? '0 : wr_cnt) == AW'(K - 1)) begin
            wr_cnt <= '0;
            rd_cnt <= '0;
            state  <= S_READ;
          end else begin
            wr_cnt <= (in_first ? '0 : wr_cnt) + 1'b1;
          end
        end
        S_READ: begin
          if (rd_cnt == AW'(K - 1)) begin
            rd_cnt <= '0;
            state  <= S_FILL;
          end else begin
            rd_cnt <= rd_cnt + 1'b1;
          end
        end
        default: state <= S_FILL;
      endcase
    end
  end

  assign out_valid       = rd_v2;
  assign out_first       = first_v2;
  assign out_frame_first = frame_v2;
endmodule
