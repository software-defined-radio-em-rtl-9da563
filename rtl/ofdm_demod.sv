// ofdm_demod: OFDM demodulation subsystem.
//
// Turns the time-domain DAB sample stream into the complex amplitudes of the
// 2048 FFT bins of every OFDM symbol.  ofdm_input_sync drops the Null symbol
// and the cyclic prefixes and gathers the 2048 useful samples of a symbol in
// its I/Q FIFOs; once a whole symbol is there it is handed to the burst
// radix-2 FFT (fft_r2_burst) in one go.  The FFT results leave in natural
// bin order with `out_valid` (data valid), `out_index` (bin number) and
// `out_prs`, which marks the bins of the phase reference symbol.
//
// Timing: the FFT takes 2048 load clocks, 11 * 1028 compute clocks and 2048
// output clocks per symbol; a symbol arrives every T_S * CLK_PER_SAMPLE =
// 20416 clocks at the default rate, so the FFT is always free in time.  The
// output is DFT/2048.
module ofdm_demod
  import dab_pkg::*;
#(
  parameter int unsigned LOG2_N = LOG2N,
  parameter int unsigned TCP    = T_CP,
  parameter int unsigned TNULL  = T_NULL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_sof,
  input  cplx16_t           in_data,
  output logic              out_valid,
  output logic [LOG2_N-1:0] out_index,
  output logic              out_prs,
  output cplx16_t           out_data,
  output logic              fft_busy,
  output logic              overflow
);
  logic    fft_ready, s_valid, s_start, s_prs;
  cplx16_t s_data;
  logic [LOG2_N-1:0] xn_index;

  ofdm_input_sync #(.TU(2**LOG2_N), .TCP(TCP), .TNULL(TNULL)) u_sync (
    .clk, .rst_n, .in_valid, .in_sof, .in_data, .fft_ready,
    .out_valid(s_valid), .out_start(s_start), .out_prs(s_prs), .out_data(s_data),
    .overflow
  );

  fft_r2_burst #(.LOG2N(LOG2_N), .DW(SAMPLE_W)) u_fft (
    .clk, .rst_n,
    .in_valid(s_valid), .in_start(s_start), .in_tag(s_prs),
    .in_re(s_data.re), .in_im(s_data.im),
    .in_ready(fft_ready), .xn_index,
    .busy(fft_busy),
    .out_valid, .out_index, .out_tag(out_prs),
    .out_re(out_data.re), .out_im(out_data.im)
  );

  // A symbol handed to the FFT always starts with sample 0.
  assert property (@(posedge clk) disable iff (!rst_n) s_start |-> fft_ready)
    else $error("symbol offered while the FFT is not loading");
endmodule
