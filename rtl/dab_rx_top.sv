// dab_rx_top: DAB transmission mode I signal demodulation system.
//
// Recovers the transmitted bit stream from a time-synchronized DAB baseband
// signal whose carrier frequency offset is corrected on the way in.  The
// chain is:
//   dfe_source         I/Q sample memories replayed at the 2.048 MHz sample
//                      rate (stand-in for ADC and digital front-end)
//   freq_correction    removes a carrier frequency offset given in `freq_corr`
//                      (zero passes the samples unchanged)
//   ofdm_demod         Null symbol and cyclic prefix removal, symbol buffer,
//                      2048-point burst radix-2 FFT
//   diff_demod         selection of the 1536 active carriers and
//                      multiplication by the conjugate of the previous symbol,
//                      restarted by the phase reference symbol of each frame
//   freq_deinterleaver undoes the fixed carrier permutation
//   qpsk_demapper      sign decisions, 3072 bits per OFDM symbol
//   bit_error_counter  compares the bits with a stored reference stream and
//                      counts the errors, for free-running hardware tests
//   coarse_time_sync   watches the corrected samples and estimates each frame
//                      start from the Null symbol's power dip
//   fine_freq_sync     estimates the fractional carrier frequency offset
//                      from the cyclic prefix of every symbol
//
// Interface: both memories are filled through their load ports while `run`
// is low.  With `run` high the source replays `src_len` samples cyclically,
// one every CLK_DIV clocks; the recovered bits leave on `bit_valid`/`bit_out`
// (bit 0 of each data symbol flagged by `bit_first`) and are counted against
// the reference in `bit_count`/`err_count`.  The status outputs are sticky
// error flags of the buffers.  The coarse frame detector's envelope,
// threshold and detection pulse (`frame_det`, one per frame once the first
// 196608-sample window has set the threshold) are brought out for
// observation.  The chain itself is framed by the source's start-of-frame
// flag: a coarse estimate lands somewhere in the first cyclic prefix and
// would need the PRS-based fine time synchronization, which is not part of
// this design, before it could place the FFT window.  Likewise the
// frequency offset estimate (`freq_delta`, `freq_delta_avg`, in 2^-16
// carrier spacings) is brought out.  It is measured after the correction,
// so it shows the offset that remains; a host closes the loop by adding it
// to `freq_corr`.
//
// Timing at the defaults (8 clocks per sample): a symbol of 2552 samples
// spans 20416 clocks; the FFT needs 2048 + 11 * 1028 + 2048 clocks, the
// deinterleaver 3074, so each stage is idle before the next symbol arrives.
// The frequency correction adds 2 clocks ahead of the demodulator.
//
// The order of the demodulation stages, the buffering between them, the
// on-chip error counter and the place of the frequency correction ahead of
// the demodulator follow the receiver this design implements.  The
// replayed sample memory in place of a live front-end, the open frequency
// loop and the 8-clocks-per-sample rate are choices of this design.
module dab_rx_top
  import dab_pkg::*;
#(
  parameter int unsigned SRC_AW  = 15,
  parameter int unsigned REF_AW  = 15,
  parameter int unsigned CLK_DIV = CLK_PER_SAMPLE
) (
  input  logic              clk,
  input  logic              rst_n,
  // sample memory load port and replay control
  input  logic              src_ld_we,
  input  logic [SRC_AW-1:0] src_ld_addr,
  input  cplx16_t           src_ld_data,
  input  logic [SRC_AW:0]   src_len,
  input  logic              run,
  // reference bit memory load port
  input  logic              ref_ld_we,
  input  logic [REF_AW-1:0] ref_ld_addr,
  input  logic              ref_ld_bit,
  input  logic [REF_AW:0]   ref_len,
  input  logic              err_clr,
  // frequency correction, 2^-16 carrier spacings
  input  logic signed [15:0] freq_corr,
  // recovered bits
  output logic              bit_valid,
  output logic              bit_out,
  output logic              bit_first,
  output logic              bit_frame_first,
  // test counters
  output logic [31:0]       bit_count,
  output logic [31:0]       err_count,
  // status
  output logic              fft_busy,
  output logic              sync_overflow,
  output logic              carrier_overflow,
  output logic              deint_overrun,
  output logic              demap_collision,
  // coarse time synchronization
  output logic              frame_env_valid,
  output logic [SAMPLE_W:0] frame_env,
  output logic [SAMPLE_W:0] frame_thr,
  output logic              frame_thr_valid,
  output logic              frame_det,
  // fine frequency synchronization
  output logic              freq_est_valid,
  output logic signed [15:0] freq_delta,
  output logic signed [15:0] freq_delta_avg
);
  localparam int unsigned DW = 2 * SAMPLE_W + 1;

  // source -> OFDM demodulation
  logic    s_valid, s_sof;
  cplx16_t s_data;

  dfe_source #(.AW(SRC_AW), .CLK_DIV(CLK_DIV)) u_source (
    .clk, .rst_n,
    .ld_we(src_ld_we), .ld_addr(src_ld_addr), .ld_data(src_ld_data),
    .run, .len(src_len),
    .out_valid(s_valid), .out_sof(s_sof), .out(s_data)
  );

  // frequency correction
  logic    c_valid, c_sof;
  cplx16_t c_data;

  freq_correction u_fcorr (
    .clk, .rst_n,
    .in_valid(s_valid), .in_sof(s_sof), .in_data(s_data), .offset(freq_corr),
    .out_valid(c_valid), .out_sof(c_sof), .out_data(c_data)
  );

  // frame start estimate from the Null symbol
  coarse_time_sync u_ctsync (
    .clk, .rst_n,
    .in_valid(c_valid), .in_data(c_data),
    .out_valid(frame_env_valid), .det(frame_det), .thr_valid(frame_thr_valid),
    .env(frame_env), .thr(frame_thr)
  );

  // fractional frequency offset from the cyclic prefixes
  fine_freq_sync u_ffsync (
    .clk, .rst_n,
    .in_valid(c_valid), .in_sof(c_sof), .in_data(c_data),
    .est_valid(freq_est_valid), .delta(freq_delta), .delta_avg(freq_delta_avg)
  );

  // OFDM demodulation -> differential demodulation
  logic             f_valid, f_prs;
  logic [LOG2N-1:0] f_index;
  cplx16_t          f_data;

  ofdm_demod u_ofdm (
    .clk, .rst_n,
    .in_valid(c_valid), .in_sof(c_sof), .in_data(c_data),
    .out_valid(f_valid), .out_index(f_index), .out_prs(f_prs), .out_data(f_data),
    .fft_busy, .overflow(sync_overflow)
  );

  // differential demodulation -> frequency deinterleaving
  logic                 d_valid, d_first, d_frame;
  logic signed [DW-1:0] d_re, d_im;

  diff_demod u_diff (
    .clk, .rst_n,
    .in_valid(f_valid), .in_prs(f_prs), .in_re(f_data.re), .in_im(f_data.im),
    .out_valid(d_valid), .out_first(d_first), .out_frame_first(d_frame),
    .out_re(d_re), .out_im(d_im), .a_overflow(carrier_overflow)
  );

  // frequency deinterleaving -> QPSK demapping
  logic                 i_valid, i_first, i_frame;
  logic signed [DW-1:0] i_re, i_im;

  freq_deinterleaver u_deint (
    .clk, .rst_n,
    .in_valid(d_valid), .in_first(d_first), .in_frame_first(d_frame),
    .in_re(d_re), .in_im(d_im),
    .out_valid(i_valid), .out_first(i_first), .out_frame_first(i_frame),
    .out_re(i_re), .out_im(i_im), .overrun(deint_overrun)
  );

  qpsk_demapper u_demap (
    .clk, .rst_n,
    .in_valid(i_valid), .in_first(i_first), .in_frame_first(i_frame),
    .in_re(i_re), .in_im(i_im),
    .out_valid(bit_valid), .out_bit(bit_out), .out_first(bit_first),
    .out_frame_first(bit_frame_first), .collision(demap_collision)
  );

  bit_error_counter #(.AW(REF_AW), .CW(32)) u_check (
    .clk, .rst_n,
    .ld_we(ref_ld_we), .ld_addr(ref_ld_addr), .ld_bit(ref_ld_bit), .len(ref_len),
    .clr(err_clr),
    .in_valid(bit_valid), .in_bit(bit_out), .in_frame_first(bit_frame_first),
    .bit_count, .err_count
  );

  // The FFT emits the bins of a symbol in natural order.
  logic [LOG2N-1:0] exp_index;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       exp_index <= '0;
    else if (f_valid) exp_index <= exp_index + 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n) f_valid |-> f_index == exp_index)
    else $error("FFT output out of order");
endmodule
