// coarse_time_sync: DAB frame detection from the Null symbol (coarse time
// synchronization).
//
// Every DAB frame starts with the Null symbol, which carries no power.  The
// block follows the signal envelope and reports where it rises again after
// a Null symbol, i.e. the start of the phase reference symbol's cyclic
// prefix.  Four steps, one per incoming sample:
//   1. Magnitude: z = |re| + |im|, the usual cheap stand-in for sqrt(re^2 + im^2).
//   2. Low-pass filter: the first-order IIR filter y[n] = A y[n-1] + B (z[n] + z[n-1]),
//      with A = 1 - 2B so that its DC gain is one.  B is a Q16 fraction
//      (default 103/65536, the bilinear design for a 1024 Hz cut-off at a
//      2.048 MHz sample rate).  y is kept with 16 fraction bits; the
//      envelope `env` is its integer part.
//   3. Bottom detector: over consecutive windows of WIN samples (default one
//      mode I frame, 196608 samples) the minimum and the mean of the envelope
//      are gathered.  At the end of a window the threshold becomes
//      thr = min + (mean - min) / 2^I_SHIFT and `thr_valid` is set.  The mean is
//      sum * round(2^32 / WIN) / 2^32.
//   4. Comparator: once the envelope has stayed below the threshold for at
//      least MIN_LOW samples, the first sample at or above it raises `det`
//      (the frame start estimate) for one sample.
//
// Interface and timing: one sample per `in_valid`.  The filter state is
// updated on the clock that takes a sample; the window statistics and the
// comparator look at `env` as it stood before that sample, so `det` marks
// the sample after the one whose filtered envelope first reached the
// threshold.  `det` is a one-clock pulse valid with `out_valid`, which is
// `in_valid` delayed by one clock.  No detection is made before the first
// window has ended.
//
// The magnitude approximation, the filter form, the 1024 Hz cut-off, the
// bottom detector and the threshold formula follow the coarse time
// synchronization of the receiver this design implements.  The value of
// I, the window length, the MIN_LOW guard against short dips and the
// fixed-point formats are choices of this implementation.
module coarse_time_sync
  import dab_pkg::*;
#(
  parameter int unsigned WIN     = FFT_N * 96,   // 196608 samples = 96 ms
  parameter int unsigned B_Q16   = 103,          // filter coefficient B * 2^16
  parameter int unsigned I_SHIFT = 3,            // I = 8
  parameter int unsigned MIN_LOW = T_NULL / 2    // samples below thr before a rise counts
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  cplx16_t               in_data,
  output logic                  out_valid,
  output logic                  det,
  output logic                  thr_valid,
  output logic [SAMPLE_W:0]     env,
  output logic [SAMPLE_W:0]     thr
);
  localparam int unsigned EW   = SAMPLE_W + 1;          // envelope width
  localparam int unsigned YW   = EW + 16 + 1;           // filter state, Q16
  localparam int unsigned WCW  = $clog2(WIN);
  localparam int unsigned SW   = EW + WCW;              // envelope sum
  localparam int unsigned LCW  = $clog2(MIN_LOW + 1);
  localparam logic [16:0] A_Q16 = 17'(65536 - 2 * B_Q16);
  localparam longint unsigned WIN64 = 64'(WIN);
  localparam longint unsigned RECIP = ((64'd1 << 32) + WIN64 / 2) / WIN64;

  // 1. magnitude
  logic [EW-1:0] z, z_prev;
  always_comb begin
    logic [SAMPLE_W-1:0] ar, ai;
    ar = in_data.re[SAMPLE_W-1] ? SAMPLE_W'(-in_data.re) : in_data.re;
    ai = in_data.im[SAMPLE_W-1] ? SAMPLE_W'(-in_data.im) : in_data.im;
    // -32768 has no positive counterpart; its bit pattern reads as 32768
    z  = EW'(ar) + EW'(ai);
  end

  // 2. low-pass filter
  logic [YW-1:0]    y;
  logic [YW+16:0]   ay;
  logic [YW-1:0]    y_next;
  always_comb begin
    ay     = (YW+17)'(A_Q16) * (YW+17)'(y);
    y_next = YW'(ay >> 16) + YW'(B_Q16) * (YW'(z) + YW'(z_prev));
  end

  // 3./4. bottom detector and comparator
  logic [WCW-1:0] wcnt;
  logic [EW-1:0]  wmin;
  logic [SW-1:0]  wsum;
  logic [LCW-1:0] low_cnt;
  logic [EW-1:0]  mean, thr_new;
  always_comb begin
    logic [SW+32-1:0] prod;
    prod    = (SW+32)'(wsum) * (SW+32)'(RECIP);
    mean    = EW'(prod >> 32);
    thr_new = (mean > wmin) ? wmin + ((mean - wmin) >> I_SHIFT) : wmin;
  end

  assign env = EW'(y >> 16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_prev    <= '0;
      y         <= '0;
      wcnt      <= '0;
      wmin      <= '1;
      wsum      <= '0;
      thr       <= '0;
      thr_valid <= 1'b0;
      low_cnt   <= '0;
      det       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      det       <= 1'b0;
      if (in_valid) begin
        z_prev <= z;
        y      <= y_next;
        // window statistics of the current envelope
        if (wcnt == WCW'(WIN - 1)) begin
          // this sample opens the next window
          wcnt      <= '0;
          wmin      <= env;
          wsum      <= SW'(env);
          thr       <= thr_new;
          thr_valid <= 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
          wsum <= wsum + SW'(env);
          if (env < wmin) wmin <= env;
        end
        // comparator
        if (env < thr) begin
          if (low_cnt != LCW'(MIN_LOW)) low_cnt <= low_cnt + 1'b1;
        end else begin
          if (thr_valid && low_cnt == LCW'(MIN_LOW)) det <= 1'b1;
          low_cnt <= '0;
        end
      end
    end
  end
endmodule
