// fine_freq_sync: estimate of the fractional carrier frequency offset from
// the cyclic prefix.
//
// The cyclic prefix of an OFDM symbol repeats the last T_CP samples of the
// symbol T_U = 2048 samples later.  A frequency offset of delta carrier
// spacings turns the later copy by exp(j 2 pi delta) against the earlier
// one, so the angle of
//   S = sum over n = 125..380 of  r[n + T_U] * conj(r[n])
// (n counted from the first sample of the prefix, i.e. the 256 samples in
// the middle of the prefix) is 2 pi delta.  The block measures delta once per
// OFDM symbol and smooths the estimates with a first-order IIR filter.
//
// How: a counter locates the symbols, starting from the start-of-frame flag
// (first sample of the Null symbol, which is skipped).  The 256 prefix
// samples are kept in a small memory; when their copies arrive they are
// multiplied by the stored conjugates and accumulated.  After the last one
// an iterative CORDIC in vectoring mode (one step per clock, CORDIC_ITER
// steps) finds the angle of S in units of 2^-16 turns, which is delta in
// units of 2^-16 carrier spacings (range -0.5 .. +0.5).  Then
//   avg <= avg + (delta - avg) / 2^AVG_SHIFT.
//
// Interface and timing: one sample per `in_valid`; `in_sof` marks the first
// sample of a frame.  `est_valid` pulses CORDIC_ITER + 3 clocks after the
// sample r[380 + T_U] of a symbol is taken, with `delta` (this symbol) and
// `delta_avg` (smoothed).  Offsets of half a carrier spacing or more alias.
//
// The correlation of the middle 256 prefix samples with their copies, the
// angle step and the final low-pass filter follow the fine frequency
// synchronization of the receiver this design implements.  Storing only
// the 256 samples used instead of a full T_U delay line, the CORDIC, the
// fixed-point formats and the filter constant are choices of this
// implementation.
module fine_freq_sync
  import dab_pkg::*;
#(
  parameter int unsigned TU          = FFT_N,
  parameter int unsigned TCP         = T_CP,
  parameter int unsigned TNULL       = T_NULL,
  parameter int unsigned WIN_FIRST   = 125,   // first prefix sample correlated
  parameter int unsigned WIN_LEN     = 256,   // number of samples correlated
  parameter int unsigned CORDIC_ITER = 18,
  parameter int unsigned AVG_SHIFT   = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        in_sof,
  input  cplx16_t                     in_data,
  output logic                        est_valid,
  output logic signed [15:0]          delta,
  output logic signed [15:0]          delta_avg
);
  localparam int unsigned TS   = TU + TCP;
  localparam int unsigned CW   = $clog2(TNULL > TS ? TNULL + 1 : TS + 1);
  localparam int unsigned BAW  = $clog2(WIN_LEN);
  localparam int unsigned PW   = 2 * SAMPLE_W + 1;             // product
  localparam int unsigned AW   = PW + BAW;                     // accumulator
  localparam int unsigned XW   = AW + 2;                       // CORDIC x/y
  localparam int unsigned WIN_LAST = WIN_FIRST + WIN_LEN - 1;

  // arctan(2^-i) in units of 2^-16 turns
  typedef logic signed [17:0] ang_t;
  typedef ang_t atan_tab_t [CORDIC_ITER];
  function automatic atan_tab_t gen_atan();
    atan_tab_t t;
    for (int i = 0; i < int'(CORDIC_ITER); i++)
      t[i] = ang_t'($rtoi($atan(1.0 / real'(longint'(1) << i))
                          / (2.0 * 3.141592653589793) * 65536.0 + 0.5));
    return t;
  endfunction
  localparam atan_tab_t ATAN = gen_atan();

  // ---------------------------------------------------------------- timing
  logic          in_null;
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_null <= 1'b1;
      cnt     <= '0;
    end else if (in_valid) begin
      if (in_sof) begin
        in_null <= 1'b1;
        cnt     <= CW'(1);
      end else if (in_null) begin
        if (cnt == CW'(TNULL - 1)) begin in_null <= 1'b0; cnt <= '0; end
        else cnt <= cnt + 1'b1;
      end else begin
        cnt <= (cnt == CW'(TS - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

  // samples of the prefix window and of their copies
  logic early, late, last;
  assign early = in_valid && !in_sof && !in_null &&
                 cnt >= CW'(WIN_FIRST) && cnt <= CW'(WIN_LAST);
  assign late  = in_valid && !in_sof && !in_null &&
                 cnt >= CW'(WIN_FIRST + TU) && cnt <= CW'(WIN_LAST + TU);
  assign last  = late && cnt == CW'(WIN_LAST + TU);

  cplx16_t buf_mem [WIN_LEN];
  logic [BAW-1:0] wr_idx, rd_idx;
  assign wr_idx = BAW'(cnt - CW'(WIN_FIRST));
  assign rd_idx = BAW'(cnt - CW'(WIN_FIRST + TU));
  always_ff @(posedge clk) begin
    if (early) buf_mem[wr_idx] <= in_data;
  end

  // ------------------------------------------ product with the conjugate
  logic                  p_valid, p_last;
  logic signed [PW-1:0]  p_re, p_im;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      p_re    <= '0;
      p_im    <= '0;
    end else begin
      p_valid <= late;
      p_last  <= last;
      if (late) begin
        // (a + jb)(c - jd) = (ac + bd) + j(bc - ad)
        p_re <= PW'(in_data.re * buf_mem[rd_idx].re) + PW'(in_data.im * buf_mem[rd_idx].im);
        p_im <= PW'(in_data.im * buf_mem[rd_idx].re) - PW'(in_data.re * buf_mem[rd_idx].im);
      end
    end
  end

  // --------------------------------------------------------- accumulation
  // `first_p`: the next product is the first of a symbol and restarts the sum
  logic signed [AW-1:0] s_re, s_im;
  logic                 s_done, first_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_re    <= '0;
      s_im    <= '0;
      s_done  <= 1'b0;
      first_p <= 1'b1;
    end else begin
      s_done <= p_valid && p_last;
      if (p_valid) begin
        s_re    <= first_p ? AW'(p_re) : s_re + AW'(p_re);
        s_im    <= first_p ? AW'(p_im) : s_im + AW'(p_im);
        first_p <= p_last;
      end
      if (in_valid && in_sof) first_p <= 1'b1;
    end
  end

  // ------------------------------------------------- CORDIC, vectoring mode
  localparam int unsigned IW = $clog2(CORDIC_ITER + 1);
  logic                 c_busy;
  logic [IW-1:0]        c_i;
  logic signed [XW-1:0] c_x, c_y;
  ang_t                 c_z;
  logic                 c_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_busy <= 1'b0;
      c_i    <= '0;
      c_x    <= '0;
      c_y    <= '0;
      c_z    <= '0;
      c_done <= 1'b0;
    end else begin
      c_done <= 1'b0;
      if (s_done) begin
        // move the vector into the right half plane first
        c_busy <= 1'b1;
        c_i    <= '0;
        if (s_re < 0) begin
          c_x <= -XW'(s_re);
          c_y <= -XW'(s_im);
          c_z <= ang_t'(32768);
        end else begin
          c_x <= XW'(s_re);
          c_y <= XW'(s_im);
          c_z <= '0;
        end
      end else if (c_busy) begin
        if (c_y >= 0) begin
          c_x <= c_x + (c_y >>> c_i);
          c_y <= c_y - (c_x >>> c_i);
          c_z <= c_z + ATAN[c_i];
        end else begin
          c_x <= c_x - (c_y >>> c_i);
          c_y <= c_y + (c_x >>> c_i);
          c_z <= c_z - ATAN[c_i];
        end
        if (c_i == IW'(CORDIC_ITER - 1)) begin
          c_busy <= 1'b0;
          c_done <= 1'b1;
        end
        c_i <= c_i + 1'b1;
      end
    end
  end

  // ------------------------------------------------------- output filter
  logic signed [15:0] d_now;
  assign d_now = c_z[15:0];   // angle modulo one turn, as a signed fraction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_valid <= 1'b0;
      delta     <= '0;
      delta_avg <= '0;
    end else begin
      est_valid <= c_done;
      if (c_done) begin
        delta     <= d_now;
        delta_avg <= delta_avg + 16'((17'(d_now) - 17'(delta_avg)) >>> AVG_SHIFT);
      end
    end
  end
endmodule
