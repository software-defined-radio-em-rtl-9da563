// freq_correction: digital carrier frequency correction.
//
// Removes a frequency offset of `offset` carrier spacings from the sample
// stream by turning sample n by exp(-j 2 pi n offset / N), N = 2048:
//   c[n] = r[n] * (cos(phi[n]) - j sin(phi[n])),   phi[n] = 2 pi n offset / N.
// A 32-bit phase accumulator (units of 2^-32 turns) is advanced by
// offset * 2^32 / (2^16 N) = offset * 2^5 per sample, `offset` being a signed
// number of 2^-16 carrier spacings.  Its top PHASE_BITS bits address a
// cosine/sine table of 2^PHASE_BITS entries computed at elaboration (1.0 =
// 2^14, so a zero offset passes the samples through unchanged).  The
// complex product is rounded and saturated back to 16 bits.
//
// Interface and timing: one sample per `in_valid`; the corrected sample
// leaves on `out_valid` two clocks later (table read, then multiply and
// round), with `in_sof` delayed alongside as `out_sof`.  `offset` may change
// at any time; the phase stays continuous.
//
// The correction formula follows the digital frequency correction of the
// receiver this design implements; the phase accumulator, table size and
// rounding are choices of this implementation.
module freq_correction
  import dab_pkg::*;
#(
  parameter int unsigned LOG2_N     = LOG2N,
  parameter int unsigned PHASE_BITS = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_sof,
  input  cplx16_t            in_data,
  input  logic signed [15:0] offset,
  output logic               out_valid,
  output logic               out_sof,
  output cplx16_t            out_data
);
  localparam int unsigned TSZ = 2**PHASE_BITS;
  typedef logic signed [15:0] coef_t;
  typedef coef_t tab_t [TSZ];

  function automatic tab_t gen_tab(input bit want_sin);
    tab_t t;
    real  a;
    for (int i = 0; i < int'(TSZ); i++) begin
      a    = 2.0 * 3.141592653589793 * real'(i) / real'(TSZ);
      t[i] = coef_t'($rtoi($floor((want_sin ? $sin(a) : $cos(a)) * 16384.0 + 0.5)));
    end
    return t;
  endfunction
  localparam tab_t COS_T = gen_tab(1'b0);
  localparam tab_t SIN_T = gen_tab(1'b1);

  // phase increment per sample: offset * 2^(32 - 16 - LOG2_N)
  logic [31:0] phase, inc;
  assign inc = 32'(signed'(offset)) <<< (16 - LOG2_N);

  // stage 1: table read
  logic    s1_valid, s1_sof;
  cplx16_t s1_data;
  coef_t   s1_c, s1_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      s1_valid <= 1'b0;
      s1_sof   <= 1'b0;
      s1_data  <= '0;
      s1_c     <= '0;
      s1_s     <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_sof  <= in_sof;
        s1_data <= in_data;
        s1_c    <= COS_T[phase[31 -: PHASE_BITS]];
        s1_s    <= SIN_T[phase[31 -: PHASE_BITS]];
        phase   <= phase + inc;
      end
    end
  end

  // stage 2: (a + jb)(c - js) = (ac + bs) + j(bc - as), rounded, saturated
  function automatic logic signed [15:0] sat16(input logic signed [33:0] v);
    logic signed [33:0] r;
    r = (v + 34'sd8192) >>> 14;
    if (r > 34'sd32767)       return 16'sh7fff;
    else if (r < -34'sd32768) return 16'sh8000;
    else                      return r[15:0];
  endfunction

  logic signed [33:0] m_re, m_im;
  always_comb begin
    m_re = 34'(s1_data.re * s1_c) + 34'(s1_data.im * s1_s);
    m_im = 34'(s1_data.im * s1_c) - 34'(s1_data.re * s1_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_sof  <= s1_sof;
        out_data <= '{re: sat16(m_re), im: sat16(m_im)};
      end
    end
  end
endmodule
