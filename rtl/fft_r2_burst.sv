// fft_r2_burst: N-point radix-2 FFT with burst I/O (default N = 2048).
//
// The transform runs in three phases that never overlap, as in a burst-I/O
// FFT: load, compute, unload.
//   * Load: N complex samples arrive on `in_valid` (one per clock at most);
//     `in_start` marks sample 0.  Sample n is written to address bitrev(n),
//     so the decimation-in-time stages can work in place.  `xn_index` shows
//     the index of the sample being taken.  `in_ready` is high only here.
//   * Compute (`busy` high): log2(N) stages of N/2 radix-2 butterflies, one
//     butterfly issued per clock.  Butterfly j of stage s combines addresses
//     a and a + 2^s with twiddle W_N^t, t = (j mod 2^s) * N / 2^(s+1).  The
//     data live in two RAMs (bank = XOR of the address bits, row = address /
//     2), so the two operands of every butterfly, and its two results, are
//     always in different banks and one butterfly per clock needs only one
//     read and one write port per RAM.  The twiddles come from a ROM of N/2
//     entries computed at elaboration.  Each stage waits for the 4-deep
//     butterfly pipeline to drain before the next one starts.
//   * Unload: the N results leave in natural order, one per clock, with
//     `out_valid` (the "data valid" strobe) and `out_index` (xk_index).
// Every stage divides by two (shift with saturation), so the output is
// DFT(x)/N.  Inputs must have a complex magnitude below 2^(DW-1) to avoid
// saturation.  `in_tag` is captured with sample 0 and returned with every
// output sample of the same transform (used to flag the phase reference
// symbol).
//
// Timing for N = 2048, continuous input: N clocks of load,
// 11 * (1024 + 4) clocks of compute, then N output clocks, the first one
// registered one clock after compute ends.
//
// The two data RAMs, the twiddle ROM and the single radix-2 butterfly follow
// the burst radix-2 architecture the design uses; the bank mapping, scaling
// schedule, rounding and pipeline depth are choices of this implementation.
module fft_r2_burst #(
  parameter int unsigned LOG2N = 11,
  parameter int unsigned DW    = 16,   // data width of re and im
  parameter int unsigned TW_W  = 16    // twiddle width, 1.0 = 2**(TW_W-2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // load
  input  logic                 in_valid,
  input  logic                 in_start,
  input  logic                 in_tag,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 in_ready,
  output logic [LOG2N-1:0]     xn_index,
  // status
  output logic                 busy,
  // unload
  output logic                 out_valid,
  output logic [LOG2N-1:0]     out_index,
  output logic                 out_tag,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);
  localparam int unsigned N    = 2**LOG2N;
  localparam int unsigned HALF = N / 2;
  localparam int unsigned RW   = LOG2N - 1;          // bank row address width
  localparam int unsigned SW   = $clog2(LOG2N + 1);  // stage counter width
  localparam int unsigned FRAC = TW_W - 2;

  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_rom_t [HALF];

  // W_N^t = cos(2 pi t / N) - j sin(2 pi t / N), rounded to TW_W bits
  function automatic tw_rom_t gen_tw(input bit want_im);
    tw_rom_t r;
    real     ang, v;
    for (int t = 0; t < int'(HALF); t++) begin
      ang = 6.283185307179586 * real'(t) / real'(N);
      v   = want_im ? -$sin(ang) : $cos(ang);
      r[t] = tw_t'($rtoi($floor(v * real'(2**FRAC) + 0.5)));
    end
    return r;
  endfunction

  localparam tw_rom_t TW_RE = gen_tw(1'b0);
  localparam tw_rom_t TW_IM = gen_tw(1'b1);

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] x);
    for (int i = 0; i < int'(LOG2N); i++) bitrev[i] = x[LOG2N-1-i];
  endfunction

  function automatic logic signed [DW-1:0] sat(input logic signed [DW:0] x);
    if (x > $signed({2'b00, {(DW-1){1'b1}}}))       return {1'b0, {(DW-1){1'b1}}};
    else if (x < $signed({2'b11, {(DW-1){1'b0}}}))  return {1'b1, {(DW-1){1'b0}}};
    else                                            return x[DW-1:0];
  endfunction

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_DRAIN, S_UNLOAD} state_t;
  state_t state;

  // ---------------------------------------------------------------- RAMs
  logic [2*DW-1:0] bank0 [HALF];
  logic [2*DW-1:0] bank1 [HALF];
  logic            we0, we1;
  logic [RW-1:0]   wa0, wa1, ra0, ra1;
  logic [2*DW-1:0] wd0, wd1, q0, q1;

  always_ff @(posedge clk) begin
    if (we0) bank0[wa0] <= wd0;
    if (we1) bank1[wa1] <= wd1;
    q0 <= bank0[ra0];
    q1 <= bank1[ra1];
  end

  // ---------------------------------------------------------------- control
  logic [LOG2N-1:0] cnt;       // load / unload counter
  logic [SW-1:0]    stage;
  logic [RW-1:0]    bfly;      // butterfly index j within the stage
  logic             tag_q;

  // issue-side address generation (combinational)
  logic [LOG2N-1:0] iss_a, iss_b, iss_t, lo_mask;
  logic             iss_par;
  always_comb begin
    lo_mask = LOG2N'((1 << stage) - 1);
    iss_a   = ((LOG2N'(bfly) & ~lo_mask) << 1) | (LOG2N'(bfly) & lo_mask);
    iss_b   = iss_a | LOG2N'(1 << stage);
    iss_t   = (LOG2N'(bfly) & lo_mask) << (LOG2N - 1 - int'(stage));
    iss_par = ^iss_a;
  end

  // pipeline registers
  logic             p1_v, p2_v, p3_v;
  logic             p1_swap;
  logic [LOG2N-1:0] p1_a, p1_b, p2_a, p2_b, p3_a, p3_b;
  tw_t              p1_wr, p1_wi;
  logic signed [DW-1:0]   p2_ar, p2_ai;
  logic signed [DW:0]     p2_br, p2_bi;           // W*B, one guard bit
  logic [2*DW-1:0]        p3_x, p3_y;
  logic                   un_v;                   // unload read issued
  logic                   un_par;
  logic [LOG2N-1:0]       un_idx;

  logic issue;
  assign issue = (state == S_CALC);

  // read address mux
  always_comb begin
    if (state == S_UNLOAD) begin
      ra0 = cnt[LOG2N-1:1];
      ra1 = cnt[LOG2N-1:1];
    end else begin
      ra0 = iss_par ? iss_b[LOG2N-1:1] : iss_a[LOG2N-1:1];
      ra1 = iss_par ? iss_a[LOG2N-1:1] : iss_b[LOG2N-1:1];
    end
  end

  // write port mux
  logic [LOG2N-1:0] ld_addr;
  assign ld_addr = bitrev(in_start ? '0 : cnt);
  always_comb begin
    we0 = 1'b0; we1 = 1'b0;
    wa0 = '0;   wa1 = '0;
    wd0 = '0;   wd1 = '0;
    if (state == S_LOAD) begin
      if (in_valid) begin
        if (^ld_addr) begin we1 = 1'b1; wa1 = ld_addr[LOG2N-1:1]; wd1 = {in_re, in_im}; end
        else          begin we0 = 1'b1; wa0 = ld_addr[LOG2N-1:1]; wd0 = {in_re, in_im}; end
      end
    end else if (p3_v) begin
      we0 = 1'b1; we1 = 1'b1;
      if (^p3_a) begin
        wa1 = p3_a[LOG2N-1:1]; wd1 = p3_x;
        wa0 = p3_b[LOG2N-1:1]; wd0 = p3_y;
      end else begin
        wa0 = p3_a[LOG2N-1:1]; wd0 = p3_x;
        wa1 = p3_b[LOG2N-1:1]; wd1 = p3_y;
      end
    end
  end

  // butterfly datapath
  logic signed [DW-1:0]        a_r, a_i, b_r, b_i;
  logic signed [DW+TW_W:0]     m_r, m_i;
  logic signed [DW+1:0]        s_xr, s_xi, s_yr, s_yi;
  always_comb begin
    {a_r, a_i} = p1_swap ? q1 : q0;
    {b_r, b_i} = p1_swap ? q0 : q1;
    m_r = (b_r * p1_wr) - (b_i * p1_wi) + (1 <<< (FRAC - 1));
    m_i = (b_r * p1_wi) + (b_i * p1_wr) + (1 <<< (FRAC - 1));
    s_xr = (DW+2)'(p2_ar) + (DW+2)'(p2_br);
    s_xi = (DW+2)'(p2_ai) + (DW+2)'(p2_bi);
    s_yr = (DW+2)'(p2_ar) - (DW+2)'(p2_br);
    s_yi = (DW+2)'(p2_ai) - (DW+2)'(p2_bi);
  end

  always_ff @(posedge clk) begin
    p1_a    <= iss_a;
    p1_b    <= iss_b;
    p1_swap <= iss_par;
    p1_wr   <= TW_RE[iss_t[RW-1:0]];
    p1_wi   <= TW_IM[iss_t[RW-1:0]];
    p2_a    <= p1_a;
    p2_b    <= p1_b;
    p2_ar   <= a_r;
    p2_ai   <= a_i;
    p2_br   <= (DW+1)'(m_r >>> FRAC);
    p2_bi   <= (DW+1)'(m_i >>> FRAC);
    p3_a    <= p2_a;
    p3_b    <= p2_b;
    p3_x    <= {sat((DW+1)'(s_xr >>> 1)), sat((DW+1)'(s_xi >>> 1))};
    p3_y    <= {sat((DW+1)'(s_yr >>> 1)), sat((DW+1)'(s_yi >>> 1))};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      cnt    <= '0;
      stage  <= '0;
      bfly   <= '0;
      tag_q  <= 1'b0;
      p1_v   <= 1'b0;
      p2_v   <= 1'b0;
      p3_v   <= 1'b0;
      un_v   <= 1'b0;
      un_par <= 1'b0;
      un_idx <= '0;
    end else begin
      p1_v <= issue;
      p2_v <= p1_v;
      p3_v <= p2_v;
      un_v <= (state == S_UNLOAD);
      un_par <= ^cnt;
      un_idx <= cnt;
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (in_start) tag_q <= in_tag;
          if ((in_start ? '0 : cnt) == LOG2N'(N - 1)) begin
            cnt   <= '0;
            stage <= '0;
            bfly  <= '0;
            state <= S_CALC;
          end else begin
            cnt <= (in_start ? '0 : cnt) + 1'b1;
          end
        end
        S_CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == RW'(HALF - 1)) state <= S_DRAIN;
        end
        S_DRAIN: if (!p1_v && !p2_v && !p3_v) begin
          if (stage == SW'(LOG2N - 1)) begin
            state <= S_UNLOAD;
            cnt   <= '0;
          end else begin
            stage <= stage + 1'b1;
            state <= S_CALC;
          end
        end
        S_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready  = (state == S_LOAD);
  assign xn_index  = cnt;
  assign busy      = (state == S_CALC) || (state == S_DRAIN);
  assign out_valid = un_v;
  assign out_index = un_idx;
  assign out_tag   = tag_q;
  assign {out_re, out_im} = un_par ? q1 : q0;
endmodule
