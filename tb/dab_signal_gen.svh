// dab_signal_gen.svh: DAB mode I baseband frame generator shared by the
// testbenches (a transmitter model written independently of the receiver).
//
// gen_frame() builds one frame in the time domain: a Null symbol of T_NULL
// zero samples, the phase reference symbol (random phases, multiples of
// pi/2) and NDATA data symbols.  Each data symbol carries 3072 random bits,
// QPSK-mapped per the standard (bit n -> sign of the real part of symbol n,
// bit K+n -> sign of its imaginary part), frequency-interleaved with the
// mode I permutation and differentially modulated on the previous symbol.
// Carrier phases are kept as integers in units of pi/4.  Every symbol is an
// inverse DFT of amplitude GEN_AMP per carrier, preceded by its last T_CP
// samples as cyclic prefix, rounded and clipped to 16 bits.
// Results: gen_re/gen_im (samples), gen_bits (3072 * NDATA expected bits).

localparam int  GEN_N    = 2048;
localparam int  GEN_K    = 1536;
localparam int  GEN_CP   = 504;
localparam int  GEN_NULL = 2656;
localparam real GEN_AMP  = 150.0;
localparam real GEN_PI   = 3.141592653589793;

int  gen_re [];
int  gen_im [];
bit  gen_bits [];
int  gen_seq [GEN_K];          // QPSK symbol n -> FFT bin
real gen_cos [GEN_N];
real gen_sin [GEN_N];

function automatic void gen_init();
  int pi_v, n;
  for (int m = 0; m < GEN_N; m++) begin
    gen_cos[m] = $cos(2.0 * GEN_PI * m / GEN_N);
    gen_sin[m] = $sin(2.0 * GEN_PI * m / GEN_N);
  end
  pi_v = 0;
  n    = 0;
  for (int i = 0; i < GEN_N; i++) begin
    if (i > 0) pi_v = (13 * pi_v + 511) % GEN_N;
    if (pi_v >= 256 && pi_v <= 1792 && pi_v != 1024) begin
      gen_seq[n] = pi_v;
      n++;
    end
  end
endfunction

function automatic int gen_clip(input real v);
  int r;
  r = $rtoi($floor(v + 0.5));
  if (r > 32767)  r = 32767;
  if (r < -32768) r = -32768;
  return r;
endfunction

// phase[bin] in units of pi/4; writes one symbol with prefix at offset `at`
function automatic void gen_symbol(input int phase [GEN_N], input int at);
  real xr [GEN_N];
  real xi [GEN_N];
  real pr, pim;
  for (int t = 0; t < GEN_N; t++) begin xr[t] = 0.0; xi[t] = 0.0; end
  for (int b = 256; b <= 1792; b++) begin
    if (b == 1024) continue;
    pr  = GEN_AMP * gen_cos[(phase[b] % 8) * 256];
    pim = GEN_AMP * gen_sin[(phase[b] % 8) * 256];
    for (int t = 0; t < GEN_N; t++) begin
      int m = (b * t) % GEN_N;
      xr[t] += pr * gen_cos[m] - pim * gen_sin[m];
      xi[t] += pr * gen_sin[m] + pim * gen_cos[m];
    end
  end
  for (int t = 0; t < GEN_N + GEN_CP; t++) begin
    int src = (t + GEN_N - GEN_CP) % GEN_N;
    gen_re[at + t] = gen_clip(xr[src]);
    gen_im[at + t] = gen_clip(xi[src]);
  end
endfunction

function automatic void gen_frame(input int ndata);
  int phase [GEN_N];
  int q, b0, b1, at;
  gen_re   = new[GEN_NULL + (ndata + 1) * (GEN_N + GEN_CP)];
  gen_im   = new[GEN_NULL + (ndata + 1) * (GEN_N + GEN_CP)];
  gen_bits = new[ndata * 2 * GEN_K];
  for (int t = 0; t < GEN_NULL; t++) begin gen_re[t] = 0; gen_im[t] = 0; end
  for (int b = 0; b < GEN_N; b++) begin q = $urandom_range(0, 3); phase[b] = 2 * q; end
  at = GEN_NULL;
  gen_symbol(phase, at);
  at += GEN_N + GEN_CP;
  for (int l = 0; l < ndata; l++) begin
    for (int n = 0; n < GEN_K; n++) begin
      b0 = $urandom_range(0, 1);
      b1 = $urandom_range(0, 1);
      gen_bits[l * 2 * GEN_K + n]         = b0[0];
      gen_bits[l * 2 * GEN_K + GEN_K + n] = b1[0];
      q = (b0 == 0) ? ((b1 == 0) ? 1 : 7) : ((b1 == 0) ? 3 : 5);
      phase[gen_seq[n]] = (phase[gen_seq[n]] + q) % 8;
    end
    gen_symbol(phase, at);
    at += GEN_N + GEN_CP;
  end
endfunction
