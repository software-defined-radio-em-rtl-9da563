// dab_pkg: constants and types shared by the DAB mode I demodulation chain.
//
// The numbers are those of DAB transmission mode I: 2048-point FFT at the
// 2.048 MHz elementary rate, 1536 active carriers, a 504-sample cyclic prefix,
// a 2656-sample Null symbol and 76 OFDM symbols per frame.  The active carriers
// sit in FFT bins 256..1023 and 1025..1792 (bin 1024 is the unused centre
// carrier).  The 16-bit sample width and the 8 clocks per sample are choices of
// this design, not values fixed by the standard.
package dab_pkg;

  // OFDM / frame geometry, transmission mode I (units of T = 1/2.048 MHz)
  localparam int unsigned FFT_N    = 2048;  // T_U, FFT length
  localparam int unsigned LOG2N    = 11;
  localparam int unsigned K_CARR   = 1536;  // active carriers
  localparam int unsigned T_CP     = 504;   // cyclic prefix (Delta)
  localparam int unsigned T_SYM    = 2552;  // T_S = T_U + Delta
  localparam int unsigned T_NULL   = 2656;  // Null symbol
  localparam int unsigned L_SYM    = 76;    // OFDM symbols per frame (Null excluded)

  // Implementation choices
  localparam int unsigned SAMPLE_W       = 16;  // I and Q sample width
  localparam int unsigned CLK_PER_SAMPLE = 8;   // system clocks per 2.048 MHz sample

  // First and last active FFT bin, derived from FFT_N and K_CARR
  localparam int unsigned CARR_LO  = (FFT_N - K_CARR) / 2;      // 256
  localparam int unsigned CARR_HI  = (FFT_N + K_CARR) / 2;      // 1792
  localparam int unsigned CARR_DC  = FFT_N / 2;                 // 1024

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx16_t;

  // Carrier selection of the differential demodulator: bins 256..1023 and
  // 1025..1792 carry data, all others are unused.
  function automatic logic carrier_active(input int unsigned bin,
                                          input int unsigned n,
                                          input int unsigned k);
    int unsigned lo, hi, dc;
    lo = (n - k) / 2;
    hi = (n + k) / 2;
    dc = n / 2;
    return (bin >= lo) && (bin <= hi) && (bin != dc);
  endfunction

endpackage
