// seizure_pkg: constants, types and constant functions shared by the EEG
// seizure detection and analysis design.
//
// The numbers that come from the published design are the channel count
// (16), the ADC width (16 bits), the FIR length (33 taps), the FFT size
// (128 points), the EEG band edges (theta 4-7 Hz, alpha 8-12 Hz, beta
// 13-29 Hz, gamma 30-50 Hz) and the 173.61 Hz sampling rate of the EEG
// recordings the design was evaluated with. Internal FFT and energy widths
// are this implementation's own choice.
//
// Band-to-bin mapping: bin k of an N-point FFT sits at k*FS/N Hz. A band
// [f_lo, f_hi] covers the bins with f_lo <= k*FS/N <= f_hi, i.e.
//   k_lo = ceil(f_lo*N/FS),  k_hi = floor(f_hi*N/FS).
// At FS = 173.61 Hz and N = 128 (1.356 Hz per bin) this gives
// theta 3..5, alpha 6..8, beta 10..21, gamma 23..36.
package seizure_pkg;

  localparam int unsigned NUM_CH    = 16;
  localparam int unsigned SAMPLE_W  = 16;
  localparam int unsigned FIR_TAPS  = 33;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned CNT_W     = 16;
  localparam int unsigned FFT_N     = 128;
  localparam int unsigned FFT_DW    = 24;   // internal FFT width, no overflow for 16-bit input
  localparam int unsigned TW_W      = 16;   // twiddle width
  localparam int unsigned TW_FRAC   = 14;   // Q1.14: 1.0 = 16384
  localparam int unsigned POWER_W   = 2*FFT_DW + 1;
  localparam int unsigned ENERGY_W  = 64;
  localparam int unsigned NUM_BANDS = 4;
  localparam int unsigned FS_MHZ    = 173610;  // sampling rate in millihertz

  typedef enum logic [1:0] {
    BAND_THETA = 2'd0,
    BAND_ALPHA = 2'd1,
    BAND_BETA  = 2'd2,
    BAND_GAMMA = 2'd3
  } band_e;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [ENERGY_W-1:0] energy_t;

  // Band edges in Hz.
  function automatic int unsigned band_lo_hz(int unsigned b);
    case (b)
      0: return 4;
      1: return 8;
      2: return 13;
      default: return 30;
    endcase
  endfunction

  function automatic int unsigned band_hi_hz(int unsigned b);
    case (b)
      0: return 7;
      1: return 12;
      2: return 29;
      default: return 50;
    endcase
  endfunction

  // First and last FFT bin of band b (see header for the formula).
  function automatic int unsigned band_bin_lo(int unsigned b, longint unsigned n, longint unsigned fs_mhz);
    longint unsigned num;
    num = longint'(band_lo_hz(b)) * 1000 * n;
    return int'((num + fs_mhz - 1) / fs_mhz);
  endfunction

  function automatic int unsigned band_bin_hi(int unsigned b, longint unsigned n, longint unsigned fs_mhz);
    longint unsigned num;
    num = longint'(band_hi_hz(b)) * 1000 * n;
    return int'(num / fs_mhz);
  endfunction

endpackage
