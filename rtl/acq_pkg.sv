// acq_pkg: constants and types shared by the acquisition block.
//
// The acquisition block searches a two-dimensional grid of code phase
// (one cell per sample of a 1 ms code period) and Doppler frequency for the
// correlation peak of one satellite's PRN Gold code. The numbers that the
// design takes from the signal definition are the 1023-chip code and its
// 1 ms period, the +/-10 kHz Doppler search range and the 16 CORDIC
// iterations. The sampling rate, the sample widths, the number of
// correlators and the Doppler step sizes are this design's own defaults and
// can be overridden where the modules take them as parameters.
package acq_pkg;

  // Signal definition.
  localparam int unsigned CHIPS         = 1023;       // chips per code period
  localparam int unsigned CODE_RATE_HZ  = 1_023_000;  // chip rate

  // Default receiver configuration (this design's choice).
  localparam int unsigned FS_HZ         = 4_092_000;  // 4 samples per chip
  localparam int unsigned NS            = FS_HZ / 1000; // samples per 1 ms code
  localparam int unsigned N_CORR        = 16;         // correlators per bank
  localparam int unsigned SAMPLE_W      = 12;         // front-end I and Q width
  localparam int unsigned WIPE_W        = 14;         // Doppler-wiped sample width
  localparam int unsigned ACC_W         = 28;         // I or Q correlation sum
  localparam int unsigned POW_W         = 2 * ACC_W + 1; // I^2 + Q^2

  // Doppler search (range from the signal definition, steps assumed).
  localparam int          DOPPLER_MAX_HZ = 10_000;
  localparam int          COARSE_STEP_HZ = 500;
  localparam int          FINE_STEP_HZ   = 50;
  localparam int          FINE_BINS      = 11;        // +/-250 Hz around coarse

  // Peak search.
  localparam int unsigned NC            = 64;         // sums per peak batch

  // CORDIC.
  localparam int unsigned CORDIC_ITER   = 16;
  localparam int unsigned ANG_W         = 24;         // angle: 2^ANG_W = one turn
  localparam int unsigned PHASE_W       = 32;         // Doppler NCO accumulator

  // Ratio threshold: unsigned fixed point with 4 fraction bits.
  localparam int unsigned THR_FRAC      = 4;

  typedef enum logic [0:0] {
    SYS_GPS   = 1'b0,   // G2 output from the two-tap phase selector
    SYS_IRNSS = 1'b1    // G2 output from its last stage, G2 loaded per PRN
  } gnss_sys_e;

  // Samples-per-chip exclusion half-width for the second peak: 1 chip.
  function automatic int unsigned excl_samples(int unsigned fs_hz);
    return (fs_hz + CODE_RATE_HZ - 1) / CODE_RATE_HZ;
  endfunction

  // Phase increment of the Doppler NCO for a frequency in Hz:
  // round(f * 2^PHASE_W / fs), two's complement.
  function automatic logic [PHASE_W-1:0] phase_inc(longint f_hz, longint fs_hz);
    longint num;
    num = f_hz * (64'sd1 <<< PHASE_W);
    if (num >= 0) return PHASE_W'((num + fs_hz / 2) / fs_hz);
    else          return PHASE_W'(-((-num + fs_hz / 2) / fs_hz));
  endfunction

endpackage
