// Shared constants of the under-sampling frequency meter.
//
// The meter samples one real analog input with P low-rate ADCs, takes an
// N-point FFT of each ADC stream, picks the strongest bin of each spectrum
// and combines the P aliased frequencies into one estimate of the analog
// frequency. The numbers below are those of the main configuration: three
// ADCs at 184, 192 and 200 MHz, 2048-point FFTs and an input band of
// 0..2 GHz. Frequencies are carried as unsigned integers in Hz.
//
// ADC_W (14 bits) is a choice of this design, consistent with the 15-bit
// width of a sum of two samples in the method's fixed-point analysis.
// TW_W (18 bits) is the twiddle width of that analysis.
package usfm_pkg;

  localparam int unsigned P        = 3;       // number of ADCs / FFT channels
  localparam int unsigned N_FFT    = 2048;    // FFT length per channel
  localparam int unsigned ADC_W    = 14;      // ADC sample width (signed)
  localparam int unsigned TW_W     = 18;      // twiddle factor width (signed)
  localparam int unsigned FREQ_W   = 32;      // frequency word, Hz

  localparam logic [FREQ_W-1:0] F_MAX_HZ = 32'd2_000_000_000;

  // Sampling frequencies, channel 0 first (f_s1, f_s2, f_s3).
  localparam logic [P-1:0][FREQ_W-1:0] FS_HZ = {
    32'd200_000_000,   // channel 2: f_s3
    32'd192_000_000,   // channel 1: f_s2
    32'd184_000_000    // channel 0: f_s1
  };

endpackage
