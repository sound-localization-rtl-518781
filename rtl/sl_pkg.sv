// sl_pkg: constants and types shared by the sound-localization datapath.
//
// The array is eight INMP441 microphones in a row, wired as four stereo
// pairs on four I2S data lines. Each microphone delivers 24-bit words; the
// time-series memory keeps the 14 most significant bits of each. A chunk is
// 1024 samples per channel, the length of the FFT. The FFT works on complex
// fixed-point values of FFT_W bits per part with TW_W-bit twiddle factors.
// The microphone count, word sizes, chunk length and FFT size are the
// design's stated figures; FFT_W and TW_W are this implementation's choice
// (FFT_W is wide enough that a 14-bit input cannot overflow in ten unscaled
// radix-2 stages).
package sl_pkg;

  localparam int unsigned N_MICS    = 8;    // microphones in the linear array
  localparam int unsigned N_PAIRS   = 4;    // stereo pairs, one SD line each
  localparam int unsigned I2S_W     = 24;   // bits per microphone word
  localparam int unsigned SLOT_BITS = 32;   // SCK periods per channel slot
  localparam int unsigned SAMPLE_W  = 14;   // bits kept per stored sample
  localparam int unsigned FFT_N     = 1024; // FFT length = chunk length
  localparam int unsigned FFT_W     = 26;   // bits per real/imag part in the FFT
  localparam int unsigned TW_W      = 16;   // bits of a twiddle / steering factor

  // Complex fixed-point value as it leaves the FFT.
  typedef struct packed {
    logic signed [FFT_W-1:0] re;
    logic signed [FFT_W-1:0] im;
  } cplx_t;

endpackage
