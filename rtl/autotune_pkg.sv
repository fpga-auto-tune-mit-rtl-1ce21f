// Shared constants and types of the frequency-domain auto-tune design.
//
// The pitch detector works on frames of 2048 oversampled audio samples. The
// ADC delivers 12-bit samples at 1 Msps; 64x averaging yields 15-bit samples
// at 15.625 kHz (microphone path). The on-chip test tone is averaged 16x and
// yields 16.25 kHz. FFT magnitudes are carried as 24-bit words, and the
// pitch is handed to the tone generator as a 32-bit frequency control word
// (fcw = 2^32 * f / fs). All of these numbers follow the document; the
// magnitude pipeline width and the effect encoding order of the switches
// are taken from the text as well.
package autotune_pkg;

  localparam int unsigned FRAME_LEN   = 2048;  // FFT transform length
  localparam int unsigned FRAME_AW    = 11;    // log2(FRAME_LEN)
  localparam int unsigned ADC_W       = 12;    // ADC sample width
  localparam int unsigned OSAMPLE_W   = 15;    // oversampled sample width
  localparam int unsigned FFT_W       = 16;    // real / imaginary width at the FFT
  localparam int unsigned MAG_W       = 24;    // magnitude word width
  localparam int unsigned FCW_W       = 32;    // phase accumulator width
  localparam int unsigned AUDIO_W     = 12;    // sine table amplitude width

  // Audio sample rates of the two input sources, in Hz.
  localparam int unsigned FS_MIC_HZ   = 15625;
  localparam int unsigned FS_SINE_HZ  = 16250;

  // Playback effect chosen by switches 1 and 2.
  typedef enum logic [1:0] {
    FX_NONE     = 2'd0,   // corrected tone only
    FX_HARMONY  = 2'd1,   // corrected tone plus a major third (5/4 f)
    FX_CHIPMUNK = 2'd2,   // one octave up (2 f)
    FX_VADER    = 2'd3    // one octave down (f / 2)
  } effect_e;

endpackage
