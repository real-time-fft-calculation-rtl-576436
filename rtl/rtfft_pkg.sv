// rtfft_pkg: sizes and types shared by the real-time multi-channel FFT
// acquisition path.
//
// The numbers follow the design it implements: 16 input channels of 16-bit
// samples, 512-point transforms, 1024-word input FIFOs and 16384 x 32 bit
// result RAMs.  The block exponent width (6 bits) is this design's own
// choice; it is the width a 512-point block-floating-point FFT needs.
package rtfft_pkg;

  localparam int unsigned CHANNELS   = 16;     // analog input channels
  localparam int unsigned FFT_N      = 512;    // points per transform
  localparam int unsigned SAMPLE_W   = 16;     // ADC sample width
  localparam int unsigned FIFO_DEPTH = 1024;   // words per input FIFO
  localparam int unsigned RAM_DEPTH  = 16384;  // words per result RAM
  localparam int unsigned RAM_W      = 32;     // bits per result RAM word
  localparam int unsigned EXP_W      = 6;      // FFT block exponent width

  // The three operation cycles of a result RAM, plus "free".
  typedef enum logic [1:0] {
    BANK_FREE    = 2'd0,  // empty, may start a new frame
    BANK_RAW     = 2'd1,  // cycle 1: accepting raw samples (FFT words may also arrive)
    BANK_FFT     = 2'd2,  // cycle 2: raw complete, accepting remaining FFT words
    BANK_READOUT = 2'd3   // cycle 3: shifted out towards the PCI Express side
  } bank_state_t;

endpackage
