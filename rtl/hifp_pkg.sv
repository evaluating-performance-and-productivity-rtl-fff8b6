// hifp_pkg: constants and types shared by the HiFP2.0 fingerprint engine.
//
// HiFP2.0 turns one song of 131,072 PCM samples into a 4096-bit fingerprint
// (FPID). Every 32 samples give one frame: the first 8 of them are averaged
// by a three-level Haar wavelet low band into one value, and frame i's bit is
// 1 when that value is greater than frame i+1's (the value after the last
// frame is taken as zero). The numbers below are the algorithm's own; the
// phase encoding is this implementation's choice.
package hifp_pkg;

  // Frames (fingerprint bits) per song.
  localparam int unsigned FRAMES            = 4096;
  // Input samples consumed per frame, and how many of them enter the DWT.
  localparam int unsigned SAMPLES_PER_FRAME = 32;
  localparam int unsigned DWT_TAPS          = 8;
  // PCM sample width.
  localparam int unsigned SAMPLE_W          = 16;

  // Phases of one work-group (one song) in the compute unit.
  typedef enum logic [2:0] {
    PH_IDLE    = 3'd0,  // waiting for a kernel launch
    PH_LOAD    = 3'd1,  // lanes fetch 8 samples per frame and run the DWT
    PH_BARRIER = 3'd2,  // all requests issued, waiting for the last DWT write
    PH_EXTRACT = 3'd3,  // lanes compare adjacent DWT samples
    PH_MERGE   = 3'd4   // sub_fpid is copied to the global FPID array
  } phase_e;

endpackage
