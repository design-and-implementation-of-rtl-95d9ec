// nc_pkg: types and constants shared by the spectral-subtraction noise canceller.
//
// The datapath is 32 bits wide throughout. Audio samples are 16-bit signed integers; once
// windowed they carry FRAC extra fraction bits, so a full-scale sample is 2^21 and a 64-point
// spectrum bin stays below 2^28. Twiddle factors and the CORDIC gain constant are Q2.30.
// Phases are binary angles: 2^32 is one full turn, so angle arithmetic wraps for free.
// The 32-bit data width, 64-point FFT and 32-sample hop come from the design; the 16-bit
// sample width, FRAC and the Q formats are this implementation's choices.
package nc_pkg;
  localparam int N_FFT    = 64;  // FFT points
  localparam int LOG2N    = 6;
  localparam int HOP      = 32;  // new samples per frame (half overlap)
  localparam int DATA_W   = 32;  // datapath width
  localparam int SAMPLE_W = 16;  // codec sample width
  localparam int FRAC     = 6;   // fraction bits added to samples after windowing
  localparam int TW_FRAC  = 30;  // fraction bits of twiddles and CORDIC constants
  localparam int ANG_W    = 32;  // phase width, binary angle
  localparam real PI      = 3.14159265358979323846;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [ANG_W-1:0]         angle_t;
  typedef logic [SAMPLE_W-1:0]      sample_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  // CORDIC operating mode, as selected by the "mode" input of the CORDIC core.
  typedef enum logic {
    CORDIC_VEC = 1'b0,   // rectangular to polar (vectoring)
    CORDIC_ROT = 1'b1    // polar to rectangular (rotation)
  } cordic_mode_e;

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] a);
    for (int i = 0; i < LOG2N; i++) bitrev[i] = a[LOG2N-1-i];
  endfunction
endpackage
