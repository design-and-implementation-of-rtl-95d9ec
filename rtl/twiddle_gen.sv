// twiddle_gen: the twiddle generator shared by the six stages of the serial FFT.
//
// Each stage s presents an exponent k[s] (0 .. N/2-1) and receives W = exp(-j*2*pi*k/N)
// in Q2.30, or its conjugate exp(+j*2*pi*k/N) when inverse is high; conjugating the
// twiddle is how the same FFT hardware computes the inverse transform. The cosine/sine
// table of N/2 entries is computed at elaboration time; the lookups are combinational.
// Conjugation for the inverse follows the design; the table format is this
// implementation's choice.
module twiddle_gen import nc_pkg::*; #(
  parameter int N      = N_FFT,
  parameter int PORTS  = LOG2N,
  localparam int KW    = $clog2(N) - 1
) (
  input  logic          inverse,
  input  logic [KW-1:0] k   [PORTS],
  output data_t         w_re [PORTS],
  output data_t         w_im [PORTS]
);
  typedef data_t tab_t [N/2];

  function automatic tab_t make_cos();
    tab_t t;
    for (int i = 0; i < N/2; i++)
      t[i] = data_t'(longint'($floor($cos(2.0 * PI * i / N) * (2.0 ** TW_FRAC) + 0.5)));
    return t;
  endfunction

  function automatic tab_t make_sin();
    tab_t t;
    for (int i = 0; i < N/2; i++)
      t[i] = data_t'(longint'($floor($sin(2.0 * PI * i / N) * (2.0 ** TW_FRAC) + 0.5)));
    return t;
  endfunction

  localparam tab_t COS_T = make_cos();
  localparam tab_t SIN_T = make_sin();

  always_comb
    for (int p = 0; p < PORTS; p++) begin
      w_re[p] = COS_T[k[p]];
      w_im[p] = inverse ? SIN_T[k[p]] : -SIN_T[k[p]];
    end
endmodule
