// hann_window: multiplies each sample of a 64-sample frame by a Hanning window.
//
// The coefficient table is computed at elaboration time as the periodic Hann window
// w[n] = 0.5 * (1 - cos(2*pi*n/N)), n = 0..N-1, rounded to Q1.15 (17 bits, w[N/2] = 1.0).
// The periodic form makes two half-overlapped windows add up to exactly one, which the
// overlap-add output stage relies on. The product is shifted so that the result keeps
// FRAC fraction bits: out = (x * w[n]) >>> (15 - FRAC).
// Interface: in_valid/in_idx/in_data in, out_valid/out_idx/out_data one clock later.
// The window type is the design's; the table format and the one-cycle latency are this
// implementation's choices.
module hann_window import nc_pkg::*; #(
  parameter int N     = N_FFT,
  parameter int W_FRAC = 15,
  localparam int AW   = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [AW-1:0]              in_idx,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic [AW-1:0]              out_idx,
  output data_t                      out_data
);
  typedef logic [W_FRAC+1:0] coef_t;  // unsigned, 0 .. 1.0
  typedef coef_t coef_tab_t [N];

  function automatic coef_tab_t make_window();
    coef_tab_t t;
    for (int n = 0; n < N; n++)
      t[n] = coef_t'(longint'(0.5 * (1.0 - $cos(2.0 * PI * n / N)) * (2.0 ** W_FRAC)));
    return t;
  endfunction

  localparam coef_tab_t WIN = make_window();

  logic signed [SAMPLE_W+W_FRAC+2:0] prod;
  assign prod = in_data * $signed({1'b0, WIN[in_idx]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_idx   <= in_idx;
      out_data  <= data_t'(prod >>> (W_FRAC - FRAC));
    end
  end
endmodule
