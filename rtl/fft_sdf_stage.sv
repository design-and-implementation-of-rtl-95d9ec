// fft_sdf_stage: one stage of the 64-point serial FFT, a radix-2 butterfly with its
// feedback delay line (single-path delay feedback, decimation in frequency).
//
// The stage sees one complex sample per advance. Within each block of 2*D samples:
// during the first D the input is pushed into the D-deep delay line and the stage emits
// what leaves the line (the differences of the previous block); during the last D it
// emits line_out + in (the sum half of the butterfly) and pushes line_out - in back.
// is_diff marks a difference on the output and twk (0 .. D-1) is its position, which
// the parent turns into the twiddle exponent. pos is the sample position modulo 2*D,
// supplied by the parent from its frame counter. Everything is combinational except the
// delay line, which shifts when adv is high.
module fft_sdf_stage import nc_pkg::*; #(
  parameter int D = 32,
  localparam int PW = $clog2(2 * D)
) (
  input  logic          clk,
  input  logic          adv,
  input  logic [PW-1:0] pos,
  input  cplx_t         in,
  output cplx_t         out,
  output logic          is_diff,
  output logic [PW-1:0] twk
);
  cplx_t line [D];
  cplx_t line_out, line_in;

  assign line_out = line[D-1];
  assign is_diff  = (pos < PW'(D));
  assign twk      = pos;  // below D whenever is_diff is high

  always_comb begin
    if (is_diff) begin
      out     = line_out;
      line_in = in;
    end else begin
      out.re     = line_out.re + in.re;
      out.im     = line_out.im + in.im;
      line_in.re = line_out.re - in.re;
      line_in.im = line_out.im - in.im;
    end
  end

  always_ff @(posedge clk)
    if (adv) begin
      line[0] <= line_in;
      for (int i = 1; i < D; i++) line[i] <= line[i-1];
    end
endmodule
