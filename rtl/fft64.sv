// fft64: 64-point serial FFT/IFFT, six radix-2 stages with feedback delay lines.
//
// Samples enter in natural order, one per clock while in_valid is high (gaps stall the
// pipeline). After the 64th sample the core flushes itself for 63 more clocks, feeding
// zeros, and during the last 64 of those clocks out_valid is high and the spectrum leaves
// in bit-reversed order; out_idx gives the natural bin number of each output word.
// The stages have delay lines of 32, 16, 8, 4, 2 and 1 words. After each stage but the
// last, the differences of the butterfly are multiplied by W_N^(n * 2^s) from the shared
// twiddle generator (stage s, position n). inverse, sampled with the first sample of a
// frame, conjugates all twiddles and divides the result by N: the same hardware then
// computes the IFFT. out_inverse tells which transform the output belongs to.
// Latency: output k of a frame leaves 64 + k clocks after its first input (no stalls).
// Serial input, the butterfly/delay/twiddle chain and the IFFT by conjugated twiddles
// and division by N follow the design. Delay lengths that halve from stage to stage,
// the self-flush, truncating fixed point and the output register are this
// implementation's choices.
module fft64 import nc_pkg::*; #(
  parameter int N = N_FFT,
  localparam int L = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         inverse,
  input  cplx_t        in_data,
  output logic         out_valid,
  output logic [L-1:0] out_idx,
  output cplx_t        out_data,
  output logic         out_inverse
);
  logic [L:0] g;        // advances since the first sample of the frame, 0 .. 2N-2
  logic       adv;
  logic       inv_q, inv_cur;

  assign adv     = (g < (L+1)'(N)) ? in_valid : 1'b1;
  assign inv_cur = (g == '0) ? inverse : inv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g     <= '0;
      inv_q <= 1'b0;
    end else if (adv) begin
      g <= (g == (L+1)'(2*N-2)) ? '0 : g + 1'b1;
      if (g == '0) inv_q <= inverse;
    end
  end

  cplx_t          sd   [L+1];  // sd[s] is the input of stage s
  logic  [L-2:0]  tk   [L];
  data_t          tw_re [L], tw_im [L];
  logic           diff [L];

  assign sd[0] = (g < (L+1)'(N)) ? in_data : '0;

  twiddle_gen #(.N(N), .PORTS(L)) u_tw (
    .inverse(inv_cur), .k(tk), .w_re(tw_re), .w_im(tw_im)
  );

  for (genvar s = 0; s < L; s++) begin : g_stage
    localparam int D  = N >> (s + 1);
    localparam int PW = $clog2(2 * D);
    cplx_t          bf_out;
    logic [PW-1:0]  twk;

    fft_sdf_stage #(.D(D)) u_stage (
      .clk(clk), .adv(adv), .pos(g[PW-1:0]), .in(sd[s]),
      .out(bf_out), .is_diff(diff[s]), .twk(twk)
    );

    if (D > 1) begin : g_twiddle
      localparam int PWW = 2 * DATA_W;
      logic signed [PWW-1:0] pr, pi;
      // twiddle exponent n * 2^s for position n; W^0 = 1 outside the difference half
      assign tk[s] = diff[s] ? (L-1)'(twk) << s : '0;
      assign pr = PWW'(bf_out.re) * tw_re[s] - PWW'(bf_out.im) * tw_im[s];
      assign pi = PWW'(bf_out.re) * tw_im[s] + PWW'(bf_out.im) * tw_re[s];
      assign sd[s+1].re = data_t'(pr >>> TW_FRAC);
      assign sd[s+1].im = data_t'(pi >>> TW_FRAC);
    end else begin : g_last
      assign tk[s]   = '0;
      assign sd[s+1] = bf_out;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_idx     <= '0;
      out_data    <= '0;
      out_inverse <= 1'b0;
    end else begin
      out_valid   <= adv && (g >= (L+1)'(N-1));
      out_idx     <= bitrev(L'(g - (L+1)'(N-1)));
      out_inverse <= inv_q;
      if (inv_q) begin
        out_data.re <= sd[L].re >>> L;
        out_data.im <= sd[L].im >>> L;
      end else begin
        out_data <= sd[L];
      end
    end
  end
endmodule
