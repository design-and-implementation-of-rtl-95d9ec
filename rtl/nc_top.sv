// nc_top: real-time spectral-subtraction noise canceller.
//
// A noisy audio stream arrives from the codec at 12 kHz (clk_a), 16-bit samples. Every 32
// samples (one hop) a 64-sample frame made of the previous and the new 32 samples is
// processed in the 10 MHz clock domain (clk):
//   input buffers -> Hanning window -> FFT -> Buffer 64 -> CORDIC (rect to polar)
//   -> noise canceller -> CORDIC (polar to rect) -> IFFT -> overlap-add buffers -> codec.
// One FFT core serves as FFT and IFFT and one CORDIC core serves both conversions; the
// multiplexers in front of them pick the source by the phase of the frame, and each core
// tags its outputs (inverse, mode) so the results are routed back the right way.
// The frame takes about 400 clocks (the design's diagram counts 384 without pipeline
// registers), far less than the 833 clocks of a sample period at 10 MHz. Because the
// input and output buffers are handed over at hop boundaries, processing must end within
// one sample period: clk must be at least about 480 times the sample rate.
// Ports: codec side clk_a/rst_a_n/smp_in/smp_out; processing side clk/rst_n; learn
// restarts noise sampling; the status outputs show the mode and the per-frame decisions.
// smp_out lags smp_in by two hops: one for framing and one because residual-noise
// reduction looks one frame ahead.
// Both resets are asserted together at power-up; the codec side must see its reset before
// clk leaves reset. The two exclusivity assertions are gated by rst_n, so it is also read
// synchronously there; that use is for simulation only.
module nc_top import nc_pkg::*; (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clk_a,
  input  logic                       rst_a_n,
  input  logic signed [SAMPLE_W-1:0] smp_in,
  output logic signed [SAMPLE_W-1:0] smp_out,
  input  logic                       learn,
  output logic                       sampling,
  output logic                       busy,
  output logic                       overrun,
  output logic                       frame_done,
  output logic                       frame_speech,
  output logic [LOG2N:0]             resid_bins,
  output logic [15:0]                frame_cycles
);
  localparam int AW = LOG2N;
  localparam int HW = $clog2(HOP);

  // ---------------- input buffers and window ----------------
  logic [HW-1:0]              a_idx;
  logic                       hop_start;
  logic                       in_rd_en;
  logic [AW-1:0]              in_rd_idx;
  logic                       fr_valid;
  logic [AW-1:0]              fr_pos;
  logic signed [SAMPLE_W-1:0] fr_data;

  input_framer #(.HOP_N(HOP)) u_framer (
    .clk_a(clk_a), .rst_a_n(rst_a_n), .smp_in(smp_in), .a_idx(a_idx),
    .clk(clk), .rst_n(rst_n), .hop_start(hop_start),
    .rd_en(in_rd_en), .rd_idx(in_rd_idx),
    .rd_valid(fr_valid), .rd_pos(fr_pos), .rd_data(fr_data)
  );

  logic          win_valid;
  logic [AW-1:0] win_idx;   // position within the frame (the FFT counts for itself)
  data_t         win_data;

  hann_window #(.N(N_FFT)) u_window (
    .clk(clk), .rst_n(rst_n), .in_valid(fr_valid), .in_idx(fr_pos), .in_data(fr_data),
    .out_valid(win_valid), .out_idx(win_idx), .out_data(win_data)
  );

  // ---------------- CORDIC (shared) ----------------
  logic         cor_out_valid;
  cordic_mode_e cor_out_mode;
  data_t        cor_out1, cor_out2;

  // ---------------- FFT / IFFT (shared) ----------------
  logic          fft_in_valid, fft_inverse;
  cplx_t         fft_in;
  logic          fft_out_valid, fft_out_inverse;
  logic [AW-1:0] fft_out_idx;
  cplx_t         fft_out;

  always_comb begin
    if (cor_out_valid && cor_out_mode == CORDIC_ROT) begin   // IFFT input from the CORDIC
      fft_in_valid = 1'b1;
      fft_inverse  = 1'b1;
      fft_in       = '{re: cor_out1, im: cor_out2};
    end else begin                                           // FFT input from the window
      fft_in_valid = win_valid;
      fft_inverse  = 1'b0;
      fft_in       = '{re: win_data, im: '0};
    end
  end

  fft64 #(.N(N_FFT)) u_fft (
    .clk(clk), .rst_n(rst_n), .in_valid(fft_in_valid), .inverse(fft_inverse),
    .in_data(fft_in), .out_valid(fft_out_valid), .out_idx(fft_out_idx),
    .out_data(fft_out), .out_inverse(fft_out_inverse)
  );

  // ---------------- Buffer 64 (spectrum, natural order) ----------------
  logic          b64_rd_en, b64_valid;
  logic [AW-1:0] b64_rd_idx;
  cplx_t         b64_q;

  sample_buffer #(.DEPTH(N_FFT), .WIDTH(2 * DATA_W)) u_buf64 (
    .wclk(clk), .we(fft_out_valid && !fft_out_inverse), .waddr(fft_out_idx), .wdata(fft_out),
    .rclk(clk), .raddr(b64_rd_idx), .rdata(b64_q)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) b64_valid <= 1'b0;
    else        b64_valid <= b64_rd_en;

  // ---------------- noise canceller ----------------
  logic   nc_out_valid;
  data_t  nc_out_mag;
  angle_t nc_out_phase;

  noise_cancel #(.N(N_FFT)) u_nc (
    .clk(clk), .rst_n(rst_n), .learn(learn),
    .in_valid(cor_out_valid && cor_out_mode == CORDIC_VEC),
    .in_mag(cor_out1), .in_phase(angle_t'(cor_out2)),
    .out_valid(nc_out_valid), .out_mag(nc_out_mag), .out_phase(nc_out_phase),
    .sampling(sampling), .frame_done(frame_done), .frame_speech(frame_speech),
    .resid_bins(resid_bins)
  );

  // CORDIC input selection: spectrum bins (vectoring) or cleaned bins (rotation).
  logic         cor_in_valid;
  cordic_mode_e cor_mode;
  data_t        cor_in1, cor_in2;

  always_comb begin
    if (nc_out_valid) begin
      cor_in_valid = 1'b1;
      cor_mode     = CORDIC_ROT;
      cor_in1      = nc_out_mag;
      cor_in2      = data_t'(nc_out_phase);
    end else begin
      cor_in_valid = b64_valid;
      cor_mode     = CORDIC_VEC;
      cor_in1      = b64_q.re;
      cor_in2      = b64_q.im;
    end
  end

  cordic #(.ITER(29), .STAGES(5)) u_cordic (
    .clk(clk), .clr(!rst_n), .in_valid(cor_in_valid), .mode(cor_mode),
    .input1(cor_in1), .input2(cor_in2),
    .out_valid(cor_out_valid), .out_mode(cor_out_mode),
    .output1(cor_out1), .output2(cor_out2)
  );

  // ---------------- output: half overlap-add ----------------
  overlap_add #(.HOP_N(HOP)) u_ola (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fft_out_valid && fft_out_inverse), .in_idx(fft_out_idx), .in_data(fft_out.re),
    .clk_a(clk_a), .rst_a_n(rst_a_n), .a_idx(a_idx), .smp_out(smp_out)
  );

  // ---------------- sequencer ----------------
  logic ctrl_done;

  nc_ctrl #(.N(N_FFT)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .hop_start(hop_start),
    .fft_out_valid(fft_out_valid), .fft_out_inverse(fft_out_inverse),
    .in_rd_en(in_rd_en), .in_rd_idx(in_rd_idx),
    .b64_rd_en(b64_rd_en), .b64_rd_idx(b64_rd_idx),
    .busy(busy), .done(ctrl_done), .overrun(overrun), .frame_cycles(frame_cycles)
  );

  // The shared cores are never asked for two things at once.
  always_ff @(posedge clk)
    if (rst_n) begin
      a_cordic_exclusive: assert (!(nc_out_valid && b64_valid))
        else $error("CORDIC requested by both paths");
      a_fft_exclusive: assert (!(win_valid && cor_out_valid && cor_out_mode == CORDIC_ROT))
        else $error("FFT requested by both paths");
    end
endmodule
