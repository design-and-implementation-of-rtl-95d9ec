// noise_cancel: the frequency-domain noise cancellation circuit.
//
// It receives a frame as N (magnitude, phase) bins from the CORDIC and returns the cleaned
// frame as N (magnitude, phase) bins for the inverse path, one frame late: residual-noise
// reduction compares each bin with the same bin of the next frame.
//
// Two modes. Noise sampling (the first M frames after reset or after a pulse on learn):
// the mean memory accumulates each bin's magnitude and receives the mean at the last
// sampling frame; the max memory keeps each bin's largest magnitude; the output is muted.
// Noise cancellation (afterwards), in three phases of N clocks each:
//   1. input  (N bins with in_valid): the spectral subtraction filter H_R = max(1 - mu/|X|, 0)
//      is applied, and (|X|, H_R*|X|, phase) goes to the next-data memory;
//   2. process (N clocks, starts right after the last input): for every bin, the present
//      estimate S_i is kept if S_i >= max|N_R| = max - mean, else replaced by
//      min(S_{i+1}, S_i, S_{i-1}); the result goes to a temporary memory. The memories then
//      shift: previous <= present, present <= next. The frame's ratio
//      T = (1/N) * sum(|S|/|X|) is accumulated;
//   3. output (N clocks with out_valid): the temporary memory is read out, with all bins
//      forced to zero if T < -12 dB (non-speech frame).
// At the end of phase 2 frame_done pulses with frame_speech (T >= -12 dB) and resid_bins
// (how many bins of the frame took the minimum). in_valid is ignored outside phase 1.
// The modes, the mean/max/next/present/previous memories, equations (4)-(10) and the 2 x N
// cycles of processing follow the design. M, the Q1.16 gain format, the residual maximum
// taken as max - mean, the per-bin ratio through a divider, storing the phase with the
// magnitude, and muting during sampling are this implementation's choices.
module noise_cancel import nc_pkg::*; #(
  parameter int N        = N_FFT,
  parameter int M        = 16,     // noise frames averaged in sampling mode (power of two)
  parameter int HF       = 16,     // fraction bits of filter gains and ratios
  parameter int T_THRESH = 16462,  // 10^(-12/20) in Q0.HF: the -12 dB speech threshold
  localparam int AW      = $clog2(N),
  localparam int MW      = $clog2(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          learn,         // restart noise sampling at the next frame
  input  logic          in_valid,
  input  data_t         in_mag,
  input  angle_t        in_phase,
  output logic          out_valid,
  output data_t         out_mag,
  output angle_t        out_phase,
  output logic          sampling,      // high while the current frame is a noise frame
  output logic          frame_done,
  output logic          frame_speech,
  output logic [AW:0]   resid_bins
);
  typedef enum logic [1:0] {PH_IN, PH_PROC, PH_OUT} phase_e;

  typedef struct packed {
    data_t  x;      // |X|
    data_t  s;      // H_R * |X|
    angle_t ph;     // phase of X
  } bin_t;

  typedef struct packed {
    data_t  s;
    angle_t ph;
  } tmp_t;

  localparam int SW = DATA_W + MW;           // width of the running sum

  logic [SW-1:0] mean_mem [N];   // running sum while sampling, then the mean
  data_t         max_mem  [N];
  bin_t          next_mem [N];
  bin_t          pres_mem [N];
  data_t         prev_mem [N];
  tmp_t          temp_mem [N];

  phase_e        ph;
  logic [AW-1:0] k;
  logic [MW-1:0] sframe;
  logic          learn_req;
  logic [AW+HF:0] ratio_sum;
  logic [AW:0]   resid_cnt;
  logic          speech_q;

  // ---------------- phase 1: filter ----------------
  data_t       mean_k;
  logic [HF:0] gain;
  data_t       s_new;
  assign mean_k = data_t'(mean_mem[k]);

  ss_filter #(.HF(HF)) u_filter (.mag(in_mag), .mean(mean_k), .gain(gain), .s_mag(s_new));

  logic [SW-1:0] sum_new;
  assign sum_new = ((sframe == '0) ? '0 : mean_mem[k]) + SW'(in_mag);

  // ---------------- phase 2: residual reduction and ratio ----------------
  data_t max_res, s_p, s_t, s_min;
  bin_t  pres_k, next_k;
  logic  use_min;
  logic [DATA_W+HF-1:0] ratio_q;
  logic [HF:0]          ratio;

  always_comb begin
    pres_k  = pres_mem[k];
    next_k  = next_mem[k];
    max_res = (max_mem[k] > mean_k) ? max_mem[k] - mean_k : '0;
    s_p     = pres_k.s;
    s_min   = s_p;
    if (next_k.s < s_min)    s_min = next_k.s;
    if (prev_mem[k] < s_min) s_min = prev_mem[k];
    use_min = (s_p < max_res);
    s_t     = use_min ? s_min : s_p;
    if (pres_k.x <= 0) ratio_q = '0;
    else               ratio_q = ({{HF{1'b0}}, s_t} << HF) / (DATA_W+HF)'(pres_k.x);
    ratio   = (ratio_q > (DATA_W+HF)'(1 << HF)) ? (HF+1)'(1 << HF) : ratio_q[HF:0];
  end

  // ---------------- sequencing and memories ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph           <= PH_IN;
      k            <= '0;
      sampling     <= 1'b1;
      sframe       <= '0;
      learn_req    <= 1'b0;
      ratio_sum    <= '0;
      resid_cnt    <= '0;
      speech_q     <= 1'b0;
      frame_done   <= 1'b0;
      frame_speech <= 1'b0;
      resid_bins   <= '0;
    end else begin
      frame_done <= 1'b0;
      if (learn) learn_req <= 1'b1;
      unique case (ph)
        PH_IN: if (in_valid) begin
          k <= k + 1'b1;
          if (k == AW'(N-1)) ph <= PH_PROC;
        end
        PH_PROC: begin
          k <= k + 1'b1;
          ratio_sum <= (k == '0 ? '0 : ratio_sum) + (AW+HF+1)'(ratio);
          resid_cnt <= (k == '0 ? '0 : resid_cnt) + (AW+1)'(use_min);
          if (k == AW'(N-1)) begin
            ph           <= PH_OUT;
            speech_q     <= !sampling &&
                            ((ratio_sum + (AW+HF+1)'(ratio)) >= (AW+HF+1)'(N * T_THRESH));
            frame_done   <= 1'b1;
            frame_speech <= !sampling &&
                            ((ratio_sum + (AW+HF+1)'(ratio)) >= (AW+HF+1)'(N * T_THRESH));
            resid_bins   <= resid_cnt + (AW+1)'(use_min);
          end
        end
        PH_OUT: begin
          k <= k + 1'b1;
          if (k == AW'(N-1)) begin
            ph <= PH_IN;
            // mode change at the frame boundary
            if (learn_req || learn) begin
              sampling  <= 1'b1;
              sframe    <= '0;
              learn_req <= 1'b0;
            end else if (sampling) begin
              sframe <= sframe + 1'b1;
              if (sframe == MW'(M-1)) sampling <= 1'b0;
            end
          end
        end
        default: ph <= PH_IN;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (ph == PH_IN && in_valid) begin
      if (sampling) begin
        mean_mem[k] <= (sframe == MW'(M-1)) ? (sum_new >> MW) : sum_new;
        max_mem[k]  <= (sframe == '0 || in_mag > max_mem[k]) ? in_mag : max_mem[k];
        next_mem[k] <= '{x: in_mag, s: '0, ph: in_phase};
      end else begin
        next_mem[k] <= '{x: in_mag, s: s_new, ph: in_phase};
      end
    end
    if (ph == PH_PROC) begin
      temp_mem[k] <= '{s: s_t, ph: pres_k.ph};
      prev_mem[k] <= s_p;
      pres_mem[k] <= next_k;
    end
  end

  // ---------------- phase 3: output ----------------
  tmp_t temp_k;
  assign temp_k    = temp_mem[k];
  assign out_valid = (ph == PH_OUT);
  assign out_mag   = speech_q ? temp_k.s : '0;
  assign out_phase = temp_k.ph;
endmodule
