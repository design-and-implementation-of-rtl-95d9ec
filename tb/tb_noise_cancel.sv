// tb_noise_cancel: self-checking test of the noise cancellation circuit.
//
// A reference model written here follows the algorithm step by step: noise mean and
// maximum learnt over the sampling frames, the rectified spectral subtraction filter,
// residual-noise reduction against max - mean with the minimum over the previous,
// present and next frames, and the -12 dB speech decision on the frame's mean
// |S|/|X| ratio. Frames of random noise, some with strong "speech" bins and some with
// weak ones, are sent through; every output bin (magnitude and phase) and every
// per-frame flag is compared with the model. The run restarts noise sampling once with
// learn. It also checks the timing: the cleaned frame starts 64 clocks after the last
// input bin and lasts 64 clocks, and counts that each mechanism occurred.
module tb_noise_cancel;
  import nc_pkg::*;
  localparam int N = 64, M = 16, HF = 16, TH = 16462;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   learn = 1'b0, in_valid = 1'b0;
  data_t  in_mag = '0;
  angle_t in_phase = '0;
  logic   out_valid, sampling, frame_done, frame_speech;
  data_t  out_mag;
  angle_t out_phase;
  logic [6:0] resid_bins;

  noise_cancel dut (.*);

  int checks = 0, failures = 0;
  int n_speech = 0, n_silent = 0, n_resid = 0, n_rect = 0, n_sampling = 0, n_learn = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint sum_m [N], mean_m [N], max_m [N];
  longint nx_x [N], nx_s [N], pr_x [N], pr_s [N], pv_s [N];
  longint nx_p [N], pr_p [N];
  int     sframe = 0;
  bit     smp = 1'b1;

  longint fx [N], fp [N];
  longint exp_mag [N], exp_ph [N];
  bit     exp_speech;
  int     exp_resid;

  function automatic longint hr_s(input longint m, input longint mu);
    longint g;
    if (m <= 0 || mu >= m) g = 0;
    else                   g = (1 << HF) - ((mu << HF) / m);
    return (m * g) >> HF;
  endfunction

  task automatic model_frame();
    longint rsum = 0;
    exp_resid = 0;
    // phase 1
    for (int k = 0; k < N; k++) begin
      if (smp) begin
        sum_m[k] = (sframe == 0 ? 0 : sum_m[k]) + fx[k];
        if (sframe == M - 1) mean_m[k] = sum_m[k] / M;
        max_m[k] = (sframe == 0 || fx[k] > max_m[k]) ? fx[k] : max_m[k];
        nx_s[k] = 0;
      end else begin
        nx_s[k] = hr_s(fx[k], mean_m[k]);
        if (fx[k] <= mean_m[k]) n_rect++;
      end
      nx_x[k] = fx[k];
      nx_p[k] = fp[k];
    end
    // phase 2 (during sampling the mean memory holds partial sums; only the muted output
    // depends on it then, so the model needs no detail there)
    for (int k = 0; k < N; k++) begin
      longint mres, t, mn, r, mu;
      mu   = smp ? (sframe == M - 1 ? mean_m[k] : sum_m[k] & 64'hffffffff) : mean_m[k];
      mres = (max_m[k] > mu) ? max_m[k] - mu : 0;
      mn = pr_s[k];
      if (nx_s[k] < mn) mn = nx_s[k];
      if (pv_s[k] < mn) mn = pv_s[k];
      t = (pr_s[k] >= mres) ? pr_s[k] : mn;
      if (pr_s[k] < mres) exp_resid++;
      r = (pr_x[k] <= 0) ? 0 : (t << HF) / pr_x[k];
      if (r > (1 << HF)) r = 1 << HF;
      rsum += r;
      exp_mag[k] = t;
      exp_ph[k]  = pr_p[k];
      pv_s[k] = pr_s[k];
      pr_s[k] = nx_s[k];
      pr_x[k] = nx_x[k];
      pr_p[k] = nx_p[k];
    end
    exp_speech = !smp && (rsum >= N * TH);
    for (int k = 0; k < N; k++) if (!exp_speech) exp_mag[k] = 0;
  endtask

  task automatic model_end_of_frame(input bit lrn);
    if (lrn) begin
      smp = 1'b1;
      sframe = 0;
    end else if (smp) begin
      if (sframe == M - 1) smp = 1'b0;
      sframe++;
    end
  endtask

  // frame kinds: 0 noise, 1 strong speech, 2 weak speech in a few bins
  task automatic make_frame(input int kind);
    for (int k = 0; k < N; k++) begin
      fx[k] = 1000 + $urandom_range(1000, 0);
      fp[k] = $urandom();
      if (kind == 1 && (k % 4) == 1) fx[k] = 200000 + $urandom_range(100000, 0);
      if (kind == 2 && (k % 16) == 3) fx[k] = 2600 + $urandom_range(200, 0);
    end
  endtask

  task automatic run_frame(input int kind, input bit lrn, input bit check_out);
    int t_last_in, t_first_out, t_last_out, cyc, got;
    bit was_smp;
    make_frame(kind);
    was_smp = smp;
    model_frame();
    cyc = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_mag   = data_t'(fx[k]);
      in_phase = angle_t'(fp[k]);
    end
    @(negedge clk);
    in_valid = 1'b0;
    if (lrn) learn = 1'b1;
    @(negedge clk);
    learn = 1'b0;
    t_last_in = -1;
    got = 0;
    t_first_out = 0;
    t_last_out = 0;
    while (got < N) begin
      @(posedge clk);
      #1;
      cyc++;
      if (frame_done && check_out) begin
        checks += 2;
        if (frame_speech != exp_speech) begin
          failures++;
          $display("frame_speech %0d want %0d", frame_speech, exp_speech);
        end
        if (int'(resid_bins) != exp_resid) begin
          failures++;
          $display("resid_bins %0d want %0d", resid_bins, exp_resid);
        end
      end
      if (frame_done) begin
        if (!was_smp && exp_speech) n_speech++;
        if (!was_smp && !exp_speech) n_silent++;
        if (!was_smp && exp_resid > 0) n_resid++;
      end
      if (out_valid) begin
        if (got == 0) t_first_out = cyc;
        t_last_out = cyc;
        if (check_out) begin
          checks++;
          if (longint'(out_mag) != exp_mag[got] ||
              (exp_mag[got] != 0 && longint'(out_phase) != exp_ph[got])) begin
            failures++;
            $display("bin %0d: got %0d/%0h want %0d/%0h", got, out_mag, out_phase,
                     exp_mag[got], exp_ph[got]);
          end
        end
        got++;
      end
    end
    // the last input was taken one clock before the loop started: the output must
    // start N clocks after it (phase 2) and take N clocks (phase 3)
    checks++;
    if (t_first_out != N - 1 || t_last_out != 2 * N - 2) begin
      failures++;
      $display("timing: first out %0d last out %0d", t_first_out, t_last_out);
    end
    if (was_smp) n_sampling++;
    model_end_of_frame(lrn);
    if (lrn) n_learn++;
    @(posedge clk);
    #1;
    checks++;
    if (sampling != smp) begin
      failures++;
      $display("sampling flag %0d want %0d", sampling, smp);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      pr_s[k] = 0; pv_s[k] = 0; pr_x[k] = 0; pr_p[k] = 0; nx_s[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the first frame's present/previous data are not defined yet: skip its output check
    run_frame(0, 1'b0, 1'b0);
    run_frame(0, 1'b0, 1'b0);
    for (int f = 2; f < M; f++) run_frame(0, 1'b0, 1'b1);
    for (int f = 0; f < 30; f++) run_frame(f % 3, 1'b0, 1'b1);
    run_frame(0, 1'b1, 1'b1);                          // restart noise sampling
    for (int f = 0; f < M + 10; f++) run_frame(f % 3, 1'b0, 1'b1);
    checks += 5;
    if (n_speech == 0)   begin failures++; $display("no speech frame"); end
    if (n_silent == 0)   begin failures++; $display("no muted frame"); end
    if (n_resid == 0)    begin failures++; $display("no residual reduction"); end
    if (n_rect == 0)     begin failures++; $display("no rectified bin"); end
    if (n_learn == 0)    begin failures++; $display("no relearn"); end
    $display("frames: sampling %0d speech %0d muted %0d with residual reduction %0d",
             n_sampling, n_speech, n_silent, n_resid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
