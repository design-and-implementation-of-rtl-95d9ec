// tb_nc_snr: signal-to-noise test of the whole noise canceller at its default parameters.
//
// The input is a speech-like signal buried in white noise at an input SNR of 6.4151 dB,
// measured over the whole record. The signal is a burst of 12 harmonics of 375 Hz whose
// pitch and level change from burst to burst. Bursts of 8 hops alternate with pauses of
// 6 hops. The record starts with 20 hops of noise alone: the first 16 frames after reset
// are taken as the noise estimate.
//
// Output SNR is the power of the clean signal over the power of the difference between
// the output and the clean signal delayed by LAG samples. It is measured from the end of
// noise sampling to the end of the record. Checks:
//   * the output SNR is at least 1 dB above the input SNR (the subtraction leaves the
//     noise phase in the speech bins and removes some weak speech, so this error-based
//     measure improves much less than the noise level in the pauses);
//   * noise in the middle of the pauses (48 samples or more from a burst) is reduced by
//     at least 20 dB;
//   * in the bursts the output follows the clean signal (correlation above 0.9);
//   * the frame length is FRAME_CYCLES clocks and no frame overruns.
// The SNR values are printed, and also the ratio of output power in the bursts to output
// power in the pauses, an SNR in the manner of a voice-activity detector.
module tb_nc_snr;
  import nc_pkg::*;

  localparam int  LAG = 97;
  localparam int  FRAME_CYCLES = 396;
  localparam int  LEAD_HOPS = 20;
  localparam int  BURSTS = 5;
  localparam int  ON_HOPS = 8;
  localparam int  OFF_HOPS = 6;
  localparam int  NS = (LEAD_HOPS + BURSTS * (ON_HOPS + OFF_HOPS)) * 32;
  localparam real SNR_IN_DB = 6.4151;

  logic clk = 1'b0, rst_n = 1'b1, clk_a = 1'b0, rst_a_n = 1'b1;
  initial begin   // a real falling edge, so the asynchronous resets act at once
    #1;
    rst_n = 1'b0;
    rst_a_n = 1'b0;
  end
  always #50    clk   = ~clk;           // 10 MHz
  always #41667 clk_a = ~clk_a;         // 12 kHz

  logic signed [SAMPLE_W-1:0] smp_in = '0, smp_out;
  logic        learn = 1'b0, sampling, busy, overrun, frame_done, frame_speech;
  logic [6:0]  resid_bins;
  logic [15:0] frame_cycles;

  nc_top dut (.*);

  int checks = 0, failures = 0;
  int n_overrun = 0, n_speech = 0, n_muted = 0;

  initial begin
    #(real'(NS / 32 + 20) * 83334.0 * 32.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  clean_h [NS + LAG + 64];
  int  in_h    [NS + LAG + 64];
  int  out_h   [NS + LAG + 64];
  bit  on_h    [NS + LAG + 64];
  int  ns = 0;

  // Clean signal and noise are made in advance, so the noise can be scaled to the
  // required input SNR before the run starts.
  initial begin
    real nz [NS];
    real ps, pn, scale, v, f0, amp;
    int  burst, hop;
    ps = 0.0;
    pn = 0.0;
    for (int n = 0; n < NS + LAG + 64; n++) begin
      clean_h[n] = 0;
      on_h[n] = 1'b0;
    end
    for (int n = 0; n < NS; n++) begin
      hop = n / 32 - LEAD_HOPS;
      v = 0.0;
      if (hop >= 0 && hop % (ON_HOPS + OFF_HOPS) < ON_HOPS) begin
        burst = hop / (ON_HOPS + OFF_HOPS);
        f0  = 375.0 + 60.0 * real'(burst);
        amp = 1500.0 + 300.0 * real'(burst % 3);
        for (int h = 1; h <= 12; h++)
          v += amp / $sqrt(real'(h)) * $sin(2.0 * PI * f0 * real'(h) * real'(n) / 12000.0 + 0.7 * h * h);
        on_h[n] = 1'b1;
      end
      clean_h[n] = int'(v);
      nz[n] = real'($urandom_range(20000, 0)) / 10000.0 - 1.0;
      ps += real'(clean_h[n]) ** 2;
      pn += nz[n] ** 2;
    end
    scale = $sqrt(ps / pn / (10.0 ** (SNR_IN_DB / 10.0)));
    for (int n = 0; n < NS + LAG + 64; n++) begin
      in_h[n] = (n < NS) ? clean_h[n] + int'(scale * nz[n]) : 0;
      if (in_h[n] > 32767) in_h[n] = 32767;
      if (in_h[n] < -32768) in_h[n] = -32768;
    end
    $display("noise amplitude %0.1f for an input SNR of %0.4f dB", scale, SNR_IN_DB);
  end

  always @(negedge clk_a)
    smp_in <= (ns < NS + LAG + 64) ? SAMPLE_W'(in_h[ns]) : '0;

  always @(posedge clk_a) if (rst_a_n) begin
    #1;
    if (ns < NS + LAG + 64) out_h[ns] = int'(smp_out);
    ns++;
  end

  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (dut.u_ctrl.done) begin
      checks++;
      if (int'(frame_cycles) != FRAME_CYCLES) begin
        failures++;
        $display("frame of %0d clocks, expected %0d", frame_cycles, FRAME_CYCLES);
      end
    end
    if (frame_done && !sampling) begin
      if (frame_speech) n_speech++;
      else n_muted++;
    end
  end

  function automatic real db(input real r);
    return 10.0 * $log10(r);
  endfunction

  initial begin
    real s_all, e_all, s_in, e_in, n_off_in, n_off_out, s_on, o_on, x_on;
    real snr_in, snr_out, off_gain, corr;
    int  m, k_on, k_off;
    real snr_vad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk_a);
    rst_a_n = 1'b1;
    wait (ns == NS + LAG + 64);

    s_all = 0.0; e_all = 0.0; s_in = 0.0; e_in = 0.0;
    n_off_in = 0.0; n_off_out = 0.0; s_on = 0.0; o_on = 0.0; x_on = 0.0;
    k_on = 0; k_off = 0;
    for (int n = 16 * 32 + 64; n < NS; n++) begin
      m = n + LAG;
      s_all += real'(clean_h[n]) ** 2;
      e_all += real'(out_h[m] - clean_h[n]) ** 2;
      e_in  += real'(in_h[n] - clean_h[n]) ** 2;
      if (!on_h[n] && !on_h[n - 48] && !on_h[n + 48]) begin
        n_off_in  += real'(in_h[n]) ** 2;
        n_off_out += real'(out_h[m]) ** 2;
        k_off++;
      end else if (on_h[n]) begin
        k_on++;
        s_on += real'(clean_h[n]) ** 2;
        o_on += real'(out_h[m]) ** 2;
        x_on += real'(out_h[m]) * real'(clean_h[n]);
      end
    end
    snr_in   = db(s_all / e_in);
    snr_out  = db(s_all / e_all);
    off_gain = db((n_off_out + 1.0) / n_off_in);
    corr     = x_on / $sqrt(s_on * o_on);
    snr_vad  = db((o_on / real'(k_on)) / ((n_off_out + 1.0) / real'(k_off)));
    $display("input SNR %0.2f dB, output SNR %0.2f dB, noise in pauses %0.1f dB, correlation in bursts %0.3f",
             snr_in, snr_out, off_gain, corr);
    $display("output power in bursts over output power in pauses: %0.1f dB", snr_vad);
    $display("frames after noise sampling: speech %0d, muted %0d; overruns %0d", n_speech, n_muted, n_overrun);

    checks += 4;
    if (!(snr_out > snr_in + 1.0)) begin
      failures++;
      $display("output SNR does not improve enough");
    end
    if (!(off_gain < -20.0)) begin
      failures++;
      $display("noise in the pauses is not removed");
    end
    if (!(corr > 0.9)) begin
      failures++;
      $display("output does not follow the speech");
    end
    if (n_overrun != 0) begin
      failures++;
      $display("overrun");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
