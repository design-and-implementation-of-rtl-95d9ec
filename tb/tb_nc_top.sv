// tb_nc_top: end-to-end test of the noise canceller at its real clock rates
// (10 MHz processing clock, 12 kHz codec clock) and default parameters.
//
// Stimulus, in hops of 32 samples:
//   A  16 hops of silence: the noise estimate learnt after reset is zero;
//   B  14 hops of a random signal: with zero noise the filter passes everything, so the
//      output must equal the input delayed by LAG samples (checked sample by sample,
//      within a small fixed-point tolerance);
//   C  learn pulse, then 16 hops of noise: the noise is learnt again;
//   D  10 hops of noise alone: non-speech frames, the output must be exactly zero;
//   E  14 hops of a harmonic tone plus the same noise: speech frames; the output must
//      follow the clean tone (correlation above 0.97, level within -2 dB .. +1 dB).
// Throughout it checks the frame length in clocks (and that it fits in a sample period),
// that no frame overruns, and it counts each mechanism: noise sampling, speech frames,
// muted frames, residual-noise reduction, half-wave rectification and the relearn.
module tb_nc_top;
  import nc_pkg::*;

  localparam int LAG = 97;              // input-to-output delay in samples
  localparam int FRAME_CYCLES = 396;    // clocks per frame, hop_start to last IFFT sample

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
  int n_sampling = 0, n_speech = 0, n_muted = 0, n_resid = 0, n_rect = 0, n_learn = 0;
  int n_overrun = 0, n_frames = 0;

  initial begin
    #(100.0 * 83334.0 * 32.0);          // 100 hops
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus and record, one entry per codec clock ----
  localparam int NS = 70 * 32 + 200;
  int     ns = 0;                       // samples written so far
  int     in_h [NS], out_h [NS], clean_h [NS];
  int     phase_of [NS];                // stimulus phase (0..4 = A..E) of each sample
  int     ph = 0;

  // A voiced-speech-like signal: 12 harmonics of 375 Hz. The speech detector averages the
  // filter gain over all bins, so a signal must cover a good part of the band to count as
  // speech.
  function automatic int tone(input int n);
    real v = 0.0;
    for (int h = 1; h <= 12; h++)
      v += 2000.0 * $sin(2.0 * PI * n * 2.0 * h / 64.0 + 0.7 * h * h);
    return int'(v);
  endfunction

  always @(negedge clk_a) begin
    int c, v;
    c = 0;
    v = 0;
    case (ph)
      1: v = $signed($urandom_range(16000, 0)) - 8000;
      2, 3: v = $signed($urandom_range(2000, 0)) - 1000;
      4: begin
        c = tone(ns);
        v = c + $signed($urandom_range(2000, 0)) - 1000;
      end
      default: v = 0;
    endcase
    smp_in <= SAMPLE_W'(v);
    if (ns < NS) begin
      in_h[ns] = v;
      clean_h[ns] = c;
      phase_of[ns] = ph;
    end
  end

  always @(posedge clk_a) if (rst_a_n) begin
    #1;
    if (ns < NS) out_h[ns] = int'(smp_out);
    ns++;
  end

  // ---- per-frame monitors ----
  always @(posedge clk) if (rst_n) begin
    if (overrun) n_overrun++;
    if (dut.u_ctrl.done) begin
      n_frames++;
      checks++;
      if (int'(frame_cycles) != FRAME_CYCLES) begin
        failures++;
        $display("frame of %0d clocks, expected %0d", frame_cycles, FRAME_CYCLES);
      end
    end
    if (frame_done) begin
      if (sampling) n_sampling++;
      else if (frame_speech) n_speech++;
      else n_muted++;
      if (!sampling && resid_bins != 0) n_resid++;
    end
    if (dut.u_nc.in_valid && !dut.u_nc.sampling && dut.u_nc.gain == '0) n_rect++;
  end

  task automatic hops(input int n);
    repeat (32 * n) @(posedge clk_a);
  endtask

  initial begin
    int b_start, b_end, d_start, d_end, e_start, e_end;
    real e_in, e_out, e_x, corr, gain;
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk_a);
    rst_a_n = 1'b1;
    ph = 0; hops(16);
    b_start = ns;
    ph = 1; hops(14);
    b_end = ns;
    ph = 2;
    @(negedge clk);
    learn = 1'b1;
    @(negedge clk);
    learn = 1'b0;
    n_learn++;
    hops(16);
    d_start = ns;
    ph = 3; hops(10);
    d_end = ns;
    e_start = ns;
    ph = 4; hops(14);
    e_end = ns;
    ph = 0; hops(4);

    // B: transparent when the learnt noise is zero
    bad = 0;
    for (int n = b_start + 3 * 32 + LAG; n < b_end; n++) begin
      checks++;
      if (out_h[n] - in_h[n - LAG] > 3 || in_h[n - LAG] - out_h[n] > 3) begin
        failures++;
        if (bad++ < 5) $display("B: out[%0d]=%0d in[%0d]=%0d", n, out_h[n], n - LAG, in_h[n - LAG]);
      end
    end
    // D: noise alone is removed completely once the frames come from phase D only
    bad = 0;
    for (int n = d_start + LAG + 32; n < d_end + LAG - 64; n++) begin
      checks++;
      if (out_h[n] != 0) begin
        failures++;
        if (bad++ < 5) $display("D: out[%0d]=%0d", n, out_h[n]);
      end
    end
    // E: speech frames pass: the output follows the clean signal closely
    e_in = 0.0;
    e_out = 0.0;
    e_x = 0.0;
    for (int n = e_start + LAG + 64; n < e_end + LAG - 64; n++) begin
      e_in  += real'(clean_h[n - LAG]) ** 2;
      e_out += real'(out_h[n]) ** 2;
      e_x   += real'(out_h[n]) * real'(clean_h[n - LAG]);
    end
    corr = e_x / $sqrt(e_in * e_out);
    gain = e_x / e_in;
    $display("E: correlation with the clean signal %f, gain %f", corr, gain);
    checks += 2;
    if (!(corr > 0.97)) begin
      failures++;
      $display("E: output does not follow the speech");
    end
    if (!(gain > 0.8 && gain < 1.1)) begin
      failures++;
      $display("E: speech level changed");
    end

    $display("frames %0d: sampling %0d speech %0d muted %0d residual-reduced %0d; rectified bins %0d; relearn %0d; overruns %0d",
             n_frames, n_sampling, n_speech, n_muted, n_resid, n_rect, n_learn, n_overrun);
    checks += 7;
    if (n_sampling < 32) begin failures++; $display("noise sampling missing"); end
    if (n_speech == 0)   begin failures++; $display("no speech frame"); end
    if (n_muted == 0)    begin failures++; $display("no muted frame"); end
    if (n_resid == 0)    begin failures++; $display("no residual-noise reduction"); end
    if (n_rect == 0)     begin failures++; $display("no rectified bin"); end
    if (n_learn == 0)    begin failures++; $display("no relearn"); end
    if (n_overrun != 0)  begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
