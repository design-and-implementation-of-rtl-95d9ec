// tb_fft64: self-checking test of the 64-point serial FFT/IFFT.
//
// Drives random complex frames, compares every output bin with a DFT computed here in
// floating point, and checks the bin order (each bin exactly once) and the latency
// (bin k of a frame leaves 64 + k clocks after the frame's first input). Frames run as
// forward FFT, as inverse FFT (conjugate twiddles, divided by 64), and once with gaps in
// in_valid to exercise stalling.
module tb_fft64;
  import nc_pkg::*;
  localparam int N = 64;
  localparam real TOL = 24.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, inverse = 1'b0;
  cplx_t       in_data = '0;
  logic        out_valid, out_inverse;
  logic [5:0]  out_idx;
  cplx_t       out_data;

  fft64 dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real xr [N], xi [N], er [N], ei [N];
  cplx_t got [N];
  int seen [N];
  longint t_first, t_out [N];

  task automatic reference(input bit inv);
    for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < N; n++) begin
        real a = 2.0 * PI * n * k / N * (inv ? 1.0 : -1.0);
        sr += xr[n] * $cos(a) - xi[n] * $sin(a);
        si += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      er[k] = inv ? sr / N : sr;
      ei[k] = inv ? si / N : si;
    end
  endtask

  task automatic run_frame(input bit inv, input bit gaps, input int amp);
    for (int n = 0; n < N; n++) begin
      xr[n] = real'($signed($urandom_range(2 * amp, 0)) - amp);
      xi[n] = real'($signed($urandom_range(2 * amp, 0)) - amp);
      seen[n] = 0;
    end
    reference(inv);
    fork
      begin
        for (int n = 0; n < N; n++) begin
          @(negedge clk);
          if (gaps && n % 3 == 1) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid = 1'b1;
          inverse  = inv;
          in_data.re = data_t'(longint'(xr[n]));
          in_data.im = data_t'(longint'(xi[n]));
          if (n == 0) t_first = cyc;
        end
        @(negedge clk);
        in_valid = 1'b0;
        in_data  = '0;
      end
      begin
        int cnt = 0;
        while (cnt < N) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            got[out_idx]   = out_data;
            seen[out_idx] += 1;
            t_out[cnt]     = cyc;
            checks++;
            if (out_inverse != inv) begin
              failures++;
              $display("out_inverse wrong");
            end
            cnt++;
          end
        end
      end
    join
    for (int k = 0; k < N; k++) begin
      real dr = real'(got[k].re) - er[k], di = real'(got[k].im) - ei[k];
      checks++;
      if (seen[k] != 1 || dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
        failures++;
        $display("bin %0d inv=%0d: got %0d,%0d want %f,%f seen %0d", k, inv,
                 got[k].re, got[k].im, er[k], ei[k], seen[k]);
      end
    end
    if (!gaps) begin
      for (int k = 0; k < N; k++) begin
        checks++;
        if (t_out[k] - t_first != longint'(N + k)) begin
          failures++;
          $display("latency of output %0d: %0d clocks", k, t_out[k] - t_first);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(1'b0, 1'b0, 1 << 20);
    run_frame(1'b0, 1'b0, 1000);
    run_frame(1'b1, 1'b0, 1 << 24);
    run_frame(1'b0, 1'b1, 1 << 20);
    run_frame(1'b1, 1'b1, 1 << 24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
