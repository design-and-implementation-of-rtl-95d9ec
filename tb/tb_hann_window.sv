// tb_hann_window: self-checking test of the Hanning window multiplier.
//
// Feeds every window position with random 16-bit samples and checks the product against
// 0.5*(1-cos(2*pi*n/64)) computed here in floating point (within the coefficient's rounding), the
// one-clock latency, the pass-through of the position, and that the periodic window's
// two halves sum to one (w[n] + w[n+32] = 1.0 exactly in Q1.15).
module tb_hann_window;
  import nc_pkg::*;
  localparam int N = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       in_valid = 1'b0;
  logic [5:0]                 in_idx = '0;
  logic signed [SAMPLE_W-1:0] in_data = '0;
  logic                       out_valid;
  logic [5:0]                 out_idx;
  data_t                      out_data;

  hann_window dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++)
      for (int n = 0; n < N; n++) begin
        real w, want, tol;
        @(negedge clk);
        in_valid = 1'b1;
        in_idx   = 6'(n);
        in_data  = (r == 0) ? 16'sh7fff : (r == 1) ? -16'sh8000 : SAMPLE_W'($urandom());
        w    = 0.5 * (1.0 - $cos(2.0 * PI * n / N));
        want = real'(in_data) * w * (2.0 ** FRAC);
        @(posedge clk);
        #1;
        checks++;
        // tolerance: half an LSB of the Q1.15 coefficient, scaled, plus one output LSB
        tol = (in_data < 0 ? -real'(in_data) : real'(in_data)) / 1024.0 + 1.0;
        if (!out_valid || out_idx != 6'(n) || real'(out_data) - want > tol ||
            want - real'(out_data) > tol) begin
          failures++;
          $display("n=%0d x=%0d got %0d want %f", n, in_data, out_data, want);
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid stuck");
    end
    for (int n = 0; n < N / 2; n++) begin
      checks++;
      if (int'(dut.WIN[n]) + int'(dut.WIN[n + N/2]) != 32768) begin
        failures++;
        $display("w[%0d] + w[%0d] != 1", n, n + N/2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
