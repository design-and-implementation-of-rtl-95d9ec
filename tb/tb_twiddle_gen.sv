// tb_twiddle_gen: self-checking test of the twiddle generator.
//
// For every exponent on every port, in both directions, compares W = exp(-+j*2*pi*k/64)
// with floating-point values (within 1 LSB of Q2.30).
module tb_twiddle_gen;
  import nc_pkg::*;
  localparam int N = 64, P = 6;

  logic       inverse;
  logic [4:0] k [P];
  data_t      w_re [P], w_im [P];

  twiddle_gen dut (.*);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int inv = 0; inv < 2; inv++)
      for (int kk = 0; kk < N / 2; kk++) begin
        inverse = inv[0];
        for (int p = 0; p < P; p++) k[p] = 5'((kk + 5 * p) % (N / 2));
        #1;
        for (int p = 0; p < P; p++) begin
          real a, er, ei;
          a  = 2.0 * PI * ((kk + 5 * p) % (N / 2)) / N;
          er = $cos(a) * (2.0 ** 30);
          ei = (inv != 0 ? 1.0 : -1.0) * $sin(a) * (2.0 ** 30);
          checks++;
          if (real'(w_re[p]) - er > 1.0 || er - real'(w_re[p]) > 1.0 ||
              real'(w_im[p]) - ei > 1.0 || ei - real'(w_im[p]) > 1.0) begin
            failures++;
            $display("port %0d k=%0d inv=%0d: %0d %0d want %f %f", p, k[p], inv,
                     w_re[p], w_im[p], er, ei);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
