// tb_ss_filter: self-checking test of the spectral subtraction filter.
//
// Applies random and corner-case (|X|, mu) pairs and compares the gain
// H_R = max(1 - mu/|X|, 0) and the product H_R * |X| with values computed here
// (integer arithmetic on the same Q1.16 scale, so the comparison is exact).
module tb_ss_filter;
  import nc_pkg::*;
  localparam int HF = 16;

  data_t       mag, mean, s_mag;
  logic [HF:0] gain;

  ss_filter #(.HF(HF)) dut (.*);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint m, input longint mu);
    longint g_exp, s_exp;
    mag  = data_t'(m);
    mean = data_t'(mu);
    #1;
    if (m <= 0 || mu >= m) g_exp = 0;
    else                   g_exp = (1 << HF) - ((mu << HF) / m);
    s_exp = (m * g_exp) >> HF;
    checks += 2;
    if (longint'(gain) != g_exp || longint'(s_mag) != s_exp) begin
      failures++;
      $display("|X|=%0d mu=%0d: gain %0d (want %0d) s %0d (want %0d)", m, mu, gain, g_exp,
               s_mag, s_exp);
    end
  endtask

  initial begin
    check(0, 0);
    check(0, 100);
    check(100, 0);          // no noise: gain 1
    check(100, 100);        // equal: gain 0
    check(100, 150);        // negative H is rectified to 0
    check(1000, 250);       // gain 0.75
    check(32'h7fffffff, 1);
    check(32'h7fffffff, 32'h7ffffffe);
    for (int i = 0; i < 2000; i++) begin
      longint m, mu;
      m  = longint'($urandom_range(32'h7fffffff, 0)) >> $urandom_range(30, 0);
      mu = longint'($urandom_range(32'h7fffffff, 0)) >> $urandom_range(30, 0);
      check(m, mu);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
