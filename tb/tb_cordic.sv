// tb_cordic: self-checking test of the pipelined CORDIC.
//
// Streams one random operand per clock, alternating at random between vectoring
// (x, y -> magnitude, phase) and rotation (magnitude, phase -> x, y), over all four
// quadrants and the axes, and compares each result with floating-point math computed here.
// Also checks the latency of 4 clocks and that mode travels with the data.
module tb_cordic;
  import nc_pkg::*;

  logic clk = 1'b0, clr = 1'b1;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0;
  cordic_mode_e mode = CORDIC_VEC;
  data_t        input1 = '0, input2 = '0;
  logic         out_valid;
  cordic_mode_e out_mode;
  data_t        output1, output2;

  cordic dut (.*);

  int checks = 0, failures = 0;
  localparam int NV = 400;
  localparam int LAT = 4;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cordic_mode_e q_mode [$];
  real          q_e1 [$], q_e2 [$];
  int           q_t [$];
  int           cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real wrap(input real a);   // angle difference into (-0.5, 0.5] turn
    while (a > 0.5) a -= 1.0;
    while (a <= -0.5) a += 1.0;
    return a;
  endfunction

  // monitor
  initial begin
    int got = 0;
    while (got < NV) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        cordic_mode_e m;
        real e1, e2;
        int  t0;
        m  = q_mode.pop_front();
        e1 = q_e1.pop_front();
        e2 = q_e2.pop_front();
        t0 = q_t.pop_front();
        checks += 3;
        if (cyc - t0 != LAT) begin
          failures++;
          $display("latency %0d", cyc - t0);
        end
        if (out_mode != m) begin
          failures++;
          $display("mode mismatch");
        end
        if (m == CORDIC_VEC) begin
          real dph;
          dph = wrap(real'($signed(output2)) / (2.0 ** 32) - e2);
          if (fabs(real'(output1) - e1) > 8.0 + e1 * 1e-7 || fabs(dph) > 1e-6 + 4.0 / (2.0 * PI * e1)) begin
            failures++;
            $display("VEC got %0d %0d want %f %f", output1, output2, e1, e2 * (2.0 ** 32));
          end
        end else begin
          if (fabs(real'(output1) - e1) > 8.0 || fabs(real'(output2) - e2) > 8.0) begin
            failures++;
            $display("ROT got %0d %0d want %f %f", output1, output2, e1, e2);
          end
        end
        got++;
      end
    end
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      mode = $urandom_range(1, 0) ? CORDIC_ROT : CORDIC_VEC;
      if (mode == CORDIC_VEC) begin
        int amp;
        real x, y;
        amp = (i % 4 == 0) ? 1000 : (1 << 27);
        input1 = data_t'($signed($urandom_range(2 * amp, 0)) - amp);
        input2 = data_t'($signed($urandom_range(2 * amp, 0)) - amp);
        if (i % 10 == 3) input2 = '0;              // on the real axis
        if (i % 10 == 7) input1 = '0;              // on the imaginary axis
        x = real'(input1);
        y = real'(input2);
        q_e1.push_back($sqrt(x * x + y * y));
        q_e2.push_back($atan2(y, x) / (2.0 * PI));
      end else begin
        real m, a;
        input1 = data_t'($urandom_range(1 << 28, 0));
        input2 = data_t'($urandom());
        m = real'(input1);
        a = real'($signed(input2)) / (2.0 ** 32) * 2.0 * PI;
        q_e1.push_back(m * $cos(a));
        q_e2.push_back(m * $sin(a));
      end
      q_mode.push_back(mode);
      q_t.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 1'b0;
  end
endmodule
