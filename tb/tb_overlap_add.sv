// tb_overlap_add: self-checking test of the half-overlap-add output stage.
//
// After every hop boundary of the codec clock, writes a 64-sample frame of random values
// in bit-reversed order, as the IFFT delivers it, and checks each codec output sample
// against round((first half of this frame + second half of the previous frame) / 2^FRAC),
// saturated to 16 bits. Large values are included to exercise the saturation.
module tb_overlap_add;
  import nc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, clk_a = 1'b0, rst_a_n = 1'b1;
  initial begin   // a real falling edge, so the asynchronous resets act at once
    #1;
    rst_n = 1'b0;
    rst_a_n = 1'b0;
  end
  always #5   clk   = ~clk;
  always #400 clk_a = ~clk_a;

  logic       in_valid = 1'b0;
  logic [5:0] in_idx = '0;
  data_t      in_data = '0;
  logic [4:0] a_idx;
  logic signed [SAMPLE_W-1:0] smp_out;

  overlap_add dut (.*);

  int checks = 0, failures = 0, n_sat = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk_a or negedge rst_a_n)
    if (!rst_a_n) a_idx <= '0;
    else          a_idx <= a_idx + 1'b1;

  longint cur [64], prv [64];
  bit     valid_model = 1'b0;    // two frames written: outputs are defined
  int     frames = 0;
  longint q_exp [$];
  bit     q_ok [$];

  function automatic longint expect_at(input int n);
    longint s;
    s = (cur[n] + prv[n + 32] + (1 << (FRAC - 1))) >>> FRAC;
    if (s > 32767)  s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  // reads happen on each codec edge at the current a_idx; the result shows one edge later
  always @(posedge clk_a) if (rst_a_n) begin
    q_exp.push_back(expect_at(int'(a_idx)));
    q_ok.push_back(frames >= 2);
  end

  always @(posedge clk_a) if (rst_a_n) begin
    #1;
    if (q_exp.size() > 1) begin
      longint e;
      bit ok;
      e  = q_exp.pop_front();
      ok = q_ok.pop_front();
      if (ok) begin
        checks++;
        if (e == 32767 || e == -32768) n_sat++;
        if (longint'(smp_out) != e) begin
          failures++;
          $display("out %0d want %0d", smp_out, e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk_a);
    rst_a_n = 1'b1;
    for (int f = 0; f < 12; f++) begin
      longint nf [64];
      // wait for a hop boundary: a_idx has just wrapped to 0
      do @(posedge clk_a); while (a_idx != 5'd0);
      for (int i = 0; i < 64; i++) begin
        int amp;
        amp = (f % 4 == 3) ? (1 << 22) : (1 << 20);
        nf[i] = longint'($signed($urandom_range(2 * amp, 0))) - amp;
      end
      for (int i = 0; i < 64; i++) begin
        int n;
        n = int'(bitrev(6'(i)));
        @(negedge clk);
        in_valid = 1'b1;
        in_idx   = 6'(n);
        in_data  = data_t'(nf[n]);
      end
      @(negedge clk);
      in_valid = 1'b0;
      for (int i = 0; i < 64; i++) begin
        prv[i] = cur[i];
        cur[i] = nf[i];
      end
      frames++;
    end
    repeat (34) @(posedge clk_a);
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
