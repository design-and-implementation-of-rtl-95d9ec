// tb_input_framer: self-checking test of the input buffers.
//
// The codec clock delivers a counting sample sequence; on every hop_start the test reads
// a full 64-sample frame and checks that positions 0..31 hold the previous hop and
// 32..63 the newest hop (the first frame's older half reads as zeros), that hop_start comes once per 32 samples, within a few
// processing clocks of the 32nd sample, and that rd_valid/rd_pos follow rd_en by a clock.
module tb_input_framer;
  import nc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, clk_a = 1'b0, rst_a_n = 1'b1;
  initial begin   // a real falling edge, so the asynchronous resets act at once
    #1;
    rst_n = 1'b0;
    rst_a_n = 1'b0;
  end
  always #5   clk   = ~clk;
  always #400 clk_a = ~clk_a;

  logic signed [SAMPLE_W-1:0] smp_in = '0, rd_data;
  logic [4:0] a_idx;
  logic       hop_start, rd_en = 1'b0, rd_valid;
  logic [5:0] rd_idx = '0, rd_pos;

  input_framer dut (.*);

  int checks = 0, failures = 0;
  int nsmp = 0;              // samples written so far
  realtime t_hop_edge;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample k of the stream has the value 3*k + 1
  always @(posedge clk_a) if (rst_a_n) begin
    if (nsmp % 32 == 31) t_hop_edge = $realtime;
    nsmp <= nsmp + 1;
  end
  always @(negedge clk_a) smp_in <= SAMPLE_W'(3 * nsmp + 1);

  initial begin
    int hops = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk_a);
    rst_a_n = 1'b1;
    while (hops < 10) begin
      @(posedge clk);
      if (hop_start) begin
        int base;
        checks++;
        if ($realtime - t_hop_edge > 40.0) begin
          failures++;
          $display("hop_start late by %0t", $realtime - t_hop_edge);
        end
        base = nsmp - 64;          // first sample of the frame
        fork
          for (int i = 0; i < 64; i++) begin
            @(negedge clk);
            rd_en = 1'b1;
            rd_idx = 6'(i);
          end
          for (int i = 0; i < 64; i++) begin
            @(posedge clk);
            #1;
            while (!rd_valid) begin
              @(posedge clk);
              #1;
            end
            checks++;
            if (rd_pos != 6'(i) || rd_data != ((hops == 0 && i < 32) ? '0 : SAMPLE_W'(3 * (base + i) + 1))) begin
              failures++;
              $display("hop %0d pos %0d: got %0d want %0d", hops, rd_pos, rd_data,
                       3 * (base + i) + 1);
            end
          end
        join
        @(negedge clk);
        rd_en = 1'b0;
        hops++;
      end
    end
    checks++;
    if (nsmp < 320 || nsmp > 321) begin
      failures++;
      $display("hop count off: %0d samples for 10 hops", nsmp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
