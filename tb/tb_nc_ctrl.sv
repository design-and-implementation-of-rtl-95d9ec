// tb_nc_ctrl: self-checking test of the frame sequencer.
//
// A small model of the datapath answers the controller: 64 forward FFT outputs some
// clocks after the input read, 64 inverse outputs some clocks after the Buffer 64 read.
// Checks the 64-clock input read in order, that Buffer 64 is read only after the last
// forward bin and in order, busy/done, the reported frame length, and the overrun flag
// for a hop_start that arrives while a frame is in progress.
module tb_nc_ctrl;
  import nc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       hop_start = 1'b0, fft_out_valid = 1'b0, fft_out_inverse = 1'b0;
  logic       in_rd_en, b64_rd_en, busy, done, overrun;
  logic [5:0] in_rd_idx, b64_rd_idx;
  logic [15:0] frame_cycles;

  nc_ctrl dut (.*);

  int checks = 0, failures = 0, n_overrun = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int FWD_DELAY = 7, INV_DELAY = 200;

  task automatic frame(input bit with_overrun);
    int t0, expect_cycles;
    @(negedge clk);
    hop_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    hop_start = 1'b0;
    // input read
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (!in_rd_en || in_rd_idx != 6'(i) || b64_rd_en) begin
        failures++;
        $display("input read %0d: en %0d idx %0d", i, in_rd_en, in_rd_idx);
      end
      @(negedge clk);
    end
    checks++;
    if (in_rd_en) begin
      failures++;
      $display("input read longer than 64 clocks");
    end
    if (with_overrun) begin
      @(negedge clk);
      hop_start = 1'b1;
      @(negedge clk);
      hop_start = 1'b0;
      checks++;
      if (!overrun) begin
        failures++;
        $display("overrun not flagged");
      end else n_overrun++;
    end
    repeat (FWD_DELAY) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      fft_out_valid = 1'b1;
      fft_out_inverse = 1'b0;
      @(negedge clk);
      checks++;
      if (i < 63 && b64_rd_en) begin
        failures++;
        $display("Buffer 64 read before the FFT finished");
      end
    end
    fft_out_valid = 1'b0;
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (!b64_rd_en || b64_rd_idx != 6'(i) || in_rd_en) begin
        failures++;
        $display("b64 read %0d: en %0d idx %0d", i, b64_rd_en, b64_rd_idx);
      end
      @(negedge clk);
    end
    checks++;
    if (b64_rd_en || !busy) begin
      failures++;
      $display("state after R2P wrong");
    end
    repeat (INV_DELAY) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      fft_out_valid = 1'b1;
      fft_out_inverse = 1'b1;
      @(negedge clk);
    end
    fft_out_valid = 1'b0;
    checks += 2;
    if (!done || busy) begin
      failures++;
      $display("done %0d busy %0d at the end", done, busy);
    end
    expect_cycles = cyc - t0;
    if (int'(frame_cycles) != expect_cycles) begin
      failures++;
      $display("frame_cycles %0d want %0d", frame_cycles, expect_cycles);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (busy || in_rd_en || b64_rd_en) begin
      failures++;
      $display("not idle after reset");
    end
    frame(1'b0);
    repeat (10) @(negedge clk);
    frame(1'b1);
    frame(1'b0);
    checks++;
    if (n_overrun != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
