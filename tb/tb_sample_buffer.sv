// tb_sample_buffer: self-checking test of the dual-clock sample buffer.
//
// Writes random words with a slow write clock and reads them back with a fast read clock,
// checking the one-clock read latency; then, on a single clock, checks read-before-write
// order when both ports address the same word.
module tb_sample_buffer;
  localparam int DEPTH = 32, W = 32;

  logic          wclk, rclk = 1'b0, we = 1'b0;
  logic [4:0]    waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [DEPTH];
  logic          same_clk = 1'b0;
  logic          wclk_src = 1'b0;

  always #37 wclk_src = ~wclk_src;
  always #5  rclk = ~rclk;
  assign wclk = same_clk ? rclk : wclk_src;

  sample_buffer #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      we = 1'b1; waddr = 5'(i); wdata = $urandom(); model[i] = wdata;
    end
    @(negedge wclk);
    we = 1'b0;
    repeat (3) begin
      for (int i = 0; i < DEPTH; i++) begin
        int a;
        a = $urandom_range(DEPTH - 1, 0);
        @(negedge rclk);
        raddr = 5'(a);
        @(posedge rclk);
        #1;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("addr %0d: got %h want %h", a, rdata, model[a]);
        end
      end
    end
    same_clk = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      logic [W-1:0] nw;
      nw = $urandom();
      @(negedge rclk);
      we = 1'b1; waddr = 5'(i); raddr = 5'(i); wdata = nw;
      @(posedge rclk);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("read-before-write at %0d: got %h want %h", i, rdata, model[i]);
      end
      model[i] = nw;
    end
    @(negedge rclk);
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk);
      raddr = 5'(i);
      @(posedge rclk);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("after rewrite %0d: got %h want %h", i, rdata, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
