// input_framer: input buffers "Buffer 32 (1)" and "Buffer 32 (2)" that turn the codec's
// sample stream into half-overlapped 64-sample frames.
//
// Codec side (clk_a, the 12 kHz sample clock): every clk_a edge writes smp_in into
// Buffer 2 at position a_idx, and a_idx counts 0 .. HOP-1. When the last position is
// written, a toggle flag flips; it is synchronised into the processing clock (two flops)
// and produces a one-clock hop_start pulse there.
// Processing side (clk): the controller reads a frame with rd_en/rd_idx, idx 0 .. 2*HOP-1.
// Positions 0 .. HOP-1 come from Buffer 1 (the older half), positions HOP .. 2*HOP-1
// from Buffer 2 (the newest half); as Buffer 2 is read, each word is copied into Buffer 1
// so that it becomes the older half of the next frame. In the first frame after reset
// Buffer 1 has not been written yet and its half reads as zeros. rd_valid/rd_pos/rd_data
// follow rd_en by one clock.
// Timing: Buffer 2 is rewritten at position 0 one sample period after hop_start, so the
// controller must finish its read well within one sample period (it needs 2*HOP clocks).
// The two buffers, their order and the 12 kHz interface clock follow the design; the
// toggle synchroniser and the copy on read are this implementation's choices.
module input_framer import nc_pkg::*; #(
  parameter int HOP_N = HOP,
  localparam int AW   = $clog2(HOP_N)
) (
  // codec side
  input  logic                       clk_a,
  input  logic                       rst_a_n,
  input  logic signed [SAMPLE_W-1:0] smp_in,
  output logic [AW-1:0]              a_idx,
  // processing side
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       hop_start,
  input  logic                       rd_en,
  input  logic [AW:0]                rd_idx,
  output logic                       rd_valid,
  output logic [AW:0]                rd_pos,
  output logic signed [SAMPLE_W-1:0] rd_data
);
  // ---- codec side ----
  logic hop_tgl;
  always_ff @(posedge clk_a or negedge rst_a_n) begin
    if (!rst_a_n) begin
      a_idx   <= '0;
      hop_tgl <= 1'b0;
    end else begin
      a_idx <= a_idx + 1'b1;
      if (a_idx == AW'(HOP_N-1)) hop_tgl <= ~hop_tgl;
    end
  end

  // ---- synchroniser ----
  logic [2:0] tgl_sync;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tgl_sync <= '0;
    else        tgl_sync <= {tgl_sync[1:0], hop_tgl};
  assign hop_start = tgl_sync[2] ^ tgl_sync[1];

  // ---- buffers ----
  logic [SAMPLE_W-1:0] b1_q, b2_q;
  logic                cp_we;

  sample_buffer #(.DEPTH(HOP_N), .WIDTH(SAMPLE_W)) u_buf1 (
    .wclk(clk), .we(cp_we), .waddr(rd_pos[AW-1:0]), .wdata(b2_q),
    .rclk(clk), .raddr(rd_idx[AW-1:0]), .rdata(b1_q)
  );

  sample_buffer #(.DEPTH(HOP_N), .WIDTH(SAMPLE_W)) u_buf2 (
    .wclk(clk_a), .we(1'b1), .waddr(a_idx), .wdata(smp_in),
    .rclk(clk), .raddr(rd_idx[AW-1:0]), .rdata(b2_q)
  );

  // Buffer 1 holds nothing until the first frame has been read: until then its half of
  // the frame reads as silence.
  logic b1_filled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid  <= 1'b0;
      rd_pos    <= '0;
      b1_filled <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      rd_pos   <= rd_idx;
      if (cp_we && rd_pos == (AW+1)'(2*HOP_N-1)) b1_filled <= 1'b1;
    end
  end

  assign cp_we   = rd_valid && rd_pos[AW];
  assign rd_data = rd_pos[AW] ? $signed(b2_q) : (b1_filled ? $signed(b1_q) : '0);
endmodule
