// overlap_add: the half-overlapping output stage, "Buffer 32 (3)", "(4)", "(5)" and the adder.
//
// Processing side (clk): the IFFT writes a 64-sample frame with in_valid/in_idx/in_data,
// in any order. Samples 0 .. HOP-1 go to Buffer 3. Samples HOP .. 2*HOP-1 go to Buffer 4,
// and the word each one replaces is moved to Buffer 5 on the next clock, so Buffer 5 holds
// the second half of the previous frame.
// Codec side (clk_a): at every edge Buffers 3 and 5 are read at a_idx, the position the
// input framer is writing; one edge later smp_out = Buffer3 + Buffer5, with the FRAC
// fraction bits dropped (rounded) and saturated to SAMPLE_W bits.
// Timing: a frame that starts at a hop boundary must be written within one sample period,
// before a_idx returns to 0; each output sample then leaves 2 sample periods after
// a_idx reaches its position.
// The three buffers and the adder follow the design; the move-on-write from Buffer 4 to
// Buffer 5, the rounding and the saturation are this implementation's choices.
module overlap_add import nc_pkg::*; #(
  parameter int HOP_N = HOP,
  localparam int AW   = $clog2(HOP_N)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [AW:0]                in_idx,
  input  data_t                      in_data,
  input  logic                       clk_a,
  input  logic                       rst_a_n,
  input  logic [AW-1:0]              a_idx,
  output logic signed [SAMPLE_W-1:0] smp_out
);
  data_t b3_q, b4_q, b5_q;
  logic  mv_we;
  logic [AW-1:0] mv_addr;

  sample_buffer #(.DEPTH(HOP_N), .WIDTH(DATA_W)) u_buf3 (
    .wclk(clk), .we(in_valid && !in_idx[AW]), .waddr(in_idx[AW-1:0]), .wdata(in_data),
    .rclk(clk_a), .raddr(a_idx), .rdata(b3_q)
  );

  sample_buffer #(.DEPTH(HOP_N), .WIDTH(DATA_W)) u_buf4 (
    .wclk(clk), .we(in_valid && in_idx[AW]), .waddr(in_idx[AW-1:0]), .wdata(in_data),
    .rclk(clk), .raddr(in_idx[AW-1:0]), .rdata(b4_q)
  );

  sample_buffer #(.DEPTH(HOP_N), .WIDTH(DATA_W)) u_buf5 (
    .wclk(clk), .we(mv_we), .waddr(mv_addr), .wdata(b4_q),
    .rclk(clk_a), .raddr(a_idx), .rdata(b5_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv_we   <= 1'b0;
      mv_addr <= '0;
    end else begin
      mv_we   <= in_valid && in_idx[AW];
      mv_addr <= in_idx[AW-1:0];
    end
  end

  localparam logic signed [DATA_W:0] SMAX = (DATA_W+1)'((1 << (SAMPLE_W-1)) - 1);
  localparam logic signed [DATA_W:0] SMIN = -(DATA_W+1)'(1 << (SAMPLE_W-1));
  logic signed [DATA_W:0] sum, scaled;
  assign sum    = (DATA_W+1)'(b3_q) + (DATA_W+1)'(b5_q) + (DATA_W+1)'(1 << (FRAC-1));
  assign scaled = sum >>> FRAC;

  always_ff @(posedge clk_a or negedge rst_a_n) begin
    if (!rst_a_n)            smp_out <= '0;
    else if (scaled > SMAX)  smp_out <= SMAX[SAMPLE_W-1:0];
    else if (scaled < SMIN)  smp_out <= SMIN[SAMPLE_W-1:0];
    else                     smp_out <= scaled[SAMPLE_W-1:0];
  end
endmodule
