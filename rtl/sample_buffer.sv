// sample_buffer: the "Buffer 32" and "Buffer 64" memories of the system.
//
// A simple dual-port RAM of DEPTH words: one write port and one read port, each with its
// own clock, so the same memory serves as a crossing between the 12 kHz codec clock and the
// 10 MHz processing clock. The write is taken on the rising edge of wclk when we is high.
// The read is registered: rdata shows mem[raddr] one rclk edge after raddr is presented,
// with read-before-write order when both ports touch the same word on the same clock.
// The memory is not reset; every word is written before it is read.
// The buffer sizes come from the design; the port structure is this implementation's choice.
module sample_buffer #(
  parameter int DEPTH = 32,
  parameter int WIDTH = 32,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    rdata <= mem[raddr];
endmodule
