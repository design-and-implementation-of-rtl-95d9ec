// nc_ctrl: frame sequencer of the processing clock domain.
//
// One frame is processed per hop_start pulse, in the order of the system timing diagram:
//   FEED      2*HOP clocks: read the input buffers (older half, then newest half) into
//             the window and the FFT;
//   WAIT_FFT  until the FFT has delivered all N forward bins into Buffer 64;
//   R2P       N clocks: read Buffer 64 in natural bin order into the CORDIC (rectangular to
//             polar); the noise canceller, the polar-to-rectangular conversion and the
//             IFFT then run on their own, started by the data itself;
//   WAIT_IFFT until the IFFT has delivered all N output samples.
// busy is high from hop_start until the last IFFT sample; frame_cycles then holds the
// number of clocks the frame took and done pulses. A hop_start that arrives while busy is
// dropped and flagged on overrun (one clock).
// The order of the phases follows the design's timing diagram; the handshake through
// counting the FFT's outputs and the overrun flag are this implementation's choices.
module nc_ctrl import nc_pkg::*; #(
  parameter int N = N_FFT,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hop_start,
  input  logic          fft_out_valid,
  input  logic          fft_out_inverse,
  output logic          in_rd_en,
  output logic [AW-1:0] in_rd_idx,
  output logic          b64_rd_en,
  output logic [AW-1:0] b64_rd_idx,
  output logic          busy,
  output logic          done,
  output logic          overrun,
  output logic [15:0]   frame_cycles
);
  typedef enum logic [2:0] {S_IDLE, S_FEED, S_WAIT_FFT, S_R2P, S_WAIT_IFFT} state_e;

  state_e        st;
  logic [AW-1:0] cnt;      // read position in FEED / R2P
  logic [AW-1:0] ocnt;     // FFT outputs seen
  logic [15:0]   cyc;

  assign busy       = (st != S_IDLE);
  assign in_rd_en   = (st == S_FEED);
  assign in_rd_idx  = cnt;
  assign b64_rd_en  = (st == S_R2P);
  assign b64_rd_idx = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      cnt          <= '0;
      ocnt         <= '0;
      cyc          <= '0;
      done         <= 1'b0;
      overrun      <= 1'b0;
      frame_cycles <= '0;
    end else begin
      done    <= 1'b0;
      overrun <= hop_start && busy;
      if (busy) cyc <= cyc + 1'b1;
      unique case (st)
        S_IDLE: if (hop_start) begin
          st   <= S_FEED;
          cnt  <= '0;
          ocnt <= '0;
          cyc  <= 16'd1;
        end
        S_FEED: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N-1)) st <= S_WAIT_FFT;
        end
        S_WAIT_FFT: if (fft_out_valid && !fft_out_inverse) begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == AW'(N-1)) begin
            st   <= S_R2P;
            cnt  <= '0;
            ocnt <= '0;
          end
        end
        S_R2P: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N-1)) st <= S_WAIT_IFFT;
        end
        S_WAIT_IFFT: if (fft_out_valid && fft_out_inverse) begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == AW'(N-1)) begin
            st           <= S_IDLE;
            done         <= 1'b1;
            frame_cycles <= cyc + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
