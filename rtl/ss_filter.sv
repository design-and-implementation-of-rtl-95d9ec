// ss_filter: spectral subtraction filter with half-wave rectification, and the multiplier
// that applies it to one spectrum bin.
//
// For a bin of magnitude |X| and noise mean mu it forms the filter gain
//   H   = 1 - mu / |X|
//   H_R = (H + |H|) / 2        (half-wave rectified: negative gains become 0)
// in unsigned Q1.HF, and the estimated speech magnitude |S| = H_R * |X|.
// A zero magnitude gives H_R = 0. The block is purely combinational (one divider and one
// multiplier); the caller registers the result.
// The two formulas and the filter-then-multiply structure follow the design; the Q1.16
// gain format and the single-cycle divider are this implementation's choices.
module ss_filter import nc_pkg::*; #(
  parameter int HF = 16
) (
  input  data_t         mag,    // |X|, non-negative
  input  data_t         mean,   // mu, non-negative
  output logic [HF:0]   gain,   // H_R, 0 .. 1.0 in Q1.HF
  output data_t         s_mag   // H_R * |X|
);
  localparam int QW = DATA_W + HF;

  logic [QW-1:0]        q;      // mu / |X| in Q.HF
  logic signed [QW:0]   h;      // H in Q.HF
  logic signed [QW:0]   h_abs;
  logic signed [QW:0]   h_r;
  logic [DATA_W+HF:0]   prod;

  always_comb begin
    if (mag <= 0) q = {1'b0, {(QW-1){1'b1}}};                 // mu / 0: treat as very large
    else          q = ({{HF{1'b0}}, mean} << HF) / QW'(mag);
    h     = (QW+1)'(1 << HF) - $signed({1'b0, q});
    h_abs = (h < 0) ? -h : h;
    h_r   = (h + h_abs) >>> 1;
    gain  = h_r[HF:0];
    prod  = (DATA_W+HF+1)'(mag) * (DATA_W+HF+1)'(gain);
    s_mag = data_t'(prod >> HF);
  end
endmodule
