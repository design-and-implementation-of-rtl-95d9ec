// cordic: unrolled, pipelined CORDIC that converts rectangular to polar coordinates and back.
//
// mode = CORDIC_VEC (vectoring): input1 = x (real part), input2 = y (imaginary part);
//   output1 = sqrt(x^2 + y^2), output2 = atan2(y, x) as a binary angle (2^32 = one turn).
// mode = CORDIC_ROT (rotation): input1 = magnitude, input2 = phase (binary angle);
//   output1 = magnitude * cos(phase), output2 = magnitude * sin(phase).
// ITER shift-add iterations (shifts 0 .. ITER-1) are unrolled and cut into STAGES groups
// by STAGES-1 register banks, so a result leaves STAGES-1 clocks after its input and one
// result can enter every clock. Vectoring starts from (x, y, 0) and scales the final x by
// the CORDIC gain 1/A = 0.6073 (Q2.30) at the output; rotation starts from (0.6073, 0,
// phase), which yields cos and sin directly, and multiplies both by the magnitude that
// travelled down the pipeline with the sample. mode and in_valid travel with the data.
// clr clears the valid flags of the pipeline.
// The 32-bit width, 29 iterations, 5-stage pipeline with 4 registers, the input selection
// of 0 / 0.607 and the output multipliers follow the design. The quarter-turn
// pre-rotation that lets both modes cover all four quadrants, the guard bits and the
// binary-angle phase format are this implementation's choices.
module cordic import nc_pkg::*; #(
  parameter int ITER   = 29,
  parameter int STAGES = 5
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         in_valid,
  input  cordic_mode_e mode,
  input  data_t        input1,
  input  data_t        input2,
  output logic         out_valid,
  output cordic_mode_e out_mode,
  output data_t        output1,
  output data_t        output2
);
  localparam int G   = 6;                              // fraction guard bits
  localparam int IW  = DATA_W + 2 + G;                // two more bits for the CORDIC gain
  localparam int PER = (ITER + STAGES - 1) / STAGES;  // iterations per pipeline stage

  typedef logic signed [IW-1:0] cw_t;
  typedef angle_t atan_tab_t [ITER];

  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = angle_t'(longint'($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** ANG_W)));
    return t;
  endfunction

  function automatic longint gain_q();
    real a = 1.0;
    for (int i = 0; i < ITER; i++) a = a * $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'((2.0 ** TW_FRAC) / a);
  endfunction

  localparam atan_tab_t ATAN  = make_atan();
  localparam cw_t       K_INV = cw_t'(gain_q());       // 0.6073 in Q2.30
  localparam cw_t       K_ROT = K_INV <<< G;           // rotation start value
  localparam angle_t    QUARTER = angle_t'(1) << (ANG_W - 2);

  typedef struct packed {
    logic         valid;
    cordic_mode_e mode;
    data_t        mag;    // rotation-mode magnitude, carried to the output multipliers
    cw_t          x;
    cw_t          y;
    angle_t       z;
  } cst_t;

  cst_t st0;           // state after input selection
  cst_t fin;           // state after the last iteration

  // Input selection and quarter-turn pre-rotation.
  always_comb begin
    st0       = '0;
    st0.valid = in_valid;
    st0.mode  = mode;
    st0.mag   = input1;
    if (mode == CORDIC_VEC) begin
      if (input1 >= 0) begin
        st0.x = cw_t'(input1) <<< G;
        st0.y = cw_t'(input2) <<< G;
        st0.z = '0;
      end else if (input2 >= 0) begin           // second quadrant: rotate by -90 deg
        st0.x = cw_t'(input2) <<< G;
        st0.y = -(cw_t'(input1) <<< G);
        st0.z = QUARTER;
      end else begin                            // third quadrant: rotate by +90 deg
        st0.x = -(cw_t'(input2) <<< G);
        st0.y = cw_t'(input1) <<< G;
        st0.z = -QUARTER;
      end
    end else begin
      if (input2 >= QUARTER && input2[ANG_W-1] == 1'b0) begin   // phase above +90 deg
        st0.x = '0;
        st0.y = K_ROT;
        st0.z = input2 - QUARTER;
      end else if (input2[ANG_W-1] && input2 < -QUARTER) begin  // phase below -90 deg
        st0.x = '0;
        st0.y = -K_ROT;
        st0.z = input2 + QUARTER;
      end else begin
        st0.x = K_ROT;
        st0.y = '0;
        st0.z = input2;
      end
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    cst_t prev;   // state leaving iteration i-1
    cst_t cur;    // state iteration i works on
    cst_t nxt;    // state leaving iteration i

    if (i == 0) begin : g_first
      assign prev = st0;
    end else begin : g_chain
      assign prev = g_iter[i-1].nxt;
    end

    if (i > 0 && (i % PER) == 0) begin : g_reg
      always_ff @(posedge clk or posedge clr) begin
        if (clr) begin
          cur.valid <= 1'b0;
          cur.mode  <= CORDIC_VEC;
          cur.mag   <= '0;
          cur.x     <= '0;
          cur.y     <= '0;
          cur.z     <= '0;
        end else begin
          cur <= prev;
        end
      end
    end else begin : g_wire
      assign cur = prev;
    end

    // One micro-rotation: drive y to zero (vectoring) or z to zero (rotation).
    always_comb begin
      logic up;
      up = (cur.mode == CORDIC_VEC) ? (cur.y < 0) : !cur.z[ANG_W-1];
      nxt = cur;
      if (up) begin
        nxt.x = cur.x - (cur.y >>> i);
        nxt.y = cur.y + (cur.x >>> i);
        nxt.z = cur.z - ATAN[i];
      end else begin
        nxt.x = cur.x + (cur.y >>> i);
        nxt.y = cur.y - (cur.x >>> i);
        nxt.z = cur.z + ATAN[i];
      end
    end
  end

  // Output multipliers and selection.
  localparam int PW = IW + DATA_W;
  logic signed [PW-1:0] p1, p2;
  assign fin = g_iter[ITER-1].nxt;
  assign p1 = PW'(fin.x) * ((fin.mode == CORDIC_ROT) ? PW'(fin.mag) : PW'(K_INV));
  assign p2 = PW'(fin.y) * PW'(fin.mag);

  assign out_valid = fin.valid;
  assign out_mode  = fin.mode;
  assign output1   = data_t'(p1 >>> (TW_FRAC + G));
  assign output2   = (fin.mode == CORDIC_ROT) ? data_t'(p2 >>> (TW_FRAC + G)) : data_t'(fin.z);
endmodule
