// mvr_rotator - pipelined MVR CORDIC twiddle rotator (PC in the R2SDF
// architecture) in front of butterfly stage STAGE of an N-point HW-F FFT.
//
// Every sample passes through it.  The sample's position n in the frame
// (counted here) gives its block b = n >> (log2N - STAGE + 1) and whether it
// is the upper or the lower input of its butterfly (bit log2N - STAGE of n).
// The block's control word from twiddle_rom is applied as follows:
//   lower input: multiply by j^quad (swap/negate, no adders), then ITER
//                micro-rotations with the ROM signs  -> angle +d/2
//   upper input: the same ITER micro-rotations with the signs inverted
//                                                    -> angle -d/2
// so both inputs of a butterfly get the same CORDIC gain and the twiddle's
// full phase difference; the common factor propagates to the FFT output.
// If the ROM's norm flag is set both are also halved (right shift by one).
//
// Data are widened by GUARD bits inside the CORDIC and saturated back to W
// bits at the output.  Latency ITER clocks (one register per
// micro-rotation), advanced by en; vout follows vin with that latency.
//
// The MVR stage (barrel shifters and add/subtract units fed from a ROM) and
// the place of the rotator in the pipeline are the usual CORDIC R2SDF
// structure. The per-input sign inversion, the guard bits, the saturation
// and one register per micro-rotation are this design's choices.
module mvr_rotator
  import hwf_fft_pkg::*;
#(
  parameter int N     = 1024,
  parameter int STAGE = 10,
  parameter int W     = 16,
  parameter int ITER  = 3,
  parameter int GUARD = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                vin,
  input  logic signed [W-1:0] din_re,
  input  logic signed [W-1:0] din_im,
  output logic                vout,
  output logic signed [W-1:0] dout_re,
  output logic signed [W-1:0] dout_im
);

  localparam int S  = $clog2(N);
  localparam int AW = STAGE - 1;
  localparam int WG = W + GUARD;

  initial begin
    assert (ITER >= 1 && ITER <= MAX_ITER)
      else $error("mvr_rotator: ITER must be 1..%0d", MAX_ITER);
    assert (STAGE >= 2 && STAGE <= S)
      else $error("mvr_rotator: STAGE must be 2..log2(N)");
  end

  logic [S-1:0]  pos;
  rot_ctrl_t     ctrl;
  logic          down;

  assign down = pos[S-STAGE];

  twiddle_rom #(.N(N), .STAGE(STAGE), .ITER(ITER)) u_rom (
    .addr(pos[S-1 -: AW]),
    .ctrl(ctrl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pos <= '0;
    else if (en && vin) pos <= pos + 1'b1;
  end

  // Quadrant rotation of the lower input, after widening.
  logic signed [WG-1:0] q_re, q_im, x_re, x_im;
  assign x_re = WG'(din_re);
  assign x_im = WG'(din_im);
  always_comb begin
    if (down) begin
      unique case (ctrl.quad)
        2'd1:    begin q_re = -x_im; q_im =  x_re; end  // * j
        2'd2:    begin q_re = -x_re; q_im = -x_im; end  // * -1
        2'd3:    begin q_re =  x_im; q_im = -x_re; end  // * -j
        default: begin q_re =  x_re; q_im =  x_im; end
      endcase
    end else begin
      q_re = x_re;
      q_im = x_im;
    end
  end

  // Micro-rotation chain with the control carried along.
  logic signed [WG-1:0] cx [ITER+1];
  logic signed [WG-1:0] cy [ITER+1];
  mr_steps_t            st_p   [ITER+1];
  logic                 down_p [ITER+1];
  logic                 norm_p [ITER+1];
  logic                 vld_p  [ITER+1];

  assign cx[0]     = q_re;
  assign cy[0]     = q_im;
  assign st_p[0]   = ctrl.step;
  assign down_p[0] = down;
  assign norm_p[0] = ctrl.norm;
  assign vld_p[0]  = vin;

  for (genvar m = 0; m < ITER; m++) begin : g_iter
    mr_op_e op;
    always_comb begin
      op = st_p[m][m].op;
      if (!down_p[m]) begin
        unique case (st_p[m][m].op)
          MR_POS:  op = MR_NEG;
          MR_NEG:  op = MR_POS;
          default: op = MR_SKIP;
        endcase
      end
    end

    mvr_microrot #(.W(WG)) u_mr (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .x_i  (cx[m]),
      .y_i  (cy[m]),
      .op   (op),
      .shift(st_p[m][m].shift),
      .x_o  (cx[m+1]),
      .y_o  (cy[m+1])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_p[m+1]   <= '0;
        down_p[m+1] <= 1'b0;
        norm_p[m+1] <= 1'b0;
        vld_p[m+1]  <= 1'b0;
      end else if (en) begin
        st_p[m+1]   <= st_p[m];
        down_p[m+1] <= down_p[m];
        norm_p[m+1] <= norm_p[m];
        vld_p[m+1]  <= vld_p[m];
      end
    end
  end

  function automatic logic signed [W-1:0] sat(input logic signed [WG-1:0] v);
    if (v > WG'(2 ** (W - 1) - 1))  return W'(2 ** (W - 1) - 1);
    if (v < -WG'(2 ** (W - 1)))     return W'(-(2 ** (W - 1)));
    return W'(v);
  endfunction

  logic signed [WG-1:0] n_re, n_im;
  assign n_re = norm_p[ITER] ? (cx[ITER] >>> 1) : cx[ITER];
  assign n_im = norm_p[ITER] ? (cy[ITER] >>> 1) : cy[ITER];

  assign dout_re = sat(n_re);
  assign dout_im = sat(n_im);
  assign vout    = vld_p[ITER];

endmodule
