// hwf_r2sdf_fft - N-point radix-2 single-path delay-feedback (R2SDF)
// pipeline FFT computed with the hardware-friendly (HW-F) twiddle scheme.
//
// Samples enter in natural order, one per clock, and leave in bit-reversed
// order.  The pipeline is log2(N) butterfly stages (r2sdf_bf, feedback
// delays N/2, N/4, ..., 1) with a twiddle rotator in front of every stage
// but the first:
//   stage 2            : quad_rotator, rotations by 1 and -j only
//   stages 3..log2(N)  : mvr_rotator, an ITER-micro-rotation MVR CORDIC
// Instead of rotating only the lower butterfly input by the twiddle, each
// rotator rotates both inputs, by opposite angles of equal CORDIC gain, so
// unequal-gain MVR CORDICs need no per-rotator gain compensation.  The
// common gains and phases (propagating twiddle factors) pile up on the
// output points and ptf_equalizer removes them in one complex multiply per
// point.  Each butterfly halves, so out = X(out_bin) / N; out_raw is the same
// point before the equaliser (X(out_bin)/N times its known scale factor).
//
// Flow control: the whole pipeline advances only in clocks with in_valid
// high (a gap in the input stalls it).  Frames are back to back; the last
// frame leaves while the next one enters.
// Latency from sample x(n) entering to output position n leaving, in
// advancing clocks: (log2N - 2)*ITER + log2N + N - 1, plus 1 for the
// equaliser (1058 for N = 1024, ITER = 3).
// Defaults follow the 16-bit, 3-iteration MVR R2SDF case study at
// N = 1024; the rounding, scaling and equaliser are this design's choices.
module hwf_r2sdf_fft #(
  parameter int N    = 1024,
  parameter int W    = 16,
  parameter int ITER = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_re,
  input  logic signed [W-1:0]  in_im,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_bin,
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic signed [W-1:0]  out_raw_re,
  output logic signed [W-1:0]  out_raw_im
);

  localparam int S = $clog2(N);

  initial begin
    assert (N >= 8 && (1 << S) == N)
      else $error("hwf_r2sdf_fft: N must be a power of two, at least 8");
  end

  logic en;
  assign en = in_valid;

  // bf_*[s]: output of butterfly stage s (bf_*[0] is the FFT input)
  logic                bf_v  [S+1];
  logic signed [W-1:0] bf_re [S+1];
  logic signed [W-1:0] bf_im [S+1];
  // rt_*[s]: input of butterfly stage s, after its rotator
  logic                rt_v  [S+1];
  logic signed [W-1:0] rt_re [S+1];
  logic signed [W-1:0] rt_im [S+1];

  assign bf_v[0]  = in_valid;
  assign bf_re[0] = in_re;
  assign bf_im[0] = in_im;
  assign rt_v[0]  = 1'b0;
  assign rt_re[0] = '0;
  assign rt_im[0] = '0;

  for (genvar s = 1; s <= S; s++) begin : g_stage
    if (s == 1) begin : g_none
      assign rt_v[s]  = bf_v[s-1];
      assign rt_re[s] = bf_re[s-1];
      assign rt_im[s] = bf_im[s-1];
    end else if (s == 2) begin : g_quad
      quad_rotator #(.N(N), .W(W)) u_rot (
        .clk(clk), .rst_n(rst_n), .en(en),
        .vin(bf_v[s-1]), .din_re(bf_re[s-1]), .din_im(bf_im[s-1]),
        .vout(rt_v[s]), .dout_re(rt_re[s]), .dout_im(rt_im[s])
      );
    end else begin : g_mvr
      mvr_rotator #(.N(N), .STAGE(s), .W(W), .ITER(ITER)) u_rot (
        .clk(clk), .rst_n(rst_n), .en(en),
        .vin(bf_v[s-1]), .din_re(bf_re[s-1]), .din_im(bf_im[s-1]),
        .vout(rt_v[s]), .dout_re(rt_re[s]), .dout_im(rt_im[s])
      );
    end

    r2sdf_bf #(.W(W), .D(N >> s)) u_bf (
      .clk(clk), .rst_n(rst_n), .en(en),
      .vin(rt_v[s]), .din_re(rt_re[s]), .din_im(rt_im[s]),
      .vout(bf_v[s]), .dout_re(bf_re[s]), .dout_im(bf_im[s])
    );
  end

  ptf_equalizer #(.N(N), .W(W), .ITER(ITER)) u_eq (
    .clk(clk), .rst_n(rst_n), .en(en),
    .vin(bf_v[S]), .din_re(bf_re[S]), .din_im(bf_im[S]),
    .vout(out_valid), .bin(out_bin),
    .dout_re(out_re), .dout_im(out_im),
    .raw_re(out_raw_re), .raw_im(out_raw_im)
  );

endmodule
