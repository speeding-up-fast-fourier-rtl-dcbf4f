// quad_rotator - the trivial rotator in front of butterfly stage 2 of an
// N-point HW-F FFT.
//
// The stage-2 twiddles are 1 and W_N^(N/4) = -j, whose rotations need no
// CORDIC: the lower inputs of the second half of the frame are multiplied
// by -j (real and imaginary parts swapped, one negated); everything else
// passes unchanged.  Negation saturates (-2^(W-1) becomes 2^(W-1)-1).
// The sample position is counted here on en && vin.  Combinational data
// path: zero latency, vout = vin.
//
// Using 1 and -j at the first rotator, so that it needs no CORDIC, follows
// the HW-F algorithm. The saturating negation and the combinational path,
// where vout is vin itself, are this design's choices.
module quad_rotator #(
  parameter int N = 1024,
  parameter int W = 16
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

  localparam int S = $clog2(N);
  localparam logic signed [W-1:0] MAXV = W'(2 ** (W - 1) - 1);
  localparam logic signed [W-1:0] MINV = W'(-(2 ** (W - 1)));

  logic [S-1:0] pos;
  logic         rot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pos <= '0;
    else if (en && vin) pos <= pos + 1'b1;
  end

  // Block 1 of stage 2 (second half of the frame), lower inputs.
  assign rot = pos[S-1] && pos[S-2];

  assign vout    = vin;
  assign dout_re = rot ? din_im : din_re;
  assign dout_im = rot ? ((din_re == MINV) ? MAXV : -din_re) : din_im;

endmodule
