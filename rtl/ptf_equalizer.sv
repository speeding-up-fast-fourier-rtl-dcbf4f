// ptf_equalizer - removes, once at the FFT output, the complex scale that
// the HW-F rotators leave on every output point.
//
// Each rotator multiplies both inputs of a butterfly by the same CORDIC
// gain and by a common phase (the propagating twiddle factor, PTF).  Those
// factors are linear and identical for a whole sub-FFT, so output point p
// (bit-reversed order) ends up as X(bitrev(p))/N times a known constant
// c(p).  This block multiplies by 1/c(p), read from a coefficient table
// computed at elaboration by hwf_fft_pkg::ptf_coef() (two consecutive
// points share one entry, so the table has N/2 words of 2*COEF_W bits).
// A plain complex multiplier is this design's choice for the compensation;
// a downstream channel equaliser could absorb c(p) instead, which is why
// the uncompensated value is also output (raw_*), aligned with the result.
//
// Interface: en advances, vin marks valid input.  One clock of latency;
// bin is the frequency index of the point on the output.
module ptf_equalizer
  import hwf_fft_pkg::*;
#(
  parameter int N    = 1024,
  parameter int W    = 16,
  parameter int ITER = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 vin,
  input  logic signed [W-1:0]  din_re,
  input  logic signed [W-1:0]  din_im,
  output logic                 vout,
  output logic [$clog2(N)-1:0] bin,
  output logic signed [W-1:0]  dout_re,
  output logic signed [W-1:0]  dout_im,
  output logic signed [W-1:0]  raw_re,
  output logic signed [W-1:0]  raw_im
);

  localparam int S  = $clog2(N);
  localparam int PW = W + COEF_W + 1;

  logic [2*COEF_W-1:0] coef_rom [N/2];

  for (genvar i = 0; i < N / 2; i++) begin : g_coef
    localparam logic [2*COEF_W-1:0] C = ptf_coef(N, ITER, 2 * i);
    assign coef_rom[i] = C;
  end

  logic [S-1:0]             pos, pos_rev;
  logic signed [COEF_W-1:0] c_re, c_im;
  logic signed [PW-1:0]     p_re, p_im;

  assign {c_re, c_im} = coef_rom[pos[S-1:1]];

  always_comb begin
    for (int i = 0; i < S; i++) pos_rev[i] = pos[S-1-i];
  end

  always_comb begin
    p_re = PW'(din_re * c_re) - PW'(din_im * c_im);
    p_im = PW'(din_re * c_im) + PW'(din_im * c_re);
  end

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] s = v >>> COEF_FRAC;
    if (s > PW'(2 ** (W - 1) - 1)) return W'(2 ** (W - 1) - 1);
    if (s < -PW'(2 ** (W - 1)))    return W'(-(2 ** (W - 1)));
    return W'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos     <= '0;
      vout    <= 1'b0;
      bin     <= '0;
      dout_re <= '0;
      dout_im <= '0;
      raw_re  <= '0;
      raw_im  <= '0;
    end else if (en) begin
      vout <= vin;
      if (vin) begin
        pos     <= pos + 1'b1;
        bin     <= pos_rev;
        dout_re <= sat(p_re);
        dout_im <= sat(p_im);
        raw_re  <= din_re;
        raw_im  <= din_im;
      end
    end
  end

endmodule
