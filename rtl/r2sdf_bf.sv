// r2sdf_bf - radix-2 single-path delay-feedback butterfly stage (BF in the
// R2SDF architecture) with a feedback delay of D complex words.
//
// The stage pairs sample i with sample i+D of every block of 2*D samples:
//   phase 0 (first D samples of a block): the input goes into the delay
//     line and the delay line's content, the differences of the previous
//     block, goes out;
//   phase 1 (last D samples): upper = (a + b) / 2 goes out, lower =
//     (a - b) / 2 goes into the delay line, a being the delayed sample.
// The halving in every stage is this design's choice; it keeps the
// butterfly free of overflow, so the FFT output is X(k) / N.  Twiddles are
// not applied here: the next stage's rotator does that.
//
// Interface: en is the pipeline advance (the whole FFT stalls when it is
// low); vin marks valid input.  Output is registered.  Sample p of a block
// leaves the stage D + 1 enabled clocks after it entered (vout high from
// the first sum on).
module r2sdf_bf #(
  parameter int W = 16,
  parameter int D = 512
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

  localparam int CW = $clog2(2 * D);

  logic [CW-1:0]       cnt;
  logic                phase, started;
  logic [2*W-1:0]      fb_wr, fb_rd;
  logic signed [W-1:0] a_re, a_im;
  logic signed [W:0]   sum_re, sum_im, dif_re, dif_im;
  logic signed [W-1:0] o_re, o_im;

  assign phase = cnt[CW-1];

  sdf_fifo #(.W(2 * W), .D(D)) u_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en && vin),
    .wr_data(fb_wr),
    .rd_data(fb_rd)
  );

  assign {a_re, a_im} = fb_rd;

  always_comb begin
    sum_re = (W+1)'(a_re) + (W+1)'(din_re);
    sum_im = (W+1)'(a_im) + (W+1)'(din_im);
    dif_re = (W+1)'(a_re) - (W+1)'(din_re);
    dif_im = (W+1)'(a_im) - (W+1)'(din_im);
    if (phase) begin
      o_re  = W'(sum_re >>> 1);
      o_im  = W'(sum_im >>> 1);
      fb_wr = {W'(dif_re >>> 1), W'(dif_im >>> 1)};
    end else begin
      o_re  = a_re;
      o_im  = a_im;
      fb_wr = {din_re, din_im};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      started <= 1'b0;
      vout    <= 1'b0;
      dout_re <= '0;
      dout_im <= '0;
    end else if (en) begin
      vout <= vin && (phase || started);
      if (vin) begin
        cnt <= cnt + 1'b1;
        if (phase) started <= 1'b1;
      end
      dout_re <= o_re;
      dout_im <= o_im;
    end
  end

endmodule
