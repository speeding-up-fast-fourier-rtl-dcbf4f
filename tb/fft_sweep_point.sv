// fft_sweep_point - test harness for one (N, ITER) configuration of the
// HW-F R2SDF FFT, used by tb_fft_sweep.
//
// It builds hwf_r2sdf_fft with the given length and number of micro-rotations,
// streams FRAMES frames of Gaussian-like complex noise (standard deviation
// SIGMA LSB per component) followed by a frame of zeros, with occasional
// input gaps, and compares every output frame with a direct DFT divided by N.
// It checks the latency of the first output, the bit-reversed bin order
// and that the SQNR of each frame is at least SQNR_MIN. When done, it raises
// `done` and reports its check and failure counts and the mean SQNR (in
// hundredths of a dB) on its ports; the parent prints and sums them.
// The SQNR measure (signal power over error power, noise input) is the one
// used to evaluate the algorithm; the floors are set for this
// implementation's fixed-point arithmetic.
module fft_sweep_point #(
  parameter int  N        = 64,
  parameter int  ITER     = 3,
  parameter int  FRAMES   = 2,
  parameter real SIGMA    = 3000.0,
  parameter real SQNR_MIN = 20.0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   sqnr_cdb
);
  localparam int  W   = 16;
  localparam int  S   = $clog2(N);
  localparam int  LAT = (S - 2) * ITER + S + N - 1 + 1;
  localparam real PI  = 3.14159265358979323846;

  logic in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic [S-1:0] out_bin;
  logic signed [W-1:0] out_re, out_im, out_raw_re, out_raw_im;

  hwf_r2sdf_fft #(.N(N), .W(W), .ITER(ITER)) dut (.*);

  initial begin
    done = 0; checks = 0; failures = 0; sqnr_cdb = 0;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d ITER=%0d): %s", N, ITER, msg);
    end
  endtask

  real xr [FRAMES][N];
  real xi [FRAMES][N];
  real yr [FRAMES][N];
  real yi [FRAMES][N];

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(0, 65535)) / 65536.0;
    return acc - 6.0;
  endfunction

  int unsigned adv = 0, first_out_adv = 0;
  bit          got_first = 0;
  int          out_count = 0;

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        xr[f][n] = $rtoi(gauss() * SIGMA);
        xi[f][n] = $rtoi(gauss() * SIGMA);
      end
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if ($urandom_range(0, 99) < 5) begin
          in_valid <= 0;
          repeat ($urandom_range(1, 2)) @(posedge clk);
        end
        in_valid <= 1;
        in_re <= W'($rtoi(xr[f][n]));
        in_im <= W'($rtoi(xi[f][n]));
        @(posedge clk);
      end
    while (out_count < FRAMES * N) begin
      in_valid <= 1; in_re <= 0; in_im <= 0;
      @(posedge clk);
    end
    in_valid <= 0;
    @(posedge clk);
    evaluate();
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) adv++;
    if (rst_n && in_valid && out_valid) begin
      if (!got_first) begin
        got_first = 1;
        first_out_adv = adv;
      end
      if (out_count < FRAMES * N) begin
        int f, p, k;
        f = out_count / N;
        p = out_count % N;
        k = 0;
        for (int i = 0; i < S; i++) k |= ((p >> i) & 1) << (S - 1 - i);
        check(out_bin == S'(k), $sformatf("bin order: pos %0d got %0d exp %0d", p, out_bin, k));
        yr[f][k] = real'(out_re);
        yi[f][k] = real'(out_im);
      end
      out_count++;
    end
  end

  task automatic evaluate();
    real total = 0.0;
    // sampled one advancing clock after the output register is loaded
    check(got_first && first_out_adv == LAT + 1,
          $sformatf("latency %0d, expected %0d", first_out_adv, LAT));
    for (int f = 0; f < FRAMES; f++) begin
      real sig = 0.0, err = 0.0, sqnr;
      for (int k = 0; k < N; k++) begin
        real er = 0.0, ei = 0.0;
        for (int n = 0; n < N; n++) begin
          real a = 2.0 * PI * ((n * k) % N) / N;
          er += xr[f][n] * $cos(a) + xi[f][n] * $sin(a);
          ei += xi[f][n] * $cos(a) - xr[f][n] * $sin(a);
        end
        er = er / N;
        ei = ei / N;
        sig += er * er + ei * ei;
        err += (yr[f][k] - er) ** 2 + (yi[f][k] - ei) ** 2;
      end
      sqnr = 10.0 * $log10(sig / (err + 1.0e-9));
      total += sqnr;
      check(sqnr >= SQNR_MIN,
            $sformatf("frame %0d SQNR %0.1f dB below %0.1f", f, sqnr, SQNR_MIN));
    end
    sqnr_cdb = $rtoi(100.0 * total / FRAMES);
    done = 1;
  endtask
endmodule
