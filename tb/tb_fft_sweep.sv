// tb_fft_sweep - accuracy sweep of the HW-F R2SDF FFT over FFT length and
// number of MVR micro-rotations, the two axes along which the radix-2
// algorithm is evaluated (lengths 8 to 1024, 1 to 4 iterations).
//
// Several fft_sweep_point harnesses run side by side on one clock, each with
// its own FFT instance:
//   - ITER = 1, 2, 3, 4 at N = 64;
//   - N = 8, 16, 32, 128, 256, 512 at ITER = 3.
// Each checks latency, bin order and a per-configuration SQNR floor on noise.
// The floors are set for this implementation (16-bit words, halving in every
// butterfly, greedy mirror-image rotations), not taken from published
// figures; they sit about 5 dB below the values measured with these
// settings. On top of that, this bench checks that accuracy improves with
// every added micro-rotation (1 to 4) and is better at N = 8 than at
// N = 512. The measured SQNR of every configuration is printed.
module tb_fft_sweep;
  localparam int NP = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done [NP];
  int   chk  [NP];
  int   fl   [NP];
  int   sq   [NP];

  fft_sweep_point #(.N(64),  .ITER(1), .SQNR_MIN(11.0)) u_i1  (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .sqnr_cdb(sq[0]));
  fft_sweep_point #(.N(64),  .ITER(2), .SQNR_MIN(24.0)) u_i2  (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .sqnr_cdb(sq[1]));
  fft_sweep_point #(.N(64),  .ITER(3), .SQNR_MIN(39.0)) u_i3  (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .sqnr_cdb(sq[2]));
  fft_sweep_point #(.N(64),  .ITER(4), .SQNR_MIN(43.0)) u_i4  (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .sqnr_cdb(sq[3]));
  fft_sweep_point #(.N(8),   .ITER(3), .SQNR_MIN(52.0)) u_n8  (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .sqnr_cdb(sq[4]));
  fft_sweep_point #(.N(16),  .ITER(3), .SQNR_MIN(45.0)) u_n16 (.clk, .rst_n, .done(done[5]), .checks(chk[5]), .failures(fl[5]), .sqnr_cdb(sq[5]));
  fft_sweep_point #(.N(32),  .ITER(3), .SQNR_MIN(44.0)) u_n32 (.clk, .rst_n, .done(done[6]), .checks(chk[6]), .failures(fl[6]), .sqnr_cdb(sq[6]));
  fft_sweep_point #(.N(128), .ITER(3), .SQNR_MIN(37.0)) u_n128(.clk, .rst_n, .done(done[7]), .checks(chk[7]), .failures(fl[7]), .sqnr_cdb(sq[7]));
  fft_sweep_point #(.N(256), .ITER(3), .SQNR_MIN(35.0)) u_n256(.clk, .rst_n, .done(done[8]), .checks(chk[8]), .failures(fl[8]), .sqnr_cdb(sq[8]));
  fft_sweep_point #(.N(512), .ITER(3), .SQNR_MIN(33.0)) u_n512(.clk, .rst_n, .done(done[9]), .checks(chk[9]), .failures(fl[9]), .sqnr_cdb(sq[9]));

  localparam int PN [NP] = '{64, 64, 64, 64, 8, 16, 32, 128, 256, 512};
  localparam int PI_ [NP] = '{1, 2, 3, 4, 3, 3, 3, 3, 3, 3};

  int checks = 0, failures = 0;

  function automatic bit all_done();
    for (int i = 0; i < NP; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NP; i++) begin
      $display("N=%0d ITER=%0d: SQNR %0d.%02d dB, %0d checks, %0d failures",
               PN[i], PI_[i], sq[i] / 100, sq[i] % 100, chk[i], fl[i]);
      checks   += chk[i];
      failures += fl[i];
    end
    checks += 4;
    if (!(sq[1] > sq[0])) begin
      failures++;
      $display("FAIL: 2 micro-rotations not better than 1");
    end
    if (!(sq[2] > sq[1])) begin
      failures++;
      $display("FAIL: 3 micro-rotations not better than 2");
    end
    if (!(sq[3] > sq[2])) begin
      failures++;
      $display("FAIL: 4 micro-rotations not better than 3");
    end
    if (!(sq[4] > sq[9])) begin
      failures++;
      $display("FAIL: 8-point FFT not more accurate than 512-point");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
