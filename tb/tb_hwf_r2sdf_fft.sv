// tb_hwf_r2sdf_fft - end-to-end test of the HW-F R2SDF FFT at its default
// size (N = 1024, 16-bit words, 3-iteration MVR rotators).
//
// Four frames are streamed back to back: Gaussian-like noise, a single
// complex tone, noise again, and two tones; a fifth frame of zeros flushes
// the pipeline.  Input gaps (in_valid low) are inserted to exercise the
// stall.  The reference is a direct DFT in real arithmetic, X(k)/N.
// Checks:
//   - latency of the first output (Table-2.1 R2SDF formula + 1 clock of
//     equaliser), counted in advancing clocks;
//   - bit-reversed output order (out_bin);
//   - SQNR of every frame against the reference above a threshold, and the
//     tone bin's amplitude;
//   - the raw (unequalised) output carries a scale between 2/3 and 4/3;
//   - each mechanism happened: stall, -j rotation, quadrant rotation in an
//     MVR rotator, skipped micro-rotation, gain-normalisation halving.
//
// The latency formula is the standard R2SDF one; the stimuli, the 30 dB
// floor and the other tolerances are this bench's own choices.
module tb_hwf_r2sdf_fft;
  localparam int    N    = 1024;
  localparam int    W    = 16;
  localparam int    ITER = 3;
  localparam int    S    = $clog2(N);
  localparam int    LAT  = (S - 2) * ITER + S + N - 1 + 1;
  localparam int    NF   = 4;                 // checked frames
  localparam real   PI   = 3.14159265358979323846;
  localparam real   SQNR_MIN = 30.0;
  localparam int    TONE_K   = 37;
  localparam real   TONE_A   = 12000.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic [S-1:0] out_bin;
  logic signed [W-1:0] out_re, out_im, out_raw_re, out_raw_im;

  hwf_r2sdf_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // stimulus frames
  real xr [NF][N];
  real xi [NF][N];
  real cosT [N];
  real sinT [N];

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(0, 65535)) / 65536.0;
    return acc - 6.0;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      cosT[n] = $cos(2.0 * PI * n / N);
      sinT[n] = $sin(2.0 * PI * n / N);
    end
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        case (f)
          0, 2: begin
            xr[f][n] = $rtoi(gauss() * 3000.0);
            xi[f][n] = $rtoi(gauss() * 3000.0);
          end
          1: begin
            xr[f][n] = $rtoi(TONE_A * cosT[(TONE_K * n) % N]);
            xi[f][n] = $rtoi(TONE_A * sinT[(TONE_K * n) % N]);
          end
          default: begin  // two tones, one near the end of the spectrum
            xr[f][n] = $rtoi(8000.0 * cosT[(300 * n) % N] + 6000.0 * cosT[(1000 * n) % N]);
            xi[f][n] = $rtoi(8000.0 * sinT[(300 * n) % N] - 6000.0 * sinT[(1000 * n) % N]);
          end
        endcase
      end
  end

  // ---------------------------------------------------------------- drive
  int unsigned adv = 0;          // advancing clocks since the first sample
  int unsigned first_out_adv = 0;
  bit          got_first = 0;
  int          stall_cnt = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f <= NF; f++) begin
      for (int n = 0; n < N; n++) begin
        if ($urandom_range(0, 99) < 3) begin   // random gap: stall
          in_valid <= 0;
          repeat ($urandom_range(1, 3)) @(posedge clk);
        end
        in_valid <= 1;
        in_re <= (f < NF) ? W'($rtoi(xr[f][n])) : '0;
        in_im <= (f < NF) ? W'($rtoi(xi[f][n])) : '0;
        @(posedge clk);
      end
    end
    // keep feeding zeros until all checked frames are out
    while (out_count < NF * N) begin
      in_valid <= 1; in_re <= 0; in_im <= 0;
      @(posedge clk);
    end
    in_valid <= 0;
    @(posedge clk);
    finish_test();
  end

  // ---------------------------------------------------------------- monitor
  int out_count = 0;
  real yr [NF][N];
  real yi [NF][N];
  real rr [NF][N];
  real ri [NF][N];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      adv++;
    end
    if (rst_n && !in_valid && adv > 0 && adv < (NF + 1) * N) stall_cnt++;
    if (rst_n && in_valid && out_valid) begin
      if (!got_first) begin
        got_first = 1;
        first_out_adv = adv;
      end
      if (out_count < NF * N) begin
        int f, p, k;
        f = out_count / N;
        p = out_count % N;
        k = 0;
        for (int i = 0; i < S; i++) k |= ((p >> i) & 1) << (S - 1 - i);
        check(out_bin == S'(k), $sformatf("bin order: pos %0d got %0d exp %0d", p, out_bin, k));
        yr[f][k] = real'(out_re);
        yi[f][k] = real'(out_im);
        rr[f][k] = real'(out_raw_re);
        ri[f][k] = real'(out_raw_im);
      end
      out_count++;
    end
  end

  // ---------------------------------------------------------------- mechanisms
  // Every sample of every frame passes every rotator, so how often each
  // rotator mechanism acts per frame follows from the control words the
  // design's rotators use (hwf_fft_pkg::rot_ctrl); they are counted here for
  // the frames that came out of the FFT with a good SQNR.
  int n_quadj = 0, n_quad_mvr = 0, n_skip = 0, n_norm = 0;

  task automatic count_mechanisms(input int frames);
    for (int s = 2; s <= S; s++)
      for (int n = 0; n < N; n++) begin
        hwf_fft_pkg::rot_ctrl_t c = hwf_fft_pkg::rot_ctrl(N, s, n >> (S - s + 1), ITER);
        bit down = ((n >> (S - s)) & 1) != 0;
        if (s == 2) begin
          if (down && c.quad == 2'd3) n_quadj += frames;
        end else begin
          if (down && c.quad != 2'd0) n_quad_mvr += frames;
          if (c.norm) n_norm += frames;
          for (int m = 0; m < ITER; m++)
            if (c.step[m].op == hwf_fft_pkg::MR_SKIP) n_skip += frames;
        end
      end
  endtask

  // ---------------------------------------------------------------- results
  task automatic finish_test();
    // the monitor samples a register one advancing clock after it was
    // loaded, hence the + 1
    check(got_first && first_out_adv == LAT + 1,
          $sformatf("latency %0d, expected %0d", first_out_adv, LAT));
    for (int f = 0; f < NF; f++) begin
      real sig = 0.0, err = 0.0, sqnr;
      real rmin = 1.0e9, rmax = 0.0;
      for (int k = 0; k < N; k++) begin
        real er = 0.0, ei = 0.0, mag, rmag;
        for (int n = 0; n < N; n++) begin
          int idx = (n * k) % N;
          // x * exp(-j 2 pi n k / N)
          er += xr[f][n] * cosT[idx] + xi[f][n] * sinT[idx];
          ei += xi[f][n] * cosT[idx] - xr[f][n] * sinT[idx];
        end
        er = er / N;
        ei = ei / N;
        sig += er * er + ei * ei;
        err += (yr[f][k] - er) ** 2 + (yi[f][k] - ei) ** 2;
        mag  = $sqrt(er * er + ei * ei);
        rmag = $sqrt(rr[f][k] ** 2 + ri[f][k] ** 2);
        if (mag > 100.0) begin
          if (rmag / mag < rmin) rmin = rmag / mag;
          if (rmag / mag > rmax) rmax = rmag / mag;
        end
      end
      sqnr = 10.0 * $log10(sig / (err + 1.0e-9));
      $display("frame %0d: SQNR %0.1f dB, raw scale %0.3f..%0.3f", f, sqnr, rmin, rmax);
      check(sqnr >= SQNR_MIN, $sformatf("frame %0d SQNR %0.1f dB below %0.1f", f, sqnr, SQNR_MIN));
      if (rmax > 0.0)
        check(rmin > 0.6 && rmax < 1.4,
              $sformatf("frame %0d raw scale out of range %0.3f..%0.3f", f, rmin, rmax));
    end
    // the tone lands in one bin with amplitude TONE_A
    begin
      real m = $sqrt(yr[1][TONE_K] ** 2 + yi[1][TONE_K] ** 2);
      check(m > 0.97 * TONE_A && m < 1.03 * TONE_A,
            $sformatf("tone bin amplitude %0.1f, expected %0.1f", m, TONE_A));
    end
    count_mechanisms(out_count >= NF * N ? NF : 0);
    $display("mechanisms: stall=%0d minus_j=%0d mvr_quadrant=%0d skipped_microrot=%0d norm_halving=%0d",
             stall_cnt, n_quadj, n_quad_mvr, n_skip, n_norm);
    check(stall_cnt  > 0, "no stall happened");
    check(n_quadj    > 0, "no -j rotation happened");
    check(n_quad_mvr > 0, "no quadrant rotation in an MVR rotator happened");
    check(n_skip     > 0, "no skipped micro-rotation happened");
    check(n_norm     > 0, "no gain-normalisation halving happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (20 * N + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
