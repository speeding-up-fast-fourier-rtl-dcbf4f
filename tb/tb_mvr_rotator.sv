// tb_mvr_rotator - drives the MVR twiddle rotators of stages 4 and 6 of a
// 64-point FFT (3 micro-rotations) with frames in which both inputs of
// every butterfly carry the same random value v, with random stalls.
// Worked out here for each butterfly of block b:
//   out_lower / out_upper = exp(-j*2*pi*e/N), e = bitrev(b) * N / 2^stage
//     (within 1.5 degrees and 1 % in magnitude): the pair realises the
//     twiddle while both inputs see the same CORDIC gain;
//   angle(out_upper / v) within +/-24 degrees and |out_upper / v| in
//     [0.5, 1.5]: only the half-angle goes through the CORDIC;
// and the latency is ITER advancing clocks.
//
// The equal-gain, right-phase-difference property is what the HW-F
// algorithm requires of a rotation pair; the tolerances are this bench's.
module tb_mvr_rotator;
  localparam int  N    = 64;
  localparam int  W    = 16;
  localparam int  ITER = 3;
  localparam int  S    = 6;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, en = 0, vin = 0;
  logic signed [W-1:0] din_re = 0, din_im = 0;
  logic v4, v6;
  logic signed [W-1:0] o4_re, o4_im, o6_re, o6_im;

  mvr_rotator #(.N(N), .STAGE(4), .W(W), .ITER(ITER)) dut4 (
    .clk, .rst_n, .en, .vin, .din_re, .din_im,
    .vout(v4), .dout_re(o4_re), .dout_im(o4_im));
  mvr_rotator #(.N(N), .STAGE(6), .W(W), .ITER(ITER)) dut6 (
    .clk, .rst_n, .en, .vin, .din_re, .din_im,
    .vout(v6), .dout_re(o6_re), .dout_im(o6_im));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int brev(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((v & (1 << i)) != 0) r += 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic real wrap(input real a);
    while (a > PI)   a -= 2.0 * PI;
    while (a <= -PI) a += 2.0 * PI;
    return a;
  endfunction

  // inputs of frame 0 for stage 4 and stage 6 pairing
  int fr [2][N];
  int fi [2][N];
  int r4 [N], i4 [N], r6 [N], i6 [N];
  int n4 = 0, n6 = 0, adv = 0, first6 = -1;

  initial begin
    for (int k = 0; k < 2; k++) begin
      automatic int st = (k == 0) ? 4 : 6;
      automatic int L  = N >> (st - 1);
      for (int n = 0; n < N; n++) begin
        if ((n % L) < L / 2) begin
          automatic int mag = $urandom_range(4000, 12000);
          automatic real ph = real'($urandom_range(0, 3599)) * PI / 1800.0;
          fr[k][n] = $rtoi(mag * $cos(ph));
          fi[k][n] = $rtoi(mag * $sin(ph));
          fr[k][n + L / 2] = fr[k][n];
          fi[k][n + L / 2] = fi[k][n];
        end
      end
    end
  end

  // frame 0 uses the stage-4 pairing, frame 1 the stage-6 pairing; each
  // rotator is checked on the frame built for it
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 2; k++)
      for (int n = 0; n < N; n++) begin
        while ($urandom_range(0, 5) == 0) begin
          en <= 0;
          @(posedge clk);
        end
        en <= 1; vin <= 1;
        din_re <= W'(fr[k][n]); din_im <= W'(fi[k][n]);
        @(posedge clk);
      end
    en <= 1; vin <= 0;
    repeat (ITER + 2) @(posedge clk);
    evaluate();
  end

  always @(posedge clk) begin
    if (rst_n && en) begin
      adv++;
      if (v4) begin
        if (n4 < N) begin r4[n4] = int'(o4_re); i4[n4] = int'(o4_im); end
        n4++;
      end
      if (v6) begin
        if (first6 < 0) first6 = adv;
        if (n6 >= N && n6 < 2 * N) begin r6[n6 - N] = int'(o6_re); i6[n6 - N] = int'(o6_im); end
        n6++;
      end
    end
  end

  task automatic check_stage(input int st, input int k);
    int L = N >> (st - 1);
    for (int u = 0; u < N; u++) begin
      if ((u % L) < L / 2) begin
        int  d = u + L / 2, b = u / L, e;
        real ur, ui, dr, di, vr, vi, qr, qi, want, got, mu, md, gu, au;
        ur = (st == 4) ? r4[u] : r6[u];  ui = (st == 4) ? i4[u] : i6[u];
        dr = (st == 4) ? r4[d] : r6[d];  di = (st == 4) ? i4[d] : i6[d];
        vr = fr[k][u]; vi = fi[k][u];
        e    = brev(b, st - 1) * (N >> st);
        want = -2.0 * PI * e / N;
        got  = $atan2(di, dr) - $atan2(ui, ur);
        check(wrap(got - want) < 1.5 * PI / 180.0 && wrap(got - want) > -1.5 * PI / 180.0,
              $sformatf("stage %0d pos %0d: pair angle %0.2f, twiddle %0.2f deg",
                        st, u, got * 180.0 / PI, want * 180.0 / PI));
        mu = $sqrt(ur * ur + ui * ui);
        md = $sqrt(dr * dr + di * di);
        check(md < mu * 1.01 + 3.0 && md > mu * 0.99 - 3.0,
              $sformatf("stage %0d pos %0d: unequal gains %0.1f vs %0.1f", st, u, mu, md));
        gu = mu / $sqrt(vr * vr + vi * vi);
        au = wrap($atan2(ui, ur) - $atan2(vi, vr));
        check(gu > 0.5 && gu < 1.5 && au < 24.0 * PI / 180.0 && au > -24.0 * PI / 180.0,
              $sformatf("stage %0d pos %0d: upper gain %0.3f angle %0.2f deg",
                        st, u, gu, au * 180.0 / PI));
      end
    end
  endtask

  task automatic evaluate();
    check(first6 == ITER + 1, $sformatf("latency %0d, expected %0d", first6 - 1, ITER));
    check(n4 == 2 * N && n6 == 2 * N, "output count");
    check_stage(4, 0);
    check_stage(6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
