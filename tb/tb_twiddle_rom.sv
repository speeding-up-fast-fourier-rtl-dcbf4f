// tb_twiddle_rom - reads every word of the control ROMs of stages 3 and 6
// of a 64-point FFT (3 micro-rotations) and checks, with angles computed
// here, that the rotation pair realises the conventional twiddle:
//   (lower angle) - (upper angle) = -2*pi*e/N, e = bitrev(b) * N / 2^stage,
// within the residual error of a 3-step MVR CORDIC, and that the CORDIC
// part of each rotation stays within +/-(22.5 deg + that error).
//
// The twiddle exponents are those of the radix-2 flow graph; the angle
// tolerances are this bench's choices.
module tb_twiddle_rom;
  import hwf_fft_pkg::*;
  localparam int  N    = 64;
  localparam int  ITER = 3;
  localparam real PI   = 3.14159265358979323846;
  localparam real TOL  = 1.5 * PI / 180.0;   // 1.5 degree residual

  logic [1:0] addr3;
  logic [4:0] addr6;
  rot_ctrl_t  c3, c6;

  twiddle_rom #(.N(N), .STAGE(3), .ITER(ITER)) dut3 (.addr(addr3), .ctrl(c3));
  twiddle_rom #(.N(N), .STAGE(6), .ITER(ITER)) dut6 (.addr(addr6), .ctrl(c6));

  int checks = 0, failures = 0;

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

  task automatic check_word(input int stage, input int b, input rot_ctrl_t c);
    real cord = 0.0, lower, upper, want, diff;
    int e;
    for (int m = 0; m < MAX_ITER; m++) begin
      real a = $atan(1.0 / (2.0 ** c.step[m].shift));
      if (m >= ITER) begin
        checks++;
        if (c.step[m].op != MR_SKIP) begin
          failures++;
          $display("FAIL: stage %0d word %0d uses step %0d beyond ITER", stage, b, m);
        end
      end
      if (c.step[m].op == MR_POS) cord += a;
      else if (c.step[m].op == MR_NEG) cord -= a;
    end
    lower = real'(c.quad) * PI / 2.0 + cord;
    upper = -cord;
    e     = brev(b, stage - 1) * (N >> stage);
    want  = -2.0 * PI * real'(e) / real'(N);
    diff  = wrap(lower - upper - want);
    checks++;
    if (diff > TOL || diff < -TOL) begin
      failures++;
      $display("FAIL: stage %0d word %0d: pair difference off by %0.3f deg",
               stage, b, diff * 180.0 / PI);
    end
    checks++;
    if (cord > PI / 8.0 + TOL || cord < -PI / 8.0 - TOL) begin
      failures++;
      $display("FAIL: stage %0d word %0d: CORDIC angle %0.2f deg too large",
               stage, b, cord * 180.0 / PI);
    end
  endtask

  initial begin
    for (int b = 0; b < 4; b++) begin
      addr3 = 2'(b);
      #1 check_word(3, b, c3);
    end
    for (int b = 0; b < 32; b++) begin
      addr6 = 5'(b);
      #1 check_word(6, b, c6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
