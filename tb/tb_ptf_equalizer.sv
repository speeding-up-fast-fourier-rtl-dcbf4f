// tb_ptf_equalizer - checks the output equaliser of a 16-point FFT with
// 3-step rotators.  For every output position p the scale factor c(p) that
// the rotators leave on it is rebuilt here by multiplying, stage by stage,
// the upper-input factors prod(1 - j*sigma*2^-t) (and 1/2 where a block is
// normalised) named by each stage's control word.  Feeding A*c(p) must give
// A back (within 2 LSB), with bin = bitrev(p), raw = the input, one clock
// of latency, and no advance while en is low.
//
// Removing the carried factors at the output follows the HW-F algorithm;
// the 2 LSB tolerance and the 16-point size are this bench's choices.
module tb_ptf_equalizer;
  import hwf_fft_pkg::*;
  localparam int N    = 16;
  localparam int W    = 16;
  localparam int ITER = 3;
  localparam int S    = 4;

  logic clk = 0, rst_n = 0, en = 0, vin = 0, vout;
  logic [S-1:0] bin;
  logic signed [W-1:0] din_re = 0, din_im = 0, dout_re, dout_im, raw_re, raw_im;

  ptf_equalizer #(.N(N), .W(W), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  task automatic scale_of(input int p, output real cr, output real ci);
    cr = 1.0; ci = 0.0;
    for (int s = 2; s <= S; s++) begin
      rot_ctrl_t c = rot_ctrl(N, s, p >> (S - s + 1), ITER);
      for (int m = 0; m < ITER; m++) begin
        real f = 1.0 / (2.0 ** c.step[m].shift), sg, tr;
        sg = (c.step[m].op == MR_POS) ? -1.0 : (c.step[m].op == MR_NEG) ? 1.0 : 0.0;
        // (cr + j ci) * (1 + j sg f)
        tr = cr - ci * sg * f;
        ci = ci + cr * sg * f;
        cr = tr;
      end
      if (c.norm) begin cr = cr / 2.0; ci = ci / 2.0; end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 3; f++)
      for (int p = 0; p < N; p++) begin
        automatic real ar = real'($urandom_range(0, 20000)) - 10000.0;
        automatic real ai = real'($urandom_range(0, 20000)) - 10000.0;
        real cr, ci;
        int ir, ii, k;
        scale_of(p, cr, ci);
        ir = $rtoi(ar * cr - ai * ci);
        ii = $rtoi(ar * ci + ai * cr);
        while ($urandom_range(0, 4) == 0) begin
          en <= 0;
          @(posedge clk);
        end
        en <= 1; vin <= 1; din_re <= W'(ir); din_im <= W'(ii);
        @(posedge clk);
        #1;
        k = 0;
        for (int i = 0; i < S; i++) if (((p >> i) & 1) != 0) k += 1 << (S - 1 - i);
        check(vout && bin == S'(k), $sformatf("pos %0d: bin %0d, expected %0d", p, bin, k));
        check(raw_re == W'(ir) && raw_im == W'(ii), $sformatf("pos %0d: raw output", p));
        check(dout_re - ar < 2.5 && dout_re - ar > -2.5 && dout_im - ai < 2.5 && dout_im - ai > -2.5,
              $sformatf("pos %0d: got (%0d,%0d), expected (%0.1f,%0.1f)", p, dout_re, dout_im, ar, ai));
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
