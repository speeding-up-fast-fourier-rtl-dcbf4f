// tb_quad_rotator - streams two 16-point frames through the stage-2
// trivial rotator and checks that only the lower inputs of the second
// half of each frame (positions 12..15) come out multiplied by -j, that
// the rest pass unchanged, that stalled clocks do not advance the position,
// and that -(-2^15) saturates.
//
// The 1 / -j pattern is the standard radix-2 one for that stage; the
// saturation check tests this design's own overflow rule.
module tb_quad_rotator;
  localparam int N = 16;
  localparam int W = 16;

  logic clk = 0, rst_n = 0, en = 0, vin = 0, vout;
  logic signed [W-1:0] din_re = 0, din_im = 0, dout_re, dout_im;

  quad_rotator #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      for (int p = 0; p < N; p++) begin
        int a, b, er, ei;
        if ($urandom_range(0, 3) == 0) begin
          en <= 0; vin <= 0;
          @(posedge clk);
        end
        a = $urandom_range(0, 65535) - 32768;
        b = (f == 3) ? -32768 : $urandom_range(0, 65535) - 32768;
        en <= 1; vin <= 1; din_re <= W'(a); din_im <= W'(b);
        #1;
        if (p >= 12) begin
          er = b; ei = (a == -32768) ? 32767 : -a;
        end else begin
          er = a; ei = b;
        end
        checks++;
        if (dout_re != W'(er) || dout_im != W'(ei) || !vout) begin
          failures++;
          if (failures < 10)
            $display("FAIL: pos %0d in (%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                     p, a, b, dout_re, dout_im, er, ei);
        end
        @(posedge clk);
      end
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
