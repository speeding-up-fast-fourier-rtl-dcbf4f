// tb_r2sdf_bf - streams random samples through one R2SDF butterfly stage
// (D = 4) with random stalls and compares its valid outputs, in order,
// with the radix-2 butterfly worked out here: for each block of 2D inputs,
// floor((x[i] + x[i+D]) / 2) for i < D, then floor((x[i] - x[i+D]) / 2).
// Also checks the latency: the first output appears D + 1 advancing clocks
// after the first input.
//
// The butterfly schedule is the standard R2SDF one; the halving it checks
// is this design's scaling choice.
module tb_r2sdf_bf;
  localparam int W = 16;
  localparam int D = 4;

  logic clk = 0, rst_n = 0, en = 0, vin = 0, vout;
  logic signed [W-1:0] din_re = 0, din_im = 0, dout_re, dout_im;

  r2sdf_bf #(.W(W), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xr [$], xi [$];
  int er [$], ei [$];
  int adv = 0, first_adv = -1, nout = 0;

  function automatic int fl2(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 40 * D; i++) begin
      int a, b;
      while ($urandom_range(0, 4) == 0) begin
        en <= 0;
        @(posedge clk);
      end
      a = $urandom_range(0, 65535) - 32768;
      b = $urandom_range(0, 65535) - 32768;
      xr.push_back(a); xi.push_back(b);
      en <= 1; vin <= 1; din_re <= W'(a); din_im <= W'(b);
      @(posedge clk);
    end
    en <= 1; vin <= 1; din_re <= 0; din_im <= 0;
    repeat (2 * D + 2) @(posedge clk);
    checks++;
    if (first_adv != D + 2) begin   // sampled one clock after loading
      failures++;
      $display("FAIL: first output after %0d clocks, expected %0d", first_adv - 1, D + 1);
    end
    checks++;
    if (nout < 40 * D) begin
      failures++;
      $display("FAIL: only %0d outputs", nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en) begin
      adv++;
      if (vout) begin
        int blk, i, ex, ey, p;
        if (first_adv < 0) first_adv = adv;
        blk = nout / (2 * D);
        p   = nout % (2 * D);
        if (nout < 40 * D) begin
          if (p < D) begin
            i  = blk * 2 * D + p;
            ex = fl2(xr[i] + xr[i + D]);
            ey = fl2(xi[i] + xi[i + D]);
          end else begin
            i  = blk * 2 * D + p - D;
            ex = fl2(xr[i] - xr[i + D]);
            ey = fl2(xi[i] - xi[i + D]);
          end
          checks++;
          if (dout_re != W'(ex) || dout_im != W'(ey)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: out %0d got (%0d,%0d) exp (%0d,%0d)", nout, dout_re, dout_im, ex, ey);
          end
        end
        nout++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
