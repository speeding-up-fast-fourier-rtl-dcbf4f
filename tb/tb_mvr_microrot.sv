// tb_mvr_microrot - checks one MVR micro-rotation against integer
// arithmetic worked out here: x' = x -/+ floor(y / 2^t), y' = y +/- floor(x / 2^t)
// for the two signs, and no change for a skipped step; also checks that the
// output register holds when en is low.
//
// The micro-rotation equations are the MVR CORDIC ones; widths and the
// random stimulus are this bench's choices.
module tb_mvr_microrot;
  import hwf_fft_pkg::*;
  localparam int W = 18;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x_i = 0, y_i = 0, x_o, y_o;
  mr_op_e op = MR_SKIP;
  logic [3:0] shift = 0;

  mvr_microrot #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic longint fdiv(input longint v, input int t);
    longint q = v / (longint'(1) << t);
    if (v < 0 && q * (longint'(1) << t) != v) q = q - 1;
    return q;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      longint xv, yv, ex, ey;
      int t, o;
      xv = $signed($urandom_range(0, 2 ** 17 - 1)) - 2 ** 16;
      yv = $signed($urandom_range(0, 2 ** 17 - 1)) - 2 ** 16;
      t  = $urandom_range(0, 15);
      o  = $urandom_range(0, 2);
      x_i <= W'(xv); y_i <= W'(yv); shift <= 4'(t);
      op  <= (o == 0) ? MR_SKIP : (o == 1) ? MR_POS : MR_NEG;
      en  <= 1;
      @(posedge clk);
      en <= 0;
      #1;
      case (o)
        0: begin ex = xv;              ey = yv;              end
        1: begin ex = xv - fdiv(yv, t); ey = yv + fdiv(xv, t); end
        default: begin ex = xv + fdiv(yv, t); ey = yv - fdiv(xv, t); end
      endcase
      checks++;
      if (x_o != W'(ex) || y_o != W'(ey)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: op %0d t %0d in (%0d,%0d) got (%0d,%0d) exp (%0d,%0d)",
                   o, t, xv, yv, x_o, y_o, ex, ey);
      end
      // hold while en is low
      x_i <= ~x_i; y_i <= ~y_i;
      @(posedge clk);
      #1;
      checks++;
      if (x_o != W'(ex) || y_o != W'(ey)) begin
        failures++;
        if (failures < 10) $display("FAIL: output changed with en low");
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
