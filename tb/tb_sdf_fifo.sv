// tb_sdf_fifo - checks that the feedback delay line returns each word
// exactly D enabled clocks after it was written, with random gaps in en.
//
// The length D follows the R2SDF structure; D = 5 and the gap pattern are
// this bench's choices.
module tb_sdf_fifo;
  localparam int W = 12;
  localparam int D = 5;

  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] wr_data = 0, rd_data;

  sdf_fifo #(.W(W), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] v;
      bit e;
      v = W'($urandom);
      e = ($urandom_range(0, 3) != 0);
      en <= e; wr_data <= v;
      #1;
      if (e && hist.size() >= D) begin
        checks++;
        if (rd_data != hist[hist.size() - D]) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h exp %h", rd_data, hist[hist.size() - D]);
        end
      end
      @(posedge clk);
      if (e) hist.push_back(v);
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
