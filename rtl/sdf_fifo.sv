// sdf_fifo - feedback delay line of a single-path delay-feedback butterfly
// (the boxes drawn above each butterfly in the R2SDF architecture).
//
// A word written with en high comes out on rd_data exactly D enabled
// clocks later.  It is a circular buffer: one pointer addresses the
// memory, the old word is read combinationally and the new one written in
// the same clock.  For D = 1 it reduces to a register.  The memory is not
// reset (its contents are only read after D writes); the pointer is.
//
// Its length follows the R2SDF architecture (N/2, N/4, ... 1 words). Building
// it as a single-pointer register-file buffer is this design's choice.
module sdf_fifo #(
  parameter int W = 32,
  parameter int D = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] wr_data,
  output logic [W-1:0] rd_data
);

  localparam int AW = (D > 1) ? $clog2(D) : 1;

  logic [W-1:0]  mem [D];
  logic [AW-1:0] ptr;

  assign rd_data = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (en)
      ptr <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
  end

endmodule
