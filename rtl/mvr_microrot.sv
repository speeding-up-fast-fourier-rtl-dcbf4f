// mvr_microrot - one micro-rotation of an MVR (modified vector rotational)
// CORDIC, the stage drawn in the MVR implementation figure: two barrel
// shifters and two add/subtract units.
//
//   op = MR_POS : x' = x - (y >>> shift),  y' = y + (x >>> shift)
//                 (rotation by +atan(2^-shift), gain sqrt(1+2^-2*shift))
//   op = MR_NEG : x' = x + (y >>> shift),  y' = y - (x >>> shift)
//   op = MR_SKIP: x' = x,                  y' = y   (the micro-rotation is
//                 skipped, which MVR allows)
//
// The shift amount and the sign come from the rotator's ROM.  Shifts are
// arithmetic and truncate (this design's choice).  The caller provides
// enough guard bits in W, so the add/subtract does not overflow.
// Timing: the result is registered, one clock of latency when en is high.
module mvr_microrot
  import hwf_fft_pkg::*;
#(
  parameter int W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  input  mr_op_e              op,
  input  logic [3:0]          shift,
  output logic signed [W-1:0] x_o,
  output logic signed [W-1:0] y_o
);

  logic signed [W-1:0] xs, ys, x_n, y_n;

  // Barrel shifters
  assign xs = x_i >>> shift;
  assign ys = y_i >>> shift;

  always_comb begin
    unique case (op)
      MR_POS:  begin x_n = x_i - ys; y_n = y_i + xs; end
      MR_NEG:  begin x_n = x_i + ys; y_n = y_i - xs; end
      default: begin x_n = x_i;      y_n = y_i;      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_o <= '0;
      y_o <= '0;
    end else if (en) begin
      x_o <= x_n;
      y_o <= y_n;
    end
  end

endmodule
