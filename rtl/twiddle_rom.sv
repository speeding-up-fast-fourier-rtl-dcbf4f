// twiddle_rom - CORDIC control ROM of the rotator in front of butterfly
// stage STAGE (2..log2 N) of an N-point HW-F FFT.
//
// A stage-STAGE block of 2^(log2N-STAGE+1) samples is one butterfly group:
// all its butterflies need the same twiddle pair, so the ROM holds one
// control word per block, 2^(STAGE-1) words.  Word b gives the quadrant
// rotation of the lower input, the ITER micro-rotations (shift and sign) of
// the MVR CORDIC, and the gain-normalisation flag; hwf_fft_pkg::rot_ctrl()
// computes it at elaboration from the twiddle W_N^e, e = bitrev(b)*N/2^STAGE.
// The read is combinational.
//
// One ROM per rotator addressed by the block follows the usual CORDIC
// R2SDF structure. The word layout (2-bit quadrant, norm flag, 2-bit
// operation and 4-bit shift per micro-rotation) is this design's own.
module twiddle_rom
  import hwf_fft_pkg::*;
#(
  parameter int N     = 1024,
  parameter int STAGE = 10,
  parameter int ITER  = 3
) (
  input  logic [((STAGE > 1) ? STAGE - 1 : 1)-1:0] addr,
  output rot_ctrl_t                                 ctrl
);

  localparam int DEPTH = 1 << (STAGE - 1);

  rot_ctrl_t rom [DEPTH];

  for (genvar b = 0; b < DEPTH; b++) begin : g_word
    localparam rot_ctrl_t WORD = rot_ctrl(N, STAGE, b, ITER);
    assign rom[b] = WORD;
  end

  assign ctrl = rom[addr];

endmodule
