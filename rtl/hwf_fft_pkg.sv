// hwf_fft_pkg - shared types and elaboration-time functions of the
// hardware-friendly (HW-F) radix-2 single-path delay-feedback FFT.
//
// The FFT twiddle rotators are MVR CORDICs: each of ITER micro-rotations
// either skips or rotates by +/-atan(2^-t), t = 0..15.  The rotation that a
// rotator applies to a sample depends only on the stage and on the block the
// sample belongs to, so the control words live in small ROMs whose contents
// are computed here, at elaboration, from the FFT size.
//
// HW-F rule used for every butterfly group (all butterflies of one block of
// one stage): the conventional flow graph puts twiddle W_N^e on the lower
// butterfly input and nothing on the upper one.  Write the twiddle angle as
// th = q*90deg + d with d in [-45deg, 45deg).  The lower input is rotated by
// q*90deg (free: swap/negate) and by +d/2 through the CORDIC, the upper input
// by -d/2 through the same CORDIC with its micro-rotation signs inverted.
// Both inputs therefore see exactly the same CORDIC gain, their phase
// difference is th as required, and the common factor (gain times
// exp(-j*d/2)), the propagating twiddle factor, is carried to the FFT output
// where ptf_coef() undoes it.  When the accumulated gain of a block would
// exceed 4/3 the rotator also halves the block (a 1-bit right shift), which
// keeps the carried gain between 2/3 and 4/3.
//
// The choice of the micro-rotations is greedy (each step takes the shift and
// sign that most reduce the residual angle); a joint search over point pairs
// would give higher SQNR but is an offline optimisation, not hardware.
//
// From the published HW-F algorithm: the idea of equal-gain pairs whose
// phase difference is the twiddle, one parameter set per butterfly group,
// and the common factors carried to the output. This design's own choices:
// the mirror-image pair (+d/2, -d/2), the greedy parameter choice, the
// 4/3 normalisation threshold and the control-word layout.
package hwf_fft_pkg;

  localparam int MAX_ITER  = 8;   // widest rotator supported by the ROM word
  localparam int MAX_SHIFT = 15;  // barrel shifters shift by 0..15 bits
  localparam int COEF_W    = 18;  // equaliser coefficient width
  localparam int COEF_FRAC = 16;  // fractional bits of the coefficient

  localparam real PI = 3.14159265358979323846;

  // One MVR micro-rotation: skip, or rotate by +/-atan(2^-shift).
  typedef enum logic [1:0] {
    MR_SKIP = 2'b00,
    MR_POS  = 2'b01,
    MR_NEG  = 2'b10
  } mr_op_e;

  typedef struct packed {
    mr_op_e     op;
    logic [3:0] shift;
  } mr_step_t;

  typedef mr_step_t [MAX_ITER-1:0] mr_steps_t;

  // Control word of one butterfly group (block) at one stage.
  //   quad : lower input is multiplied by j^quad before the CORDIC
  //   norm : halve both outputs of the rotator (gain normalisation)
  //   step : micro-rotations for the lower input; the upper input uses the
  //          same shifts with the signs inverted
  typedef struct packed {
    logic [1:0] quad;
    logic       norm;
    mr_steps_t  step;
  } rot_ctrl_t;

  function automatic int bitrev(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  function automatic int clog2i(input int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real micro_angle(input int t);
    return $atan(1.0 / (2.0 ** t));
  endfunction

  // Greedy MVR parameter choice for a rotation by angle a (radians).
  function automatic mr_steps_t mvr_select(input real a, input int iter);
    mr_steps_t st;
    real r = a;
    for (int m = 0; m < MAX_ITER; m++) begin
      st[m].op    = MR_SKIP;
      st[m].shift = '0;
    end
    for (int m = 0; m < iter && m < MAX_ITER; m++) begin
      real best = rabs(r);
      real ang  = 0.0;
      for (int t = 0; t <= MAX_SHIFT; t++) begin
        real at = micro_angle(t);
        if (rabs(r - at) < best) begin
          best = rabs(r - at); ang = at;
          st[m].op = MR_POS; st[m].shift = 4'(t);
        end
        if (rabs(r + at) < best) begin
          best = rabs(r + at); ang = -at;
          st[m].op = MR_NEG; st[m].shift = 4'(t);
        end
      end
      r = r - ang;
    end
    return st;
  endfunction

  // Magnitude gain of a set of micro-rotations.
  function automatic real mvr_gain(input mr_steps_t st);
    real g = 1.0;
    for (int m = 0; m < MAX_ITER; m++) begin
      int t;
      t = {28'd0, st[m].shift};
      if (st[m].op != MR_SKIP) g = g * $sqrt(1.0 + 1.0 / (4.0 ** t));
    end
    return g;
  endfunction

  // Twiddle exponent e of block b at stage s (W_N^e on the lower input).
  function automatic int twiddle_exp(input int n, input int s, input int b);
    return bitrev(b, s - 1) * (n >> s);
  endfunction

  // Quadrant and micro-rotations of block b at stage s, without the
  // normalisation flag.
  function automatic rot_ctrl_t rot_ctrl_raw(input int n, input int s,
                                             input int b, input int iter);
    rot_ctrl_t c;
    real th, d;
    int  q;
    th = -2.0 * PI * real'(twiddle_exp(n, s, b)) / real'(n);
    q  = int'($floor((th + PI / 4.0) / (PI / 2.0)));
    d  = th - real'(q) * PI / 2.0;
    c.quad = 2'(((q % 4) + 4) % 4);
    c.norm = 1'b0;
    c.step = mvr_select(d / 2.0, iter);
    return c;
  endfunction

  // Full control word, with the normalisation flag decided from the gain
  // accumulated by the chain of blocks that feed block b.
  function automatic rot_ctrl_t rot_ctrl(input int n, input int s,
                                         input int b, input int iter);
    rot_ctrl_t c;
    real cum = 1.0;
    for (int k = 2; k <= s; k++) begin
      c   = rot_ctrl_raw(n, k, b >> (s - k), iter);
      cum = cum * mvr_gain(c.step);
      if (cum > 4.0 / 3.0) begin
        cum    = cum / 2.0;
        c.norm = 1'b1;
      end
    end
    return c;
  endfunction

  // Equaliser coefficient for output position p (bit-reversed order): the
  // inverse of the propagating factor that all rotators left on it,
  // packed as {re, im}, each COEF_W bits with COEF_FRAC fractional bits.
  function automatic logic [2*COEF_W-1:0] ptf_coef(input int n, input int iter,
                                                   input int p);
    int  s_last = clog2i(n);
    real cr = 1.0, ci = 0.0, mag2, er, ei;
    logic signed [COEF_W-1:0] qr, qi;
    for (int k = 2; k <= s_last; k++) begin
      rot_ctrl_t c = rot_ctrl(n, k, (p >> 1) >> (s_last - k), iter);
      for (int m = 0; m < MAX_ITER; m++) begin
        // upper input: micro-rotation with inverted sign, factor 1 -/+ j*2^-t
        int  t;
        real f, tr;
        t = {28'd0, c.step[m].shift};
        f = 1.0 / (2.0 ** t);
        if (c.step[m].op == MR_POS) begin
          tr = cr + ci * f; ci = ci - cr * f; cr = tr;
        end else if (c.step[m].op == MR_NEG) begin
          tr = cr - ci * f; ci = ci + cr * f; cr = tr;
        end
      end
      if (c.norm) begin
        cr = cr / 2.0; ci = ci / 2.0;
      end
    end
    mag2 = cr * cr + ci * ci;
    er   = cr / mag2;
    ei   = -ci / mag2;
    qr   = COEF_W'(int'(er * (2.0 ** COEF_FRAC)));
    qi   = COEF_W'(int'(ei * (2.0 ** COEF_FRAC)));
    return {qr, qi};
  endfunction

endpackage
