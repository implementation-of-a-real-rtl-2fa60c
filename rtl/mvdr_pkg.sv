// mvdr_pkg: number format, link types, shared constants and the beat schedule
// of the MVDR systolic beamformer.
//
// All arithmetic is two's-complement fixed point: DW-bit words with FW
// fraction bits (fx_t). Complex samples are a packed {re, im} pair. Every cell
// of the array runs on the same CELL_PERIOD-cycle "beat"; the global
// controller decodes a phase counter into the strobes listed here, so no cell
// carries its own control counter. The constants 2.9142 and 2 of the
// Newton-Raphson seed, the beat length of 51 cycles and the phase numbers
// 35/36/42/45 come from the published boundary-cell design; the word format,
// the CORDIC iteration count and which strobe sits at which phase are this
// design's own choices.
package mvdr_pkg;

  // Word format: DW bits, FW of them fractional (range +-2^(DW-FW-1)).
  localparam int unsigned DW = 32;
  localparam int unsigned FW = 20;

  typedef logic signed [DW-1:0]   fx_t;
  typedef logic signed [2*DW-1:0] fx2_t;   // full-width product

  typedef struct packed {
    fx_t re;
    fx_t im;
  } cpx_t;

  // Sample travelling along a row of the array (u, or the auxiliary-row beta).
  typedef struct packed {
    logic valid;
    cpx_t v;
  } smp_t;

  // Rotation parameters travelling down a column: c real, s complex, both in
  // fx_t words with RW fraction bits (see below).
  typedef struct packed {
    logic valid;
    fx_t  c;
    cpx_t s;
  } rot_t;

  localparam fx_t FX_ONE  = fx_t'(1) <<< FW;
  localparam fx_t FX_ZERO = '0;

  // c and s never exceed 1 in magnitude, so they carry RW fraction bits
  // instead of FW. Near convergence 1 - c falls below 2^-FW; a c rounded to
  // 1 would stop the stored values from decaying as they should.
  localparam int  RW      = DW - 3;
  localparam fx_t ROT_ONE = fx_t'(1) <<< RW;

  // Newton-Raphson reciprocal: iterations after the seed.
  localparam int  NR_ITERS = 3;

  // CORDIC: iterations per vectoring pass
  // prod(sqrt(1+2^-2i)) for 16 iterations.
  localparam int  CORDIC_ITERS = 16;

  // Beat schedule (phase of the global counter at which a strobe is high).
  localparam int CELL_PERIOD    = 51;
  localparam int PH_START       = 0;   // cells begin; sqrt cascade starts
  localparam int PH_RECIP_LOAD  = 35;  // divisor register of the reciprocal unit
  localparam int PH_RECIP_SEED  = 36;  // seed estimate selected into the loop
  localparam int PH_RECIP_OUT   = 42;  // reciprocal output register
  localparam int PH_MUL_START   = 45;  // serial output multiplications
  localparam int PH_MUL_STEPS   = 4;
  localparam int PH_COMMIT      = CELL_PERIOD - 1;  // results released

  typedef logic [$clog2(CELL_PERIOD)-1:0] phase_t;

  typedef struct packed {
    phase_t     phase;
    logic       start;
    logic       recip_load;
    logic       recip_seed;
    logic       recip_iter;
    logic       recip_out;
    logic       mul_en;
    logic [1:0] mul_step;
    logic       commit;
  } beat_ctrl_t;

  // Saturate a wide value to the fx_t range.
  function automatic fx_t fx_sat(input fx2_t v);
    fx2_t maxv, minv;
    maxv = fx2_t'({1'b0, {(DW-1){1'b1}}});
    minv = -maxv - 1;
    if (v > maxv)      return fx_t'(maxv);
    else if (v < minv) return fx_t'(minv);
    else               return fx_t'(v);
  endfunction

  // Wide value scaled by 2^-sh (sh >= 1), rounded to nearest. Products are
  // rounded rather than truncated: truncation pulls every update the same way,
  // and with no forgetting that bias adds up over long runs.
  function automatic fx2_t fx_round_shift(input fx2_t p, input int sh);
    return (p + (fx2_t'(1) <<< (sh - 1))) >>> sh;
  endfunction

  // Fixed-point product, rounded and saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    fx2_t p;
    p = fx2_t'(a) * fx2_t'(b);
    return fx_sat(fx_round_shift(p, FW));
  endfunction

  // Data times a rotation parameter (RW fraction bits), rounded and saturated.
  function automatic fx_t fx_mul_rot(input fx_t a, input fx_t c);
    return fx_sat(fx_round_shift(fx2_t'(a) * fx2_t'(c), RW));
  endfunction

  // Product scaled by 2^-e (e may be negative), rounded and saturated. Used with the
  // mantissa/exponent output of the reciprocal unit.
  function automatic fx_t fx_mul_exp(input fx_t a, input fx_t b, input logic signed [7:0] e);
    fx2_t p;
    int   sh;
    p  = fx2_t'(a) * fx2_t'(b);
    sh = int'(FW) + int'(e);
    if (sh >= 0) begin
      if (sh > 2*DW-2) return FX_ZERO;
      if (sh == 0) return fx_sat(p);
      return fx_sat(fx_round_shift(p, sh));
    end else begin
      fx2_t big, shifted;
      big = (p < 0) ? -(fx2_t'(1) <<< (2*DW-2)) : (fx2_t'(1) <<< (2*DW-2));
      if (p == 0) return FX_ZERO;
      if (-sh >= int'(DW)) return fx_sat(big);
      shifted = p <<< (-sh);
      if ((shifted >>> (-sh)) != p) return fx_sat(big);
      return fx_sat(shifted);
    end
  endfunction

endpackage
