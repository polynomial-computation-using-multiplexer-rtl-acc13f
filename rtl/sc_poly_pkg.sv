// sc_poly_pkg - shared types and constants of the stochastic polynomial evaluator.
//
// Numbers are unipolar stochastic: a bit stream whose probability of a 1 is the value,
// so every value lies in [0,1]. Binary operands are unsigned fractions of W bits
// (value = code / 2^W). Coefficients carry one extra bit (CW = W+1) so that the code
// 2^W means exactly 1: its stream is all ones.
//
// A Horner stage is configured by a stage_cfg_t. With p = xm & c & v_in, where xm is an
// independent copy of the x stream (or constant 1 when use_x is clear), c a coefficient
// stream and v_in the stream from the inner stage, the four modes compute
//   ST_PASS : v_out = v_in
//   ST_MUL  : v_out = p                        (x * c * v)
//   ST_ADD  : v_out = h ? a : p                ((a + x*c*v) / 2, h a 1/2 stream)
//   ST_SUB  : v_out = p ? 0 : a                (a * (1 - x*c*v))
// The ADD and SUB forms are this design's way of keeping every intermediate value of
// a polynomial with mixed-sign or larger-than-one coefficients inside [0,1] using only
// AND gates and multiplexers. Results larger than one are produced scaled down by a
// power of two (scale_shift), which the output counter undoes.
package sc_poly_pkg;

  // Width of binary inputs and of the random numbers compared against them.
  localparam int unsigned W = 8;
  // Coefficient width: one more bit so that 1.0 is representable.
  localparam int unsigned CW = W + 1;
  // Width of each pseudo-random generator.
  localparam int unsigned LFSR_W = 16;
  // Galois feedback mask of a maximal-length 16-bit LFSR (x^16+x^14+x^13+x^11+1).
  localparam logic [LFSR_W-1:0] LFSR_TAPS = 16'hB400;
  // Number of Horner stages in the core (the longest function, cosh, needs five).
  localparam int unsigned NSTAGES = 5;
  // Width of the binary result: unsigned fixed point with 3 integer and W fraction bits.
  localparam int unsigned YW = W + 3;

  // Coefficient codes used by the table (value = code / 2^W).
  localparam logic [CW-1:0] K_ONE     = CW'(1 << W);  // 1
  localparam logic [CW-1:0] K_HALF    = CW'(1 << (W-1)); // 1/2
  localparam logic [CW-1:0] K_THIRD   = CW'(((1 << W) + 1) / 3);  // 1/3  -> 85/256
  localparam logic [CW-1:0] K_SIXTH   = CW'(((1 << W) + 3) / 6);  // 1/6  -> 43/256
  localparam logic [CW-1:0] K_TWELFTH = CW'(((1 << W) + 6) / 12); // 1/12 -> 21/256
  localparam logic [CW-1:0] K_ZERO    = '0;

  typedef enum logic [1:0] {
    FN_EXP    = 2'd0,  // e^x      = 1 + x + x^2/2 + x^3/6
    FN_EXPNEG = 2'd1,  // e^-x     = 1 - x + x^2/2 - x^3/6
    FN_SINH   = 2'd2,  // sinh(x)  = x + x^3/6
    FN_COSH   = 2'd3   // cosh(x)  = 1 + x^2/2 + x^4/24
  } func_e;

  typedef enum logic [1:0] {
    ST_PASS = 2'd0,
    ST_MUL  = 2'd1,
    ST_ADD  = 2'd2,
    ST_SUB  = 2'd3
  } stage_mode_e;

  typedef struct packed {
    stage_mode_e     mode;
    logic            use_x;
    logic [CW-1:0]   a;     // additive coefficient (ADD, SUB)
    logic [CW-1:0]   c;     // multiplicative coefficient (MUL, ADD, SUB)
  } stage_cfg_t;

  // Stage 0 is the innermost Horner stage; stage NSTAGES-1 drives the output stream.
  typedef stage_cfg_t [NSTAGES-1:0] core_cfg_t;

  // Seed of the k-th stochastic number generator: an odd multiplicative hash, never zero.
  function automatic logic [LFSR_W-1:0] sng_seed(input int unsigned k);
    logic [31:0] h;
    h = (k + 32'd1) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    if (h[LFSR_W-1:0] == '0) return LFSR_W'(1);
    return h[LFSR_W-1:0];
  endfunction

endpackage
