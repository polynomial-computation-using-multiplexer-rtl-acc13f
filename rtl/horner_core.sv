// horner_core - the polynomial evaluation core: NSTAGES Horner stages in cascade.
//
// Stage 0, the innermost, starts from a constant 1 stream; each later stage takes the
// stream of the stage before it, and the last stage drives y_bit, the output stochastic
// bit stream. Every stage has its own x, a, c and h input streams (bit k of each
// vector), which the caller must draw from independent generators. The configuration
// selects the function (see coef_rom). Purely combinational: y_bit follows the input
// bits in the same clock.
// The cascade of AND/multiplexer stages evaluating the nested Horner form follows the
// described architecture; the number of stages (enough for the longest function) is
// this design's choice.
module horner_core
  import sc_poly_pkg::*;
(
  input  core_cfg_t            cfg,
  input  logic [NSTAGES-1:0]   x_bits,
  input  logic [NSTAGES-1:0]   a_bits,
  input  logic [NSTAGES-1:0]   c_bits,
  input  logic [NSTAGES-1:0]   h_bits,
  output logic                 y_bit
);

  logic [NSTAGES:0] v;

  assign v[0] = 1'b1;

  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    horner_stage u_stage (
      .cfg   (cfg[k]),
      .v_in  (v[k]),
      .x_bit (x_bits[k]),
      .a_bit (a_bits[k]),
      .c_bit (c_bits[k]),
      .h_bit (h_bits[k]),
      .v_out (v[k+1])
    );
  end

  assign y_bit = v[NSTAGES];

endmodule
