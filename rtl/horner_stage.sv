// horner_stage - one stage of the stochastic Horner evaluator: an AND gate followed by
// a multiplexer.
//
// The AND gate forms p = xm & c & v_in, the product of an independent x stream (or 1
// when cfg.use_x is clear), a coefficient stream and the inner stage's stream. The
// multiplexer then completes the stage according to cfg.mode:
//   ST_PASS v_out = v_in            ST_MUL v_out = p
//   ST_ADD  v_out = h ? a : p       -> (a + x*c*v)/2 when h is a 1/2 stream
//   ST_SUB  v_out = p ? 0 : a       -> a*(1 - x*c*v)
// All inputs must come from mutually independent generators for the products to hold.
// The coefficient fields cfg.a and cfg.c are not read here: they set the generators
// that drive a_bit and c_bit. Purely combinational. AND for multiplication and a multiplexer for weighted addition
// follow the described architecture; the SUB form and the mode set are this design's.
module horner_stage
  import sc_poly_pkg::*;
(
  input  stage_cfg_t cfg,
  input  logic       v_in,
  input  logic       x_bit,
  input  logic       a_bit,
  input  logic       c_bit,
  input  logic       h_bit,
  output logic       v_out
);

  logic xm, p;

  always_comb begin
    xm = cfg.use_x ? x_bit : 1'b1;
    p  = xm & c_bit & v_in;
    unique case (cfg.mode)
      ST_PASS: v_out = v_in;
      ST_MUL:  v_out = p;
      ST_ADD:  v_out = h_bit ? a_bit : p;
      ST_SUB:  v_out = p ? 1'b0 : a_bit;
      default: v_out = v_in;
    endcase
  end

endmodule
