// coef_rom - function selection and polynomial coefficient table.
//
// Given the selected function it returns the configuration of every Horner stage (mode,
// whether the stage multiplies by x, and the coefficients a and c) and the power-of-two
// scale by which the output stream underestimates the function. Combinational; the
// controller registers its output when an operation starts ("load coefficients").
//
// The functions and their four-term Taylor polynomials are the described ones; their
// factoring into stages that keep every stream inside [0,1] is this design's own:
//   e^x/4   : s0=(1+x/3)/2,  s1=(1+x*s0)/2,  s2=(1/2+x*s1)/2
//   e^-x    : s0=1-x/3,      s1=1-(x/2)*s0,  s2=1-x*s1
//   sinh/2  : s0=x/6, s1=x*s0, s2=(1+s1)/2, s3=x*s2
//   cosh/2  : s0=x/12, s1=x*s0, s2=(1+s1)/2, s3=x*s2, s4=(1+x*s3)/2
// Unused outer stages pass their input through.
module coef_rom
  import sc_poly_pkg::*;
(
  input  func_e        func,
  output core_cfg_t    cfg,
  output logic [1:0]   scale_shift
);

  function automatic stage_cfg_t st(stage_mode_e m, logic ux, logic [CW-1:0] a,
                                    logic [CW-1:0] c);
    stage_cfg_t s;
    s.mode  = m;
    s.use_x = ux;
    s.a     = a;
    s.c     = c;
    return s;
  endfunction

  localparam stage_cfg_t PASS = '{mode: ST_PASS, use_x: 1'b0, a: '0, c: '0};

  always_comb begin
    cfg         = {NSTAGES{PASS}};
    scale_shift = 2'd0;
    unique case (func)
      FN_EXP: begin
        cfg[0] = st(ST_ADD, 1'b1, K_ONE,  K_THIRD);
        cfg[1] = st(ST_ADD, 1'b1, K_ONE,  K_ONE);
        cfg[2] = st(ST_ADD, 1'b1, K_HALF, K_ONE);
        scale_shift = 2'd2;
      end
      FN_EXPNEG: begin
        cfg[0] = st(ST_SUB, 1'b1, K_ONE, K_THIRD);
        cfg[1] = st(ST_SUB, 1'b1, K_ONE, K_HALF);
        cfg[2] = st(ST_SUB, 1'b1, K_ONE, K_ONE);
        scale_shift = 2'd0;
      end
      FN_SINH: begin
        cfg[0] = st(ST_MUL, 1'b1, K_ZERO, K_SIXTH);
        cfg[1] = st(ST_MUL, 1'b1, K_ZERO, K_ONE);
        cfg[2] = st(ST_ADD, 1'b0, K_ONE,  K_ONE);
        cfg[3] = st(ST_MUL, 1'b1, K_ZERO, K_ONE);
        scale_shift = 2'd1;
      end
      FN_COSH: begin
        cfg[0] = st(ST_MUL, 1'b1, K_ZERO, K_TWELFTH);
        cfg[1] = st(ST_MUL, 1'b1, K_ZERO, K_ONE);
        cfg[2] = st(ST_ADD, 1'b0, K_ONE,  K_ONE);
        cfg[3] = st(ST_MUL, 1'b1, K_ZERO, K_ONE);
        cfg[4] = st(ST_ADD, 1'b1, K_ONE,  K_ONE);
        scale_shift = 2'd1;
      end
      default: ;
    endcase
  end

endmodule
