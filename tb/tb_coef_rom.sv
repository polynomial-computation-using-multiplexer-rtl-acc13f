// tb_coef_rom - checks the coefficient table by evaluating, in real arithmetic, the
// value each stage configuration stands for (MUL: x*c*v, ADD: (a + x*c*v)/2,
// SUB: a*(1 - x*c*v), PASS: v), scaling the result by 2^scale_shift, and comparing it
// with the four-term Taylor polynomial of the selected function for x across [0,1).
// The tolerance (0.004) covers the rounding of 1/3, 1/6 and 1/12 to 8-bit codes.
module tb_coef_rom;
  import sc_poly_pkg::*;
  func_e func;
  core_cfg_t cfg;
  logic [1:0] scale_shift;
  int checks = 0, failures = 0;

  coef_rom dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real taylor(func_e f, real v);
    case (f)
      FN_EXP:    return 1.0 + v + v*v/2.0 + v*v*v/6.0;
      FN_EXPNEG: return 1.0 - v + v*v/2.0 - v*v*v/6.0;
      FN_SINH:   return v + v*v*v/6.0;
      default:   return 1.0 + v*v/2.0 + v*v*v*v/24.0;
    endcase
  endfunction

  function automatic real eval_cfg(core_cfg_t c, real xv);
    real v, p, a, k;
    v = 1.0;
    for (int s = 0; s < NSTAGES; s++) begin
      a = real'(c[s].a) / 256.0;
      k = real'(c[s].c) / 256.0;
      p = (c[s].use_x ? xv : 1.0) * k * v;
      case (c[s].mode)
        ST_MUL:  v = p;
        ST_ADD:  v = (a + p) / 2.0;
        ST_SUB:  v = a * (1.0 - p);
        default: ;
      endcase
      if (v < 0.0 || v > 1.0) return -100.0;  // a stream value must be a probability
    end
    return v;
  endfunction

  initial begin : main
    real xv, got, expv;
    static int expected_shift[4] = '{2, 0, 1, 1};
    for (int f = 0; f < 4; f++) begin
      func = func_e'(f);
      #1;
      checks++;
      if (scale_shift != 2'(expected_shift[f])) begin
        failures++; $display("FAIL function %0d scale shift %0d", f, scale_shift);
      end
      for (int i = 0; i <= 16; i++) begin
        xv = real'(i) / 16.0;
        got = eval_cfg(cfg, xv) * real'(1 << scale_shift);
        expv = taylor(func, xv);
        checks++;
        if (got - expv > 0.004 || expv - got > 0.004) begin
          failures++;
          $display("FAIL function %0d x=%f: table gives %f, polynomial %f", f, xv, got, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
