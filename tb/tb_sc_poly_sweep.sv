// tb_sc_poly_sweep - accuracy workload: every one of the 256 input codes for each of
// the four functions, at the default 1024-clock stream length. Each result is compared
// with the four-term Taylor polynomial (pass/fail, tolerance 0.035 times the function's
// output scale) and, for information, with the exact function. Prints the mean and
// maximum absolute errors per function.
module tb_sc_poly_sweep;
  import sc_poly_pkg::*;

  localparam int unsigned LOG2N = 10;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  func_e func = FN_EXP;
  logic [W-1:0] x = '0;
  logic busy, done, x_stream, y_stream, y_stream_valid;
  logic [YW-1:0] y;
  logic [LOG2N:0] ones;

  int checks = 0, failures = 0;

  sc_poly_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1200000) @(posedge clk);
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

  function automatic real exact(func_e f, real v);
    case (f)
      FN_EXP:    return $exp(v);
      FN_EXPNEG: return $exp(-v);
      FN_SINH:   return ($exp(v) - $exp(-v)) / 2.0;
      default:   return ($exp(v) + $exp(-v)) / 2.0;
    endcase
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : main
    static string names[4] = '{"e^x", "e^-x", "sinh(x)", "cosh(x)"};
    static real scale[4] = '{4.0, 1.0, 2.0, 2.0};
    real xr, got, ep, ee, sum_p, sum_e, max_p, max_e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      sum_p = 0.0; sum_e = 0.0; max_p = 0.0; max_e = 0.0;
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        while (busy) @(negedge clk);
        func = func_e'(f); x = W'(i); start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (!done) @(negedge clk);
        xr  = real'(i) / 256.0;
        got = real'(y) / 256.0;
        ep  = absr(got - taylor(func_e'(f), xr));
        ee  = absr(got - exact(func_e'(f), xr));
        sum_p += ep; sum_e += ee;
        if (ep > max_p) max_p = ep;
        if (ee > max_e) max_e = ee;
        checks++;
        if (ep > 0.035 * scale[f]) begin
          failures++;
          $display("FAIL %s x=%0d/256: %f, polynomial %f", names[f], i, got,
                   taylor(func_e'(f), xr));
        end
      end
      $display("%-8s vs polynomial: mean %f max %f | vs exact function: mean %f max %f",
               names[f], sum_p / 256.0, max_p, sum_e / 256.0, max_e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
