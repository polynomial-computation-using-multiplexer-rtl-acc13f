// tb_sc_poly_top - end-to-end test of the stochastic polynomial evaluator at its default
// parameters (N = 1024-clock observation window).
//
// For each of the four functions it sweeps x over [0,1), runs one operation per point
// and compares the binary result with the four-term Taylor polynomial of the function
// (computed here in real arithmetic), within a tolerance that covers the stochastic
// error of a 1024-bit stream. It also checks the start-to-done latency (N+1 clocks),
// that a start while busy is ignored, that the input and output streams
// carry x and the counted ones, that a repeated operation gives the same result
// (generators reseeded), and that each stage mode and each function was exercised.
module tb_sc_poly_top;
  import sc_poly_pkg::*;

  localparam int unsigned LOG2N = 10;
  localparam int unsigned N = 1 << LOG2N;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  func_e func = FN_EXP;
  logic [W-1:0] x = '0;
  logic busy, done, x_stream, y_stream, y_stream_valid;
  logic [YW-1:0] y;
  logic [LOG2N:0] ones;

  int checks = 0, failures = 0;
  int n_func[4];
  int n_mode[4];
  int n_ignored_start = 0;
  real max_err[4];
  int x_ones, y_ones;

  sc_poly_top dut (.*);

  always #5 clk = ~clk;

  // The streams are stable at the falling edge; each such edge during the run precedes
  // the rising edge at which the counter takes that bit.
  always @(negedge clk) begin
    if (y_stream_valid) begin
      x_ones += int'(x_stream);
      y_ones += int'(y_stream);
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  function automatic real scale_of(func_e f);
    case (f)
      FN_EXP:    return 4.0;
      FN_EXPNEG: return 1.0;
      default:   return 2.0;
    endcase
  endfunction

  task automatic run_op(input func_e f, input logic [W-1:0] xv, output int lat,
                        output logic [YW-1:0] yr);
    @(negedge clk);
    while (busy) @(negedge clk);
    func = f; x = xv; start = 1'b1;
    x_ones = 0; y_ones = 0;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    func = func_e'(~f); x = ~xv;   // inputs are only sampled with start
    do begin
      @(posedge clk); lat++;
      #1;
      if (y_stream_valid) begin
        for (int k = 0; k < NSTAGES; k++) n_mode[dut.cfg_q[k].mode]++;
      end
      if (busy && !done && lat == 3) begin
        // a start pulse during the run must be ignored
        start = 1'b1;
        @(posedge clk); lat++; #1;
        start = 1'b0;
        n_ignored_start++;
      end
    end while (!done);
    yr = y;
  endtask

  initial begin : main
    int lat;
    logic [YW-1:0] yr, yr2;
    real xr, exp_v, got, err, tol;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      max_err[f] = 0.0;
      for (int i = 0; i < 17; i++) begin
        logic [W-1:0] xv;
        xv = (i == 16) ? W'($urandom_range(0, 255)) : W'(i * 16 + (i == 15 ? 15 : 0));
        run_op(func_e'(f), xv, lat, yr);
        n_func[f]++;
        xr = real'(xv) / 256.0;
        exp_v = taylor(func_e'(f), xr);
        got = real'(yr) / 256.0;
        err = got - exp_v; if (err < 0) err = -err;
        if (err > max_err[f]) max_err[f] = err;
        tol = 0.035 * scale_of(func_e'(f));
        checks++;
        if (err > tol) begin
          failures++;
          $display("FAIL f=%0d x=%0d got=%f exp=%f", f, xv, got, exp_v);
        end
        checks++;
        if (lat != N + 1) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", lat, N + 1);
        end
        checks++;
        if (int'(ones) != y_ones) begin
          failures++; $display("FAIL ones %0d, output stream held %0d", ones, y_ones);
        end
        // the observed input stream carries x
        checks++;
        err = real'(x_ones) / real'(N) - xr; if (err < 0) err = -err;
        if (err > 0.04) begin
          failures++; $display("FAIL x stream %0d ones for x=%0d", x_ones, xv);
        end
      end
    end
    // repeatability: same operation twice gives the same result
    run_op(FN_EXPNEG, 8'd100, lat, yr);
    run_op(FN_EXPNEG, 8'd100, lat, yr2);
    checks++;
    if (yr != yr2) begin failures++; $display("FAIL repeat %0d %0d", yr, yr2); end
    // results are held after done until the next start
    repeat (5) @(posedge clk);
    checks++;
    if (y != yr2 || busy) begin failures++; $display("FAIL hold"); end

    for (int f = 0; f < 4; f++) begin
      $display("function %0d: %0d operations, max abs error %f", f, n_func[f], max_err[f]);
      checks++; if (n_func[f] == 0) failures++;
    end
    for (int m = 0; m < 4; m++) begin
      $display("stage mode %0d used in %0d stage-cycles", m, n_mode[m]);
      checks++; if (n_mode[m] == 0) failures++;
    end
    $display("start ignored while busy: %0d", n_ignored_start);
    checks++; if (n_ignored_start == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
