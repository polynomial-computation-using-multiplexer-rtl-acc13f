// tb_sng - checks the LFSR-plus-comparator stochastic number generator. Over one full
// LFSR period (65535 clocks) the number of ones must be exactly value*256, less one for
// value > 0 (the all-zero LFSR state is never visited), for codes 0 (all zeros) through
// 256 (all ones). Also checks that the bit holds while `en` is low.
module tb_sng;
  import sc_poly_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [CW-1:0] value = '0;
  logic bit_o;
  int checks = 0, failures = 0;

  sng #(.SEED(16'h5A5A)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    static int vals[8] = '{0, 1, 43, 85, 128, 200, 255, 256};
    int ones, expv;
    logic b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (vals[i]) begin
      @(negedge clk);
      value = CW'(vals[i]);
      load = 1'b1; @(negedge clk); load = 1'b0;
      en = 1'b1;
      ones = 0;
      for (int t = 0; t < 65535; t++) begin
        @(negedge clk);
        ones += int'(bit_o);
      end
      en = 1'b0;
      expv = vals[i] * 256 - (vals[i] > 0 ? 1 : 0);
      checks++;
      if (ones != expv) begin
        failures++;
        $display("FAIL value %0d: %0d ones, expected %0d", vals[i], ones, expv);
      end
    end
    // hold while disabled
    value = CW'(128);
    b0 = bit_o;
    repeat (10) begin
      @(negedge clk);
      checks++;
      if (bit_o != b0) begin failures++; $display("FAIL bit changed while en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
