// tb_prob_counter - checks the ones counter and its binary conversion: random bits with
// random enables over full 1024-clock windows, each scale shift, and clear. The expected
// count is kept here; the expected value is floor(count * 2^shift * 256 / 1024),
// saturated to the 11-bit output.
module tb_prob_counter;
  import sc_poly_pkg::*;
  localparam int unsigned LOG2N = 10;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, bit_i = 1'b0;
  logic [1:0] shift = '0;
  logic [LOG2N:0] count;
  logic [YW-1:0] value;
  int checks = 0, failures = 0;

  prob_counter #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int model, expv, density;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk);
      clr = 1'b1; en = 1'b1; bit_i = 1'b1;   // clear has priority over en
      @(negedge clk);
      clr = 1'b0;
      checks++;
      if (count != 0) begin failures++; $display("FAIL clear"); end
      model = 0;
      density = (w == 15) ? 1000 : $urandom_range(0, 1000);
      for (int t = 0; t < 1024; t++) begin
        bit_i = $urandom_range(0, 999) < density;
        en = (w % 4 == 3) ? 1'($urandom) : 1'b1;
        if (en && bit_i) model++;
        @(negedge clk);
      end
      en = 1'b0;
      for (int s = 0; s < 4; s++) begin
        shift = 2'(s);
        #1;
        expv = (model * (1 << s) * 256) / 1024;
        if (expv > 2047) expv = 2047;
        checks++;
        if (count != (LOG2N+1)'(model) || value != YW'(expv)) begin
          failures++;
          $display("FAIL window %0d shift %0d: count %0d/%0d value %0d/%0d", w, s, count,
                   model, value, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
