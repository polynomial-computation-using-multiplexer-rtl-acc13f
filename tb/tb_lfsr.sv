// tb_lfsr - checks the 16-bit Galois LFSR: it must visit every one of the 65535
// non-zero states exactly once per period and return to its seed after exactly 65535
// steps (maximal length), hold its state while `en` is low, and reload the seed on
// `load` and on reset.
module tb_lfsr;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [15:0] state;
  int checks = 0, failures = 0;
  bit seen [65536];

  lfsr #(.WIDTH(16), .TAPS(16'hB400), .SEED(16'h1234)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : main
    int steps, dup;
    @(posedge clk); #1;
    chk(state == 16'h1234, "reset loads seed");
    rst_n = 1'b1;
    repeat (3) @(posedge clk); #1;
    chk(state == 16'h1234, "hold while en low");
    en = 1'b1;
    steps = 0; dup = 0;
    seen[16'h1234] = 1'b1;
    do begin
      @(posedge clk); #1;
      steps++;
      if (state != 16'h1234) begin
        if (seen[state]) dup++;
        seen[state] = 1'b1;
      end
      if (state == 16'h0000) dup++;
    end while (state != 16'h1234 && steps < 70000);
    chk(steps == 65535, $sformatf("period %0d", steps));
    chk(dup == 0, "no repeated state within a period");
    // a single step from a known state: shift right, XOR taps when bit 0 was set
    en = 1'b0;
    load = 1'b1; @(posedge clk); #1; load = 1'b0;
    chk(state == 16'h1234, "load reloads seed");
    en = 1'b1; @(posedge clk); #1;
    chk(state == 16'h091A, "step from even state is a plain shift");
    @(posedge clk); #1;   // 0x091A -> 0x048D
    @(posedge clk); #1;   // 0x048D is odd -> 0x0246 ^ 0xB400 = 0xB646
    chk(state == 16'hB646, "step from odd state applies taps");
    en = 1'b0; load = 1'b1; @(posedge clk); #1;
    chk(state == 16'h1234, "load wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
