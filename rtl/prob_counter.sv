// prob_counter - output observation: counts the ones of the output stochastic stream
// and converts the count into a binary fixed-point value.
//
// While `en` is high each clock adds bit_i to a counter; `clr` zeroes it (priority over
// `en`). After a window of N = 2^LOG2N clocks the count divided by N estimates the
// stream's probability. The binary output undoes the stream's power-of-two scale:
//   value = floor(count * 2^shift * 2^W / N), unsigned with 3 integer and W fraction bits.
// Timing: count and value are registered/combinational-from-register; the clock that
// samples the last bit of the window makes the final count visible right after it.
// The counter-to-binary conversion follows the described output stage; the window
// length and output format are this design's.
module prob_counter
  import sc_poly_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  input  logic              bit_i,
  input  logic [1:0]        shift,
  output logic [LOG2N:0]    count,
  output logic [YW-1:0]     value
);

  localparam int unsigned WIDE = LOG2N + 1 + 3 + W;

  logic [WIDE-1:0] wide;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + (LOG2N+1)'(bit_i);
  end

  always_comb begin
    wide  = (WIDE'(count) << shift) << W;
    wide  = wide >> LOG2N;
    value = (wide > WIDE'({YW{1'b1}})) ? {YW{1'b1}} : wide[YW-1:0];
  end

endmodule
