// sng - stochastic number generator: the binary-to-stochastic converter built from an
// LFSR and a comparator.
//
// Every clock the top W bits of the LFSR state form a random number r in [0, 2^W). The
// output bit is 1 when r < value, so the probability of a 1 is value / 2^W. `value` has
// W+1 bits: the code 2^W gives an all-ones stream (exactly 1.0), 0 an all-zeros stream.
// Over one full LFSR period the stream holds exactly value*2^(LFSR_W-W) ones, minus one
// when value > 0 (the all-zero state is never visited).
// The low LFSR_W-W state bits are not compared; they only lengthen the period.
// Timing: `bit_o` is combinational from the LFSR register and `value`; the LFSR
// advances on clocks where `en` is high and reloads its seed on `load`.
// The LFSR-plus-comparator structure follows the described converter; widths and the
// choice of the top LFSR bits are this design's own.
module sng
  import sc_poly_pkg::*;
#(
  parameter logic [LFSR_W-1:0] SEED = 16'hACE1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           en,
  input  logic [CW-1:0]  value,
  output logic           bit_o
);

  logic [LFSR_W-1:0] state;

  lfsr #(.WIDTH(LFSR_W), .TAPS(LFSR_TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load, .en, .state
  );

  always_comb bit_o = {1'b0, state[LFSR_W-1 -: W]} < value;

endmodule
