// lfsr - Galois linear feedback shift register, the pseudo-random source of one
// stochastic number generator.
//
// Each enabled clock the register shifts right by one and, when the bit shifted out is
// a 1, XORs the feedback mask TAPS into the state. With the default mask the sequence is
// maximal: it visits all 2^16-1 non-zero states before repeating. `load` writes SEED
// (it has priority over `en`); reset also writes SEED. A zero seed would lock the
// register, so SEED must be non-zero.
// Timing: `state` is a register output; a new value appears the clock after `en`.
// That random numbers come from an LFSR follows the described converter; the width,
// feedback polynomial and Galois form are this design's choice.
module lfsr #(
  parameter int unsigned         WIDTH = 16,
  parameter logic [WIDTH-1:0]    TAPS  = 16'hB400,
  parameter logic [WIDTH-1:0]    SEED  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic [WIDTH-1:0] next;

  always_comb begin
    next = state >> 1;
    if (state[0]) next = next ^ TAPS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= next;
  end

endmodule
