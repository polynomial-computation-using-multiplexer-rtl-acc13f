// sc_poly_top - multiplexer-based stochastic evaluator of e^x, e^-x, sinh(x) and cosh(x)
// for x in [0,1).
//
// Flow of one operation: the binary input x and the function selection are latched;
// the selected function's stage configuration and coefficients are loaded; a bank of
// LFSR-plus-comparator generators turns x and the coefficients into independent
// stochastic streams; the Horner core of AND gates and multiplexers combines them into
// one output stream; a counter observes that stream for N = 2^LOG2N clocks and turns
// the count of ones into a binary result.
//
// Generators: each of the NSTAGES Horner stages gets four of its own, for x, for
// coefficients a and c, and for the 1/2 select stream of its multiplexer, 4*NSTAGES in
// all, each with a different seed. All are reseeded at the start of every operation, so
// an operation's result depends only on x and the function.
//
// Interface: pulse `start` for one clock while idle, with `func` and `x` (x = code/2^W)
// valid; `start` while busy is ignored. `busy` is high from the clock after start until
// `done`, a one-clock pulse. `y` (3 integer, W fraction bits) and `ones` hold the result
// from `done` until the next start. `y_stream`/`y_stream_valid` expose the output
// stochastic bit stream while it is being counted, and `x_stream` one of the input
// streams (the x copy of stage 0) for observation alongside it.
// Timing: done is high after the (2^LOG2N + 1)-th clock edge following the edge that
// samples start: that edge latches, the next loads coefficients and reseeds, and the N
// edges after it each count one bit of the output stream.
// The flow follows the described system; the handshake, the window length, the number
// of generators and the reseeding are this design's own choices.
module sc_poly_top
  import sc_poly_pkg::*;
#(
  parameter int unsigned LOG2N = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  func_e             func,
  input  logic [W-1:0]      x,
  output logic              busy,
  output logic              done,
  output logic [YW-1:0]     y,
  output logic [LOG2N:0]    ones,
  output logic              x_stream,
  output logic              y_stream,
  output logic              y_stream_valid
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_DONE} state_e;

  state_e            state;
  logic [W-1:0]      x_q;
  func_e             func_q;
  core_cfg_t         cfg_q, cfg_rom;
  logic [1:0]        shift_q, shift_rom;
  logic [LOG2N-1:0]  cyc;

  logic load, run;

  logic [NSTAGES-1:0] x_bits, a_bits, c_bits, h_bits;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      x_q     <= '0;
      func_q  <= FN_EXP;
      cfg_q   <= '0;
      shift_q <= '0;
      cyc     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x_q    <= x;
          func_q <= func;
          state  <= S_LOAD;
        end
        S_LOAD: begin
          cfg_q   <= cfg_rom;
          shift_q <= shift_rom;
          cyc     <= '0;
          state   <= S_RUN;
        end
        S_RUN: begin
          cyc <= cyc + 1'b1;
          if (cyc == '1) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load           = (state == S_LOAD);
  assign run            = (state == S_RUN);
  assign busy           = (state != S_IDLE);
  assign done           = (state == S_DONE);
  assign y_stream_valid = run;
  assign x_stream       = x_bits[0];

  // ---------------- function selection / coefficients ----------------
  coef_rom u_rom (.func(func_q), .cfg(cfg_rom), .scale_shift(shift_rom));

  // ---------------- binary-to-stochastic converters ----------------
  for (genvar k = 0; k < NSTAGES; k++) begin : g_sng
    sng #(.SEED(sng_seed(4*k + 0))) u_x (
      .clk, .rst_n, .load, .en(run), .value({1'b0, x_q}), .bit_o(x_bits[k])
    );
    sng #(.SEED(sng_seed(4*k + 1))) u_a (
      .clk, .rst_n, .load, .en(run), .value(cfg_q[k].a), .bit_o(a_bits[k])
    );
    sng #(.SEED(sng_seed(4*k + 2))) u_c (
      .clk, .rst_n, .load, .en(run), .value(cfg_q[k].c), .bit_o(c_bits[k])
    );
    sng #(.SEED(sng_seed(4*k + 3))) u_h (
      .clk, .rst_n, .load, .en(run), .value(K_HALF), .bit_o(h_bits[k])
    );
  end

  // ---------------- polynomial evaluation core ----------------
  horner_core u_core (
    .cfg(cfg_q), .x_bits, .a_bits, .c_bits, .h_bits, .y_bit(y_stream)
  );

  // ---------------- output observation ----------------
  prob_counter #(.LOG2N(LOG2N)) u_cnt (
    .clk, .rst_n, .clr(load), .en(run), .bit_i(y_stream), .shift(shift_q),
    .count(ones), .value(y)
  );

  // Handshake rules.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_busy_done:  assert property (@(posedge clk) disable iff (!rst_n) done |-> busy);

endmodule
