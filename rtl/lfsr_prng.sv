// lfsr_prng: pseudo random number generator for new trial weights.
//
// A Fibonacci linear feedback shift register of N cells s[0..N-1]. On each
// enabled clock the cells shift one place towards s[0] (the serial output)
// and the leftmost cell s[N-1] receives the feedback f = XOR of c[i]&s[i],
// the linear recursion s(k+N) = sum c(i) s(k+i) mod 2. The register starts
// from the initialisation vector SEED at reset and can be reloaded through
// load/seed. The random weight is the low 8 bits s[7:0].
//
// Original design: the shift direction, serial output at s0, feedback
// into the leftmost cell, initialisation vector and tap coefficients. This
// design's own choices: N = 16 and the tap set c0, c11, c13, c14, which is
// the primitive polynomial x^16 + x^14 + x^13 + x^11 + 1 and gives the
// maximal period 2^16 - 1, and the seed value.
//
// Interface: en advances one step per clock; load (priority) loads seed.
// Outputs are registers: state, bit_out = s[0], rnd = s[7:0].
module lfsr_prng #(
  parameter int unsigned N     = 16,
  parameter logic [N-1:0] TAPS = 16'h6801,   // c[i] = TAPS[i]
  parameter logic [N-1:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] state,
  output logic         bit_out,
  output logic [7:0]   rnd
);

  logic feedback;

  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= SEED;
    else if (load)
      state <= seed;
    else if (en)
      state <= {feedback, state[N-1:1]};
  end

  assign bit_out = state[0];
  assign rnd     = state[7:0];

  // An all-zero register would lock up.
  a_nonzero : assert property (@(posedge clk) disable iff (!rst_n)
    state != '0);

endmodule
