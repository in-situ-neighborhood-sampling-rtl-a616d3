// lane_rng: uniform pseudo-random word source for one sampling lane.
//
// A 32-bit xorshift generator (shifts 13, 17, 5; period 2^32-1). `load`
// seeds it with `seed` (a zero seed is replaced by a fixed non-zero
// constant, since zero is the generator's fixed point); `step` advances it
// by one state. `value` is the current state and changes on the clock edge
// after `step`. The design only calls for a uniform sample; the choice of
// generator and its seeding is this design's own.
module lane_rng
  import sampler_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t seed,
  input  logic  step,
  output word_t value
);

  localparam word_t NONZERO_SEED = 32'h2545_F491;

  word_t state;

  function automatic word_t xorshift32(word_t s);
    word_t x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= NONZERO_SEED;
    else if (load)
      state <= (seed == '0) ? NONZERO_SEED : seed;
    else if (step)
      state <= xorshift32(state);
  end

  assign value = state;

endmodule
