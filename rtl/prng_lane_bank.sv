// prng_lane_bank: LANES LFSR steps side by side, each on its own seed.
//
// Lane i takes the seed group_seed + i * SEED_STRIDE (modulo 2^32) and applies
// one Galois LFSR step to it. When group_seed is seed + base * SEED_STRIDE,
// lane i therefore produces output number base + i of a run, the same value
// a sequential generator gives for index base + i. The per-lane offsets
// i * SEED_STRIDE are constants, so each lane costs one 32-bit adder and the
// XOR gates of one step.
//
// Interface: group_seed in, rnd[0..LANES-1] out.
// Timing: combinational.
// The lane count (15) and the stride (314159265, the first nine digits of
// pi) follow the original design; computing the lane seeds from constant
// offsets rather than with multipliers is this design's choice.
module prng_lane_bank #(
  parameter int unsigned LANES       = prng_pkg::LANES,
  parameter logic [31:0] SEED_STRIDE = prng_pkg::SEED_STRIDE,
  parameter logic [31:0] TAPS        = prng_pkg::TAP_MASK
) (
  input  prng_pkg::word_t group_seed,
  output prng_pkg::word_t rnd [LANES]
);

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    prng_pkg::word_t lane_seed;
    assign lane_seed = group_seed + 32'(i) * SEED_STRIDE;

    galois_lfsr_step #(.WIDTH(32), .TAPS(TAPS)) u_step (
      .state_i (lane_seed),
      .state_o (rnd[i])
    );
  end

endmodule
