// prng_gen_ctrl: sequencer of the generation phase.
//
// On start it latches the seed and the count n (limited to MAX_N) and then,
// on each following clock, hands the lane bank the seed of the next group of
// LANES outputs, seed + base * SEED_STRIDE, and enables the array writes of
// the lanes whose index base + i is below n. The group seed is kept in a
// register and advanced by LANES * SEED_STRIDE per clock, so no multiplier is
// needed. After the last group it raises done, which stays high until the
// next start.
//
// Interface: start (one-clock command, ignored while active), seed, n in;
// group_seed, base, lane_we[LANES], active, done and the limited count n_eff
// out.
// Timing: a start sampled at clock edge 0 fills groups at edges 1..G, with
// G = ceil(n / LANES); done is high after edge G. For n = 0, done is high
// after edge 0. Reset is synchronous and active high.
// Fifteen outputs per clock and the resulting ceil(n/15)-clock generation
// time follow the original design; the count limit, the n = 0 case and the
// reset behaviour are this design's choices.
module prng_gen_ctrl #(
  parameter int unsigned LANES       = prng_pkg::LANES,
  parameter int unsigned MAX_N       = prng_pkg::MAX_N,
  parameter logic [31:0] SEED_STRIDE = prng_pkg::SEED_STRIDE,
  localparam int unsigned CNT_W      = $clog2(MAX_N + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  prng_pkg::word_t      seed,
  input  logic [31:0]          n,
  output prng_pkg::word_t      group_seed,
  output logic [CNT_W-1:0]     base,
  output logic [LANES-1:0]     lane_we,
  output logic                 active,
  output logic                 done,
  output logic [CNT_W-1:0]     n_eff
);

  localparam logic [31:0] GROUP_STRIDE = 32'(LANES) * SEED_STRIDE;

  logic [CNT_W-1:0] n_lim;
  logic [CNT_W:0]   next_base;

  assign n_lim     = (n > 32'(MAX_N)) ? CNT_W'(MAX_N) : CNT_W'(n);
  assign next_base = {1'b0, base} + (CNT_W+1)'(LANES);

  always_ff @(posedge clk) begin
    if (rst) begin
      active     <= 1'b0;
      done       <= 1'b0;
      base       <= '0;
      n_eff      <= '0;
      group_seed <= '0;
    end else if (start && !active) begin
      active     <= (n_lim != '0);
      done       <= (n_lim == '0);
      base       <= '0;
      n_eff      <= n_lim;
      group_seed <= seed;
    end else if (active) begin
      group_seed <= group_seed + GROUP_STRIDE;
      if (next_base >= {1'b0, n_eff}) begin
        active <= 1'b0;
        done   <= 1'b1;
      end else begin
        base <= next_base[CNT_W-1:0];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++)
      lane_we[i] = active && (({1'b0, base} + (CNT_W+1)'(i)) < {1'b0, n_eff});
  end

endmodule
