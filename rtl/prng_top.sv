// prng_top: parallel LFSR random number generator with block RAM interface.
//
// Given a 32-bit seed, a count n and a block RAM start address, the
// generator produces n pseudo-random 32-bit numbers. Number k is one Galois
// LFSR step (polynomial x^32 + x^22 + x^2 + x + 1) applied to the seed
// seed + k * 314159265, which lets LANES = 15 numbers be computed in the same
// clock. The numbers are collected in an internal array, copied into an
// external true dual-port block RAM at startAddr .. startAddr + n - 1 through
// both of its ports at once, and can then be read back through the same two
// ports, each word shown next to its copy in the internal array.
//
// Interface: activate starts a run when busy is low (seed, n and startAddr
// are sampled with it); busy stays high until the last block RAM write;
// prngDone goes high when all numbers are in the array and also enables the
// block RAM ports; readReady marks the read-back phase, in which each clock
// with readRqst set reads one pair; readValid ({B, A}) flags readA/readB and
// checkA/checkB one clock later. The clkX/enX/weX/addrX/dinX/doutX ports
// connect a block RAM with one clock of read latency.
// Timing: for a run started at clock edge 0, prngDone rises after edge
// ceil(n/15) and busy falls after edge ceil(n/15) + 1 + ceil(n/2); the seed
// has no effect on timing. n above MAX_N is limited to MAX_N.
// The port list follows the original block diagram, with activate,
// readReady and readValid added by this design; the address width is 14 bits
// so that all 16000 words of the 64 kB block RAM can be addressed.
module prng_top #(
  parameter int unsigned LANES  = prng_pkg::LANES,
  parameter int unsigned MAX_N  = prng_pkg::MAX_N,
  parameter int unsigned ADDR_W = prng_pkg::ADDR_W,
  localparam int unsigned CNT_W = $clog2(MAX_N + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  prng_pkg::word_t   seed,
  input  logic [31:0]       n,
  input  logic [ADDR_W-1:0] startAddr,
  input  logic              activate,
  input  logic              readRqst,
  output logic              busy,
  output logic              prngDone,
  output logic              readReady,
  output logic [1:0]        readValid,
  output prng_pkg::word_t   checkA,
  output prng_pkg::word_t   checkB,
  output prng_pkg::word_t   readA,
  output prng_pkg::word_t   readB,
  // block RAM port A
  output logic              clkA,
  output logic              enA,
  output logic              weA,
  output logic [ADDR_W-1:0] addrA,
  output prng_pkg::word_t   dinA,
  input  prng_pkg::word_t   doutA,
  // block RAM port B
  output logic              clkB,
  output logic              enB,
  output logic              weB,
  output logic [ADDR_W-1:0] addrB,
  output prng_pkg::word_t   dinB,
  input  prng_pkg::word_t   doutB
);

  logic             start;
  logic             gen_active, gen_done, wr_busy;
  prng_pkg::word_t  group_seed;
  logic [CNT_W-1:0] base, n_eff, idx_a, idx_b;
  logic [LANES-1:0] lane_we;
  prng_pkg::word_t  rnd [LANES];
  prng_pkg::word_t  rd_a, rd_b;

  assign busy  = gen_active || wr_busy;
  assign start = activate && !busy;

  prng_gen_ctrl #(.LANES(LANES), .MAX_N(MAX_N)) u_gen (
    .clk, .rst, .start, .seed, .n,
    .group_seed, .base, .lane_we,
    .active (gen_active),
    .done   (gen_done),
    .n_eff
  );

  prng_lane_bank #(.LANES(LANES)) u_lanes (
    .group_seed,
    .rnd
  );

  rng_buffer #(.DEPTH(MAX_N), .LANES(LANES)) u_buf (
    .clk, .base,
    .we    (lane_we),
    .wdata (rnd),
    .idx_a, .idx_b,
    .rd_a, .rd_b
  );

  bram_port_ctrl #(.ADDR_W(ADDR_W), .MAX_N(MAX_N)) u_bram_ctrl (
    .clk, .rst, .start,
    .start_addr (startAddr),
    .gen_done,
    .n_eff,
    .read_rqst  (readRqst),
    .rd_a, .rd_b,
    .idx_a, .idx_b,
    .we_a       (weA),
    .we_b       (weB),
    .addr_a     (addrA),
    .addr_b     (addrB),
    .busy       (wr_busy),
    .read_ready (readReady),
    .read_valid (readValid),
    .check_a    (checkA),
    .check_b    (checkB)
  );

  assign prngDone = gen_done;
  assign clkA     = clk;
  assign clkB     = clk;
  assign enA      = gen_done;
  assign enB      = gen_done;
  assign dinA     = rd_a;
  assign dinB     = rd_b;
  assign readA    = doutA;
  assign readB    = doutB;

  // A port may only write while its data comes from the finished array.
  a_write_after_done: assert property (@(posedge clk) disable iff (rst)
    (weA || weB) |-> gen_done);
  // The two ports never write the same address in the same clock.
  a_no_write_collision: assert property (@(posedge clk) disable iff (rst)
    (weA && weB) |-> (addrA != addrB));

endmodule
