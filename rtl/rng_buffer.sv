// rng_buffer: the array that collects the generated numbers.
//
// A register array of DEPTH words. Every clock, write port i stores wdata[i]
// at index base + i when we[i] is set, so one whole group of lane outputs is
// written at once. Two read ports, idx_a and idx_b, feed the two block RAM
// ports and the check outputs.
//
// Interface: base, we[LANES], wdata[LANES] (writes); idx_a/rd_a, idx_b/rd_b
// (reads).
// Timing: writes on the rising clock edge; reads are combinational. The
// array is not reset; only written entries are ever read. An index at or
// beyond DEPTH is not written and reads as zero.
// That the numbers are collected in an array indexed by output number and
// then copied from it follows the original design; the port structure is
// this design's choice.
module rng_buffer #(
  parameter int unsigned DEPTH = prng_pkg::MAX_N,
  parameter int unsigned LANES = prng_pkg::LANES,
  localparam int unsigned IDX_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic [IDX_W-1:0] base,
  input  logic [LANES-1:0] we,
  input  prng_pkg::word_t  wdata [LANES],
  input  logic [IDX_W-1:0] idx_a,
  input  logic [IDX_W-1:0] idx_b,
  output prng_pkg::word_t  rd_a,
  output prng_pkg::word_t  rd_b
);

  prng_pkg::word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < LANES; i++) begin
      if (we[i] && ((32'(base) + 32'(i)) < 32'(DEPTH)))
        mem[32'(base) + 32'(i)] <= wdata[i];
    end
  end

  assign rd_a = (32'(idx_a) < 32'(DEPTH)) ? mem[idx_a] : '0;
  assign rd_b = (32'(idx_b) < 32'(DEPTH)) ? mem[idx_b] : '0;

endmodule
