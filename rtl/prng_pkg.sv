// prng_pkg: constants and types shared by the parallel LFSR random number
// generator.
//
// The generator steps a 32-bit Galois LFSR with the maximal-length feedback
// polynomial x^32 + x^22 + x^2 + x + 1 (toggle mask 0x80200003). Instead of
// chaining the LFSR from one output to the next, output k of a run is one
// step applied to its own seed, seed + k * 314159265 (the first nine digits
// of pi), so that any number of outputs can be computed side by side. Fifteen
// lanes run per clock. The array that collects the outputs and the block RAM
// behind it hold 16000 words of 32 bits (64 kB). The polynomial, the mask, the
// stride, the lane count and the 16000-word size follow the original design;
// the 14-bit address width is this design's choice, the smallest that
// reaches 16000 words.
package prng_pkg;

  localparam int unsigned WIDTH       = 32;
  localparam logic [31:0] TAP_MASK    = 32'h8020_0003;
  localparam logic [31:0] SEED_STRIDE = 32'd314159265;
  localparam int unsigned LANES       = 15;
  localparam int unsigned MAX_N       = 16000;
  localparam int unsigned ADDR_W      = 14;

  typedef logic [WIDTH-1:0] word_t;

endpackage
