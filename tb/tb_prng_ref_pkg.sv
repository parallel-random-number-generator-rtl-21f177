// tb_prng_ref_pkg: reference model of the generator for the testbenches.
//
// The LFSR step is written the way the algorithm is usually explained: the
// whole word is rotated right by one place (the LSB moves to the MSB), and
// if that bit was 1 the bits at the feedback positions x^22, x^2 and x^1 of
// x^32 + x^22 + x^2 + x + 1 (bits 21, 1 and 0) are inverted. This is
// independent of the shift-and-mask form used in the RTL. Output k of a run
// is ref_step(seed + k * 314159265) with the product taken in 64 bits and
// reduced modulo 2^32.
package tb_prng_ref_pkg;

  function automatic logic [31:0] ref_step(input logic [31:0] s);
    logic [31:0] r;
    r = {s[0], s[31:1]};
    if (s[0]) begin
      r[21] = ~r[21];
      r[1]  = ~r[1];
      r[0]  = ~r[0];
    end
    return r;
  endfunction

  function automatic logic [31:0] ref_rnd(input logic [31:0] seed, input longint unsigned k);
    longint unsigned s;
    s = longint'(seed) + k * 64'd314159265;
    return ref_step(s[31:0]);
  endfunction

endpackage
