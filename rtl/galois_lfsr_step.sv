// galois_lfsr_step: one step of a Galois linear feedback shift register.
//
// The state is shifted right by one place. If the bit shifted out (the old
// least significant bit) was 1, the toggle mask TAPS is XORed into the shifted
// state; the mask always has its top bit set, so the old LSB reappears as the
// new MSB and the feedback-polynomial bit positions are inverted. With the
// default mask 0x80200003 (x^32 + x^22 + x^2 + x + 1) the state runs through
// all 2^32 - 1 non-zero values before repeating. The all-zero state maps to
// itself.
//
// Interface: state_i is the current state (a seed), state_o the next state,
// which the generator uses as the random number.
// Timing: purely combinational, no clock.
// The step, mask and polynomial follow the original design; the WIDTH and
// TAPS parameters only allow other maximal-length polynomials to be plugged in.
module galois_lfsr_step #(
  parameter int unsigned       WIDTH = prng_pkg::WIDTH,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(prng_pkg::TAP_MASK)
) (
  input  logic [WIDTH-1:0] state_i,
  output logic [WIDTH-1:0] state_o
);

  always_comb begin
    state_o = state_i >> 1;
    if (state_i[0])
      state_o = state_o ^ TAPS;
  end

endmodule
