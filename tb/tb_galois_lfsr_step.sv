// tb_galois_lfsr_step: checks the LFSR step.
//
// 1. The 32-bit default instance against the published first four outputs
//    for seed 3429426846 (seeds advanced by 314159265 per output).
// 2. The 32-bit instance against the rotate-and-invert reference on random
//    states, and the all-zero state.
// 3. A 16-bit instance with the maximal-length mask for
//    x^16 + x^14 + x^13 + x^11 + 1 (0xB400), stepped from 1 until it returns:
//    the period must be 2^16 - 1 and zero must never appear.
module tb_galois_lfsr_step;
  import tb_prng_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] s32_i, s32_o;
  logic [15:0] s16_i, s16_o;

  galois_lfsr_step dut32 (.state_i(s32_i), .state_o(s32_o));
  galois_lfsr_step #(.WIDTH(16), .TAPS(16'hB400)) dut16 (.state_i(s16_i), .state_o(s16_o));

  task automatic check32(input logic [31:0] exp, input string what);
    checks++;
    if (s32_o !== exp) begin
      failures++;
      $display("FAIL %s: in=%0d got=%0d exp=%0d", what, s32_i, s32_o, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] paper_out [4] = '{32'd1714713423, 32'd4021373852, 32'd2028872688, 32'd2188049475};
    int unsigned period;
    bit seen_zero;

    for (int k = 0; k < 4; k++) begin
      s32_i = 32'd3429426846 + 32'(k) * 32'd314159265;
      #1 check32(paper_out[k], "published vector");
    end

    s32_i = '0;
    #1 check32('0, "zero state");

    for (int t = 0; t < 2000; t++) begin
      s32_i = $urandom;
      #1 check32(ref_step(s32_i), "random state");
    end

    period = 0;
    seen_zero = 0;
    s16_i = 16'd1;
    do begin
      #1;
      if (s16_o == 16'd0) seen_zero = 1;
      s16_i = s16_o;
      period++;
    end while (s16_i != 16'd1 && period < 70000);
    checks++;
    if (period != 65535 || seen_zero) begin
      failures++;
      $display("FAIL 16-bit period %0d (zero seen %0d)", period, seen_zero);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
