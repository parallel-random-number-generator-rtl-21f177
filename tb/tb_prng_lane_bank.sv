// tb_prng_lane_bank: checks every lane of the lane bank against the
// reference model: lane i must return ref_step(group_seed + i * 314159265),
// for the published seed and for random group seeds.
module tb_prng_lane_bank;
  import tb_prng_ref_pkg::*;

  localparam int LANES = 15;
  int checks = 0, failures = 0;
  logic [31:0] group_seed;
  logic [31:0] rnd [LANES];

  prng_lane_bank dut (.group_seed, .rnd);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      group_seed = (t == 0) ? 32'd3429426846 : $urandom;
      #1;
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (rnd[i] !== ref_rnd(group_seed, i)) begin
          failures++;
          $display("FAIL lane %0d seed %0d got %0d exp %0d", i, group_seed, rnd[i], ref_rnd(group_seed, i));
        end
      end
    end
    checks++;
    if (rnd[0] == rnd[1]) begin
      failures++;
      $display("FAIL lanes 0 and 1 equal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
