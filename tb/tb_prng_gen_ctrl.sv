// tb_prng_gen_ctrl: checks the generation sequencer.
//
// For a set of counts (0, 1, 14, 15, 16, 100, 1000, 16000, a count above the
// limit and random counts) it starts a run and checks, clock by clock, that
// the group seed is seed + base * 314159265, that exactly the lanes with
// index below n are enabled, that every index 0..n-1 is enabled once, that
// done rises after ceil(n/15) clocks and that a start while active is
// ignored.
module tb_prng_gen_ctrl;
  localparam int LANES = 15;
  localparam int MAX_N = 16000;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] seed, n;
  logic [31:0] group_seed;
  logic [13:0] base, n_eff;
  logic [LANES-1:0] lane_we;
  logic active, done;

  prng_gen_ctrl dut (.clk, .rst, .start, .seed, .n, .group_seed, .base, .lane_we,
                     .active, .done, .n_eff);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (n=%0d base=%0d)", what, n, base);
    end
  endtask

  task automatic run(input logic [31:0] s, input logic [31:0] cnt, input bit poke);
    int unsigned ne, exp_cycles, cycles, written, idx_sum, exp_sum;
    seed = s;
    n = cnt;
    ne = (cnt > MAX_N) ? MAX_N : cnt;
    exp_cycles = (ne + LANES - 1) / LANES;
    exp_sum = (ne == 0) ? 0 : ne * (ne - 1) / 2;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(n_eff == 14'(ne), "count limit");
    cycles = 0;
    written = 0;
    idx_sum = 0;
    while (active) begin
      chk(group_seed == s + 32'(base) * 32'd314159265, "group seed");
      for (int i = 0; i < LANES; i++) begin
        chk(lane_we[i] == (int'(base) + i < int'(ne)), "lane enable");
        if (lane_we[i]) begin
          written++;
          idx_sum += int'(base) + i;
        end
      end
      if (poke && cycles == 1) begin
        // a start in the middle of a run must not restart it
        start = 1;
        n = 1;
      end
      @(negedge clk);
      start = 0;
      cycles++;
    end
    chk(done, "done after run");
    chk(lane_we == '0, "no writes when idle");
    chk(cycles == exp_cycles, $sformatf("generation cycles %0d exp %0d", cycles, exp_cycles));
    chk(written == ne, "every index written");
    chk(idx_sum == exp_sum, "each index once");
  endtask

  initial begin
    seed = 0;
    n = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    chk(!active && !done, "idle after reset");
    run(32'd3429426846, 4, 0);
    run(32'd123456, 0, 0);
    run(32'd1, 1, 0);
    run(32'd654321, 14, 0);
    run(32'd6386547, 15, 0);
    run(32'd3429426846, 16, 1);
    run(32'd123456, 100, 0);
    run(32'd5462994, 1000, 1);
    run(32'd3429426846, 16000, 0);
    run(32'd42, 20000, 0);
    for (int t = 0; t < 20; t++) run($urandom, $urandom_range(1, 600), t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
