// tb_prng_top: end-to-end test of the generator at its default size
// (15 lanes, 16000-word array, 14-bit block RAM addresses) with a
// behavioural dual-port block RAM.
//
// Runs: the published four-number example; the counts 1, 10, 100, 1000,
// 10000 and 16000 with two seeds; 1000 numbers from seed 5462994; n = 0; a
// count above the 16000 limit; odd counts; start addresses that wrap past the
// end of the block RAM. For each run it checks
//   - the generation time, ceil(n/15) clocks, and the time until busy
//     falls, ceil(n/15) + 1 + ceil(n/2) clocks, against the published
//     times at 100 MHz (10 ns per clock, three significant digits);
//   - every block RAM word written against the reference model;
//   - the read-back: every pair, with random gaps in the requests, against
//     the reference and against the check outputs.
// It also counts how often each mechanism happened and fails if one never
// did: the count limit, n = 0, odd n, address wrap-around, an activate
// ignored while busy, a gap in read requests, and a new run started in the
// read-back phase.
module tb_prng_top;
  import tb_prng_ref_pkg::*;

  localparam int ADDR_W = 14;
  localparam int MAX_N  = 16000;
  localparam int DEPTH  = 2 ** ADDR_W;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, activate = 0, readRqst = 0;
  logic [31:0] seed, n;
  logic [ADDR_W-1:0] startAddr;
  logic busy, prngDone, readReady;
  logic [1:0] readValid;
  logic [31:0] checkA, checkB, readA, readB;
  logic clkA, enA, weA, clkB, enB, weB;
  logic [ADDR_W-1:0] addrA, addrB;
  logic [31:0] dinA, doutA, dinB, doutB;

  int n_clamp = 0, n_zero = 0, n_odd = 0, n_wrap = 0, n_ignored = 0, n_gap = 0, n_restart = 0;

  prng_top dut (.clk, .rst, .seed, .n, .startAddr, .activate, .readRqst,
                .busy, .prngDone, .readReady, .readValid, .checkA, .checkB, .readA, .readB,
                .clkA, .enA, .weA, .addrA, .dinA, .doutA,
                .clkB, .enB, .weB, .addrB, .dinB, .doutB);

  bram_tdp_model #(.ADDR_W(ADDR_W)) u_ram (
    .clkA, .enA, .weA, .addrA, .dinA, .doutA,
    .clkB, .enB, .weB, .addrB, .dinB, .doutB);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (seed=%0d n=%0d startAddr=%0d)", what, seed, n, startAddr);
    end
  endtask

  // published time in ns, three significant digits; 0 = none published
  function automatic bit time_ok(input int unsigned cycles, input real pub_ns);
    real t;
    t = 10.0 * cycles;
    return pub_ns == 0.0 || (t > pub_ns * 0.995 && t < pub_ns * 1.005);
  endfunction

  // Start a run; optionally poke activate while busy and stop reading early
  // with a new run. Returns after the read-back (or after busy for n = 0).
  task automatic run(input logic [31:0] s, input logic [31:0] cnt, input int unsigned sa,
                     input real gen_ns, input real total_ns, input bit full_read);
    int unsigned ne, half, gen_cycles, total_cycles, exp_gen, exp_total, ra, rb;
    bit poked;
    ne = (cnt > MAX_N) ? MAX_N : cnt;
    half = ne / 2;
    exp_gen = (ne + 14) / 15;
    exp_total = (ne == 0) ? 0 : exp_gen + 1 + (ne - half);
    if (cnt > MAX_N) n_clamp++;
    if (ne == 0) n_zero++;
    if (ne % 2 == 1) n_odd++;
    if (sa + ne > DEPTH) n_wrap++;

    @(negedge clk);
    seed = s;
    n = cnt;
    startAddr = ADDR_W'(sa);
    activate = 1;
    @(negedge clk);
    activate = 0;
    seed = ~s;          // inputs are only sampled with activate
    n = 7;
    startAddr = ~ADDR_W'(sa);
    gen_cycles = 0;
    total_cycles = 0;
    poked = 0;
    while (!prngDone) begin
      if (!poked && busy) begin
        activate = 1;   // must be ignored
        poked = 1;
        n_ignored++;
      end
      @(negedge clk);
      activate = 0;
      gen_cycles++;
      total_cycles++;
    end
    if (ne == 0) begin
      chk(gen_cycles == 0 && !busy && !readReady, "n=0 finishes at once");
      return;
    end
    while (busy) begin
      @(negedge clk);
      total_cycles++;
    end
    chk(gen_cycles == exp_gen, $sformatf("generation cycles %0d exp %0d", gen_cycles, exp_gen));
    chk(total_cycles == exp_total, $sformatf("total cycles %0d exp %0d", total_cycles, exp_total));
    chk(time_ok(gen_cycles, gen_ns), $sformatf("generation time %0d ns vs published %0.0f ns", 10 * gen_cycles, gen_ns));
    chk(time_ok(total_cycles, total_ns), $sformatf("total time %0d ns vs published %0.0f ns", 10 * total_cycles, total_ns));

    for (int unsigned k = 0; k < ne; k++)
      chk(u_ram.mem[(sa + k) % DEPTH] == ref_rnd(s, k), $sformatf("ram word for output %0d", k));

    chk(readReady, "read ready");
    ra = 0;
    rb = half;
    while (readReady || readValid != 0) begin
      readRqst = readReady && ($urandom_range(0, 4) != 0);
      if (readReady && !readRqst) n_gap++;
      if (!full_read && readReady && rb > half + 3) begin
        // start the next run in the read-back phase
        n_restart++;
        readRqst = 0;
        return;
      end
      @(negedge clk);
      readRqst = 0;
      if (readValid[0]) begin
        chk(readA == ref_rnd(s, ra) && checkA == readA, $sformatf("read A output %0d", ra));
        ra++;
      end
      if (readValid[1]) begin
        chk(readB == ref_rnd(s, rb) && checkB == readB, $sformatf("read B output %0d", rb));
        rb++;
      end
    end
    chk(ra == half && rb == ne, "read-back covers all outputs");
  endtask

  initial begin
    logic [31:0] paper_out [4] = '{32'd1714713423, 32'd4021373852, 32'd2028872688, 32'd2188049475};
    int unsigned ns [6] = '{1, 10, 100, 1000, 10000, 16000};
    real gen_pub [6]    = '{10.0, 10.0, 70.0, 670.0, 6670.0, 10700.0};
    real total_pub [6]  = '{30.0, 70.0, 580.0, 5680.0, 56700.0, 90700.0};

    seed = 0;
    n = 0;
    startAddr = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // published example: seed 3429426846, four numbers
    run(32'd3429426846, 4, 0, 0.0, 0.0, 1);
    for (int k = 0; k < 4; k++)
      chk(u_ram.mem[k] == paper_out[k], $sformatf("published output %0d", k));

    // published counts, two seeds
    for (int i = 0; i < 6; i++) begin
      run(32'd3429426846, ns[i], 0, gen_pub[i], total_pub[i], 1);
      run(32'd123456, ns[i], 100 * i + 7, gen_pub[i], total_pub[i], i != 3);
    end

    run(32'd5462994, 1000, 0, 670.0, 5680.0, 1);
    run(32'd1, 0, 0, 0.0, 0.0, 1);
    run(32'd654321, 20000, 500, 10700.0, 90700.0, 1);
    run(32'd6386547, 333, DEPTH - 100, 0.0, 0.0, 1);
    for (int t = 0; t < 4; t++)
      run($urandom, $urandom_range(1, 800), $urandom_range(0, DEPTH - 1), 0.0, 0.0, t != 2);

    $display("mechanisms: clamp=%0d zero=%0d odd=%0d wrap=%0d ignored=%0d gap=%0d restart=%0d",
             n_clamp, n_zero, n_odd, n_wrap, n_ignored, n_gap, n_restart);
    chk(n_clamp > 0, "count limit exercised");
    chk(n_zero > 0, "n = 0 exercised");
    chk(n_odd > 0, "odd n exercised");
    chk(n_wrap > 0, "address wrap exercised");
    chk(n_ignored > 0, "ignored activate exercised");
    chk(n_gap > 0, "read request gap exercised");
    chk(n_restart > 0, "restart in read-back exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
