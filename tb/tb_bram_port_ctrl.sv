// tb_bram_port_ctrl: checks the block RAM copy and read-back controller
// with a behavioural dual-port block RAM. The array is stood in for by a
// function of the index. For each run it checks that the write phase takes
// ceil(n/2) clocks after one set-up clock, that block RAM words
// startAddr .. startAddr+n-1 hold the array (with address wrap-around) and
// no other word changed, that port A never writes for n = 1, and that the
// read-back with random gaps in the requests returns every entry once, on
// the right port, with matching check words.
module tb_bram_port_ctrl;
  localparam int ADDR_W = 14;
  localparam int DEPTH  = 2 ** ADDR_W;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, gen_done = 0, read_rqst = 0;
  logic [ADDR_W-1:0] start_addr;
  logic [13:0] n_eff, idx_a, idx_b;
  logic [31:0] rd_a, rd_b, check_a, check_b, dout_a, dout_b;
  logic we_a, we_b, busy, read_ready;
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic [1:0] read_valid;
  int unsigned tag;

  function automatic logic [31:0] arr(input int unsigned t, input int unsigned i);
    return (t * 32'h9E37_79B9) ^ (i * 32'h85EB_CA6B) ^ 32'h1234_5678;
  endfunction

  assign rd_a = arr(tag, idx_a);
  assign rd_b = arr(tag, idx_b);

  bram_port_ctrl dut (.clk, .rst, .start, .start_addr, .gen_done, .n_eff, .read_rqst,
                      .rd_a, .rd_b, .idx_a, .idx_b, .we_a, .we_b, .addr_a, .addr_b,
                      .busy, .read_ready, .read_valid, .check_a, .check_b);

  bram_tdp_model #(.ADDR_W(ADDR_W)) u_ram (
    .clkA(clk), .enA(gen_done), .weA(we_a), .addrA(addr_a), .dinA(rd_a), .doutA(dout_a),
    .clkB(clk), .enB(gen_done), .weB(we_b), .addrB(addr_b), .dinB(rd_b), .doutB(dout_b));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (n=%0d start=%0d)", what, n_eff, start_addr);
    end
  endtask

  task automatic run(input int unsigned n, input int unsigned sa);
    int unsigned cycles, half, got_a, got_b, exp_a, exp_b;
    bit a_wrote;
    tag++;
    half = n / 2;
    @(negedge clk);
    start = 1;
    start_addr = ADDR_W'(sa);
    n_eff = 14'(n);
    gen_done = 0;
    @(negedge clk);
    start = 0;
    chk(!busy && !read_ready, "idle before done");
    gen_done = 1;
    #1;
    chk(busy == (n != 0), "busy once done");
    cycles = 0;
    a_wrote = 0;
    while (busy) begin
      if (we_a) a_wrote = 1;
      @(negedge clk);
      cycles++;
    end
    chk(cycles == ((n == 0) ? 0 : 1 + (n - half)), $sformatf("write cycles %0d exp %0d", cycles, 1 + n - half));
    if (n == 1) chk(!a_wrote, "port A idle for n=1");
    for (int unsigned a = 0; a < DEPTH; a++) begin
      int unsigned off;
      off = (a - sa) % DEPTH;
      if (off < n) chk(u_ram.mem[a] == arr(tag, off), $sformatf("ram word %0d", a));
      else if (a % 97 == 0) chk(u_ram.mem[a] == u_ram.init_word(a) || tag > 1, "untouched word");
    end
    if (n == 0) begin
      chk(!read_ready, "nothing to read for n=0");
      return;
    end
    chk(read_ready, "read ready");
    got_a = 0;
    got_b = 0;
    exp_a = 0;
    exp_b = half;
    while (read_ready || read_valid != 0) begin
      read_rqst = read_ready && ($urandom_range(0, 3) != 0);
      @(negedge clk);
      read_rqst = 0;
      if (read_valid[0]) begin
        chk(check_a == arr(tag, exp_a) && dout_a == check_a, $sformatf("read A %0d", exp_a));
        exp_a++;
        got_a++;
      end
      if (read_valid[1]) begin
        chk(check_b == arr(tag, exp_b) && dout_b == check_b, $sformatf("read B %0d", exp_b));
        exp_b++;
        got_b++;
      end
    end
    chk(got_a == half && got_b == n - half, "read counts");
  endtask

  initial begin
    tag = 0;
    start_addr = '0;
    n_eff = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(10, 0);
    run(1, 5);
    run(11, 100);
    run(0, 7);
    run(1000, DEPTH - 300);
    run(16000, 384);
    for (int t = 0; t < 5; t++) run($urandom_range(2, 500), $urandom_range(0, DEPTH - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
