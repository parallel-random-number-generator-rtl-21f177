// tb_rng_buffer: checks the result array. Groups of 15 random words are
// written at random bases with random lane masks (including bases near the
// end, where lanes past the last entry must be dropped), mirrored in a
// testbench array, and every written entry is then read back through both
// read ports.
module tb_rng_buffer;
  localparam int LANES = 15;
  localparam int DEPTH = 16000;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic [13:0] base, idx_a, idx_b;
  logic [LANES-1:0] we;
  logic [31:0] wdata [LANES];
  logic [31:0] rd_a, rd_b;
  logic [31:0] model [DEPTH];
  bit          valid [DEPTH];

  rng_buffer dut (.clk, .base, .we, .wdata, .idx_a, .idx_b, .rd_a, .rd_b);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0;
    base = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      base = (t % 10 == 0) ? 14'(DEPTH - $urandom_range(1, 20)) : 14'($urandom_range(0, DEPTH - 1));
      we = LANES'($urandom);
      for (int i = 0; i < LANES; i++) begin
        wdata[i] = $urandom;
        if (we[i] && int'(base) + i < DEPTH) begin
          model[int'(base) + i] = wdata[i];
          valid[int'(base) + i] = 1;
        end
      end
    end
    @(negedge clk);
    we = '0;
    for (int k = 0; k < DEPTH; k += 2) begin
      idx_a = 14'(k);
      idx_b = 14'(DEPTH - 1 - k);
      #1;
      if (valid[k]) begin
        checks++;
        if (rd_a !== model[k]) begin
          failures++;
          $display("FAIL port A idx %0d got %h exp %h", k, rd_a, model[k]);
        end
      end
      if (valid[DEPTH - 1 - k]) begin
        checks++;
        if (rd_b !== model[DEPTH - 1 - k]) begin
          failures++;
          $display("FAIL port B idx %0d got %h exp %h", DEPTH - 1 - k, rd_b, model[DEPTH - 1 - k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
