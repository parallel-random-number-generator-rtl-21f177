// bram_tdp_model: behavioural model of a true dual-port block RAM.
//
// Two independent ports, each with clock, enable, write enable, address,
// write data and read data. When a port is enabled, a write stores din at
// addr and a read returns mem[addr] on dout one clock later (read-first: a
// read of the address being written returns the old word). Depth is
// 2^ADDR_W words. The contents start at a known pattern, init_word(addr),
// so that testbenches can tell written words from untouched ones.
module bram_tdp_model #(
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clkA,
  input  logic              enA,
  input  logic              weA,
  input  logic [ADDR_W-1:0] addrA,
  input  logic [31:0]       dinA,
  output logic [31:0]       doutA,
  input  logic              clkB,
  input  logic              enB,
  input  logic              weB,
  input  logic [ADDR_W-1:0] addrB,
  input  logic [31:0]       dinB,
  output logic [31:0]       doutB
);

  logic [31:0] mem [2**ADDR_W];

  function automatic logic [31:0] init_word(input int unsigned a);
    return 32'hA5A5_0000 ^ a;
  endfunction

  initial begin
    for (int unsigned a = 0; a < 2**ADDR_W; a++) mem[a] = init_word(a);
    doutA = '0;
    doutB = '0;
  end

  always @(posedge clkA) if (enA) begin
    doutA <= mem[addrA];
    if (weA) mem[addrA] <= dinA;
  end

  always @(posedge clkB) if (enB) begin
    doutB <= mem[addrB];
    if (weB) mem[addrB] <= dinB;
  end

endmodule
