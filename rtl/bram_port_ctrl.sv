// bram_port_ctrl: moves the generated numbers into a true dual-port block
// RAM and reads them back.
//
// The n numbers are split in two halves. Port A handles array entries
// 0 .. n/2-1 and port B entries n/2 .. n-1 (n/2 rounded down, so for odd n
// port B has one entry more). Each port writes one entry per clock to block
// RAM address start_addr + index, so the copy takes ceil(n/2) clocks. After
// that the controller is ready to read: each clock with read_rqst set, both
// ports read the next entry of their half from the same addresses, and the
// matching array entries are presented as check_a/check_b next to the block
// RAM outputs, so a host can compare the two copies.
//
// Interface: start (a new run: clears the controller, latches start_addr),
// gen_done (generation finished), n_eff (count), read_rqst in; idx_a/idx_b
// select the array entries; we_a/we_b, addr_a/addr_b drive the block RAM
// (data comes straight from the array); busy, read_ready, read_valid[1:0]
// ({port B, port A}) and check_a/check_b out.
// Timing: gen_done seen at edge k sets up the counters; edges k+1 ..
// k+ceil(n/2) write; busy is high from gen_done until the last write. The
// block RAM is taken to have one clock of read latency: read_valid and the
// check words appear one clock after the request, aligned with the block
// RAM output. Reset is synchronous and active high.
// The split into two halves, the start address offset, the one set-up clock
// and the write rate follow the original design; the read protocol, the
// read_valid and check alignment and the per-port write gating for odd n are
// this design's choices.
module bram_port_ctrl #(
  parameter int unsigned ADDR_W = prng_pkg::ADDR_W,
  parameter int unsigned MAX_N  = prng_pkg::MAX_N,
  localparam int unsigned CNT_W = $clog2(MAX_N + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic              gen_done,
  input  logic [CNT_W-1:0]  n_eff,
  input  logic              read_rqst,
  input  prng_pkg::word_t   rd_a,
  input  prng_pkg::word_t   rd_b,
  output logic [CNT_W-1:0]  idx_a,
  output logic [CNT_W-1:0]  idx_b,
  output logic              we_a,
  output logic              we_b,
  output logic [ADDR_W-1:0] addr_a,
  output logic [ADDR_W-1:0] addr_b,
  output logic              busy,
  output logic              read_ready,
  output logic [1:0]        read_valid,
  output prng_pkg::word_t   check_a,
  output prng_pkg::word_t   check_b
);

  typedef enum logic [1:0] {
    IDLE,      // waiting for generation to finish
    WRITE,     // copying the array into block RAM
    READ,      // ready; one pair per read request
    FINISHED   // everything read back, waiting for the next run
  } state_t;

  state_t            state;
  logic [CNT_W-1:0]  cnt_a, cnt_b, half;
  logic [ADDR_W-1:0] base_addr;
  logic              last_pair;

  assign half      = n_eff >> 1;
  assign idx_a     = cnt_a;
  assign idx_b     = cnt_b;
  assign addr_a    = base_addr + ADDR_W'(cnt_a);
  assign addr_b    = base_addr + ADDR_W'(cnt_b);
  assign last_pair = ({1'b0, cnt_b} + 1'b1) >= {1'b0, n_eff};

  assign we_a       = (state == WRITE) && (cnt_a < half);
  assign we_b       = (state == WRITE);
  assign busy       = (state == WRITE) || (state == IDLE && gen_done && n_eff != '0);
  assign read_ready = (state == READ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      cnt_a      <= '0;
      cnt_b      <= '0;
      base_addr  <= '0;
      read_valid <= '0;
      check_a    <= '0;
      check_b    <= '0;
    end else begin
      read_valid <= '0;
      if (start) begin
        state     <= IDLE;
        base_addr <= start_addr;
      end else begin
        unique case (state)
          IDLE: if (gen_done) begin
            cnt_a <= '0;
            cnt_b <= half;
            state <= (n_eff == '0) ? FINISHED : WRITE;
          end
          WRITE: begin
            cnt_a <= cnt_a + 1'b1;
            cnt_b <= cnt_b + 1'b1;
            if (last_pair) begin
              cnt_a <= '0;
              cnt_b <= half;
              state <= READ;
            end
          end
          READ: if (read_rqst) begin
            read_valid <= {1'b1, cnt_a < half};
            check_a    <= rd_a;
            check_b    <= rd_b;
            cnt_a      <= cnt_a + 1'b1;
            cnt_b      <= cnt_b + 1'b1;
            if (last_pair)
              state <= FINISHED;
          end
          FINISHED: ;
        endcase
      end
    end
  end

endmodule
