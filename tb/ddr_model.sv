// ddr_model: behavioural model of the external DDR3 memory and its controller
// (not synthesizable, testbench only).
//
// Takes one request at a time on the memory access bus.  Every request costs
// OVERHEAD cycles before any data move (20 cycles, the per-request overhead of
// the memory controller used in the evaluation), then a read returns len
// words, one per cycle while mr_ready is high, and a write stores its single
// word.  The WORDS-word array starts filled with init_word(address), so a
// testbench can predict every read.  busy_cycles counts cycles spent on
// requests, n_req the requests served.
module ddr_model #(
  parameter int unsigned WORDS    = 1 << 16,
  parameter int unsigned OVERHEAD = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mreq_valid,
  output logic        mreq_ready,
  input  logic        mreq_we,
  input  logic [31:0] mreq_addr,
  input  logic [15:0] mreq_len,
  input  logic [31:0] mreq_wdata,
  output logic        mr_valid,
  input  logic        mr_ready,
  output logic [31:0] mr_data,
  output int unsigned n_req,
  output int unsigned n_words
);

  function automatic logic [31:0] init_word(logic [31:0] a);
    return a * 32'h9E37_79B1 + 32'd12345;
  endfunction

  logic [31:0] mem [WORDS];
  initial for (int i = 0; i < WORDS; i++) mem[i] = init_word(32'(i));

  typedef enum logic [1:0] {IDLE, WAIT, DATA} st_e;
  st_e         st;
  int unsigned wait_cnt;
  logic [31:0] addr;
  logic [15:0] left;
  logic        mreq_we_q;

  assign mreq_ready = (st == IDLE);
  assign mr_valid   = (st == DATA);
  assign mr_data    = mem[addr % WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; wait_cnt <= 0; addr <= '0; left <= '0; n_req <= 0; n_words <= 0;
    end else begin
      unique case (st)
        IDLE: if (mreq_valid) begin
          n_req    <= n_req + 1;
          addr     <= mreq_addr;
          left     <= mreq_len;
          wait_cnt <= OVERHEAD - 1;
          if (mreq_we) mem[mreq_addr % WORDS] <= mreq_wdata;
          st <= WAIT;
        end
        WAIT: if (wait_cnt == 0) st <= mreq_we_q ? IDLE : DATA;
              else wait_cnt <= wait_cnt - 1;
        DATA: if (mr_ready) begin
          n_words <= n_words + 1;
          addr    <= addr + 1;
          left    <= left - 1;
          if (left == 1) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) if (st == IDLE && mreq_valid) mreq_we_q <= mreq_we;

endmodule
