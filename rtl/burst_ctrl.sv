// burst_ctrl: memory burst controller of the stream management controller.
//
// The prefetching AGU hands over contiguous regions as {start address, hsize}
// instead of single addresses.  They wait in a request queue; the burst
// controller takes one region at a time and splits it into bursts of at most
// MAX_BURST words with one address register that is incremented and one
// length register that is decremented by the burst length.  With the default
// of 256 words this matches the longest AXI4 burst, as in the evaluated
// prototype; a region of 1024 words becomes four bursts.
//
// Interface: req_* (valid/ready) carries regions; burst_* (valid/ready)
// carries {address, length}.  One burst can leave per cycle; a region of
// n words takes ceil(n / MAX_BURST) cycles of the output.  The request queue
// depth is this design's choice.
module burst_ctrl #(
  parameter int unsigned MAX_BURST = 256,
  parameter int unsigned Q_DEPTH   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  input  logic [15:0] req_len,
  output logic        burst_valid,
  input  logic        burst_ready,
  output logic [31:0] burst_addr,
  output logic [15:0] burst_len,
  output logic        idle
);

  typedef struct packed {
    logic [31:0] addr;
    logic [15:0] len;
  } region_t;

  region_t     q_out;
  logic        q_valid, q_ready;
  logic [$clog2(Q_DEPTH+1)-1:0] q_count;
  logic [31:0] addr_q;
  logic [15:0] left_q;
  logic        busy_q;

  sfifo #(.T(region_t), .DEPTH(Q_DEPTH)) u_queue (
    .clk, .rst_n,
    .wr_valid (req_valid), .wr_ready (req_ready), .wr_data ('{addr: req_addr, len: req_len}),
    .rd_valid (q_valid),   .rd_ready (q_ready),   .rd_data (q_out),
    .count    (q_count)
  );

  localparam logic [15:0] MAXB = 16'(MAX_BURST);

  assign q_ready     = !busy_q;
  assign burst_valid = busy_q;
  assign burst_addr  = addr_q;
  assign burst_len   = (left_q > MAXB) ? MAXB : left_q;
  assign idle        = !busy_q && (q_count == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      addr_q <= '0;
      left_q <= '0;
    end else if (!busy_q) begin
      if (q_valid && q_out.len != 0) begin
        busy_q <= 1'b1;
        addr_q <= q_out.addr;
        left_q <= q_out.len;
      end
    end else if (burst_ready) begin
      addr_q <= addr_q + 32'(burst_len);
      left_q <= left_q - burst_len;
      if (left_q <= MAXB) busy_q <= 1'b0;
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          burst_valid |-> (burst_len != 0 && burst_len <= MAXB));

endmodule
