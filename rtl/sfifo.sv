// sfifo: synchronous FIFO used for the register-based buffers of the design
// (ring node input buffers, burst request queue, stream FIFO, command queue).
//
// DEPTH entries of type T, first-word-fall-through: rd_data shows the oldest
// entry whenever rd_valid is high, and is removed in a cycle with rd_ready.
// wr_ready is low when full.  A write and a read in the same cycle are both
// accepted.  Reset empties it.  Handshake rules are asserted below.
module sfifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_valid,
  output logic wr_ready,
  input  T     wr_data,
  output logic rd_valid,
  input  logic rd_ready,
  output T     rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   wp_q, rp_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  logic do_wr, do_rd;
  assign wr_ready = (cnt_q != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (cnt_q != 0);
  assign rd_data  = mem[rp_q];
  assign count    = cnt_q;
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_wr) wp_q <= inc(wp_q);
      if (do_rd) rp_q <= inc(rp_q);
      cnt_q <= cnt_q + $bits(cnt_q)'(do_wr) - $bits(cnt_q)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp_q] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  cnt_q <= DEPTH[$clog2(DEPTH+1)-1:0]);

endmodule
