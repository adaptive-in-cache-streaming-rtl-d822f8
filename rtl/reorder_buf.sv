// reorder_buf: stream reorder buffer of the stream management controller.
//
// Complex patterns with poor locality (zig-zag, diagonal, the greek cross)
// usually stay inside a small region.  The prefetch path fetches that region
// with long bursts and writes it here; the streaming PDC then reads the words
// in pattern order from this buffer instead of from main memory.  The buffer
// is a direct-mapped store of DEPTH 32-bit lines (4 kB by default, the size of
// the evaluated prototype) indexed by the low word-address bits, with a tag
// and a valid bit per line so a read can tell whether its word has arrived.
// The read address is a stream start pointer (rd_base) plus the offset the
// PDC generates, so a block can be extracted from a prefetched stream.
//
// Interface: fill_* writes one word per cycle (always accepted).  rd_* is a
// valid/ready request; a request whose word is present is accepted and its
// data appear on out_* (valid/ready) in the next cycle; a request whose word
// has not arrived yet waits (rd_ready low, counted in n_wait).  clear
// invalidates every line.  The tag check and the wait-for-arrival rule are
// this design's choice; the bank/stream-table organisation is reduced to one
// direct-mapped bank.
module reorder_buf #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        fill_valid,
  input  logic [31:0] fill_addr,
  input  logic [31:0] fill_data,
  input  logic [31:0] rd_base,
  input  logic        rd_valid,
  output logic        rd_ready,
  input  logic [31:0] rd_off,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic [31:0] n_hit,
  output logic [31:0] n_wait
);

  localparam int IW = $clog2(DEPTH);
  localparam int TW = 32 - IW;

  logic [31:0]   data_q  [DEPTH];
  logic [TW-1:0] tag_q   [DEPTH];
  logic [DEPTH-1:0] valid_q;

  logic [31:0]   ra;
  logic [IW-1:0] ri, fi;
  logic          hit, slot_free;

  assign ra        = rd_base + rd_off;
  assign ri        = ra[IW-1:0];
  assign fi        = fill_addr[IW-1:0];
  assign hit       = valid_q[ri] && (tag_q[ri] == ra[31:IW]);
  assign slot_free = !out_valid || out_ready;
  assign rd_ready  = hit && slot_free;

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      data_q[fi] <= fill_data;
      tag_q[fi]  <= fill_addr[31:IW];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      n_hit     <= '0;
      n_wait    <= '0;
    end else begin
      if (clear) valid_q <= '0;
      else if (fill_valid) valid_q[fi] <= 1'b1;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (rd_valid && rd_ready) begin
        out_valid <= 1'b1;
        out_data  <= data_q[ri];
        n_hit     <= n_hit + 1;
      end else if (rd_valid) begin
        n_wait <= n_wait + 1;
      end
    end
  end

endmodule
