// agu: address generation unit of the pattern description controller.
//
// Walks one address-type descriptor, already decoded into the register bank,
// and produces base + offset + x0 + sum_k x_k*stride_k for every point, one
// per clock cycle while the consumer is ready.  The iteration keeps one
// running block base per dimension and increments only the innermost counter
// that has not reached its limit, so each step costs one stride addition
// (stride control), one output addition (offset control) and the counter
// updates (count control), as in the three-adder structure the PDC uses.
//
// In row mode (used by the burst/prefetch path) the AGU emits one item per
// contiguous block instead: its start address and hsize, so a downstream burst
// controller can turn whole blocks into memory bursts.
//
// Interface: pulse start with desc/rel_base while idle (busy low).  Points come
// out on out_valid/out_ready with out_addr, out_len (hsize in row mode, 1
// otherwise) and out_last on the final one.  An empty descriptor (hsize or any
// used vsize of zero) finishes without output.  done pulses for one cycle
// after the last point is accepted.  Timing: first point is valid the cycle
// after start; then one point per cycle.
module agu
  import pdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  desc_t       desc,
  input  logic [31:0] rel_base,
  input  logic        row_mode,
  output logic        busy,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_addr,
  output logic [15:0] out_len,
  output logic        out_last,
  output logic        done
);

  desc_t       d_q;
  gen_t        g_q;
  logic [31:0] rel_q;
  logic        row_q;
  logic        active_q;

  assign busy      = active_q;
  assign out_valid = active_q;
  assign out_addr  = rel_q + gen_point(g_q);
  assign out_len   = row_q ? d_q.hsize : 16'd1;
  assign out_last  = g_q.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      done     <= 1'b0;
      d_q      <= '0;
      g_q      <= '0;
      rel_q    <= '0;
      row_q    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !active_q) begin
        d_q   <= desc;
        rel_q <= rel_base;
        row_q <= row_mode;
        g_q   <= gen_init(desc, row_mode);
        if (desc_empty(desc)) done <= 1'b1;
        else                  active_q <= 1'b1;
      end else if (active_q && out_ready) begin
        if (g_q.last) begin
          active_q <= 1'b0;
          done     <= 1'b1;
        end else begin
          g_q <= gen_step(d_q, g_q, row_q);
        end
      end
    end
  end

endmodule
