// dcu: dynamic chain unit of the pattern description controller.
//
// When a descriptor has been completely solved, the DCU applies its modifier
// chain: the field control walks the set bits of the target mask (lowest
// first, one field per cycle), the modifier control adds the matching signed
// fmod value to the selected field, and the count control stops after msize
// fields.  Each modified field is written straight back into the descriptor
// memory through a 16-bit-lane write port, so the next use of the descriptor
// sees the new values.  A last write stores the header with iter decremented;
// a descriptor whose iter is 0 or whose msize is 0 is left alone.
//
// Mask bits: 0 offset, 1 hsize, 2k+2 stride_{k+1}, 2k+3 vsize_{k+1}.  The
// memory positions follow the packing in pdc_pkg.  Widths are the document's;
// the one-field-per-cycle schedule and the write-back of iter are this
// design's choices.
//
// Interface: start (one cycle, while idle) with desc; busy while working;
// done pulses one cycle after the last write; wr_* is the write port
// (wr_be selects 16-bit lanes of the 64-bit word).
module dcu
  import pdc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  desc_t       desc,
  output logic        busy,
  output logic        done,
  output logic        wr_en,
  output ref_t        wr_addr,
  output logic [63:0] wr_data,
  output logic [3:0]  wr_be
);

  typedef enum logic [1:0] {D_IDLE, D_FIELD, D_HDR} dstate_e;

  dstate_e     st_q;
  desc_t       d_q;
  logic [15:0] left_q;   // mask bits not yet processed
  logic [1:0]  m_q;      // index of the next fmod

  // field control: lowest remaining selected field
  logic [3:0]  sel;
  logic        any;
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = 15; i >= 0; i--)
      if (left_q[i]) begin
        sel = 4'(i);
        any = 1'b1;
      end
  end

  // modifier control: field + fmod
  logic [31:0] fm;
  logic [31:0] fld_old, fld_new;
  logic [4:0]  hw_idx;   // 16-bit slot after word 0 for pair fields
  assign fm = {{16{d_q.fmod[m_q][15]}}, d_q.fmod[m_q]};
  always_comb begin
    fld_old = '0;
    hw_idx  = '0;
    if (sel == 4'd0)      fld_old = d_q.offset;
    else if (sel == 4'd1) fld_old = {16'd0, d_q.hsize};
    else begin
      hw_idx = 5'(sel) - 5'd2;
      if (!sel[0]) fld_old = {16'd0, d_q.stride[hw_idx[3:1]]};
      else         fld_old = {16'd0, d_q.vsize[hw_idx[3:1]]};
    end
    fld_new = fld_old + fm;
  end

  assign busy = (st_q != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= D_IDLE;
      d_q     <= '0;
      left_q  <= '0;
      m_q     <= '0;
      done    <= 1'b0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
      wr_be   <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      unique case (st_q)
        D_IDLE: if (start) begin
          d_q    <= desc;
          left_q <= desc.mask;
          m_q    <= '0;
          if (desc.hdr.msize == 0 || desc.hdr.iter == 0) done <= 1'b1;
          else                                           st_q <= D_FIELD;
        end
        D_FIELD: begin
          if (any && (m_q < d_q.hdr.msize)) begin
            left_q[sel] <= 1'b0;
            m_q         <= m_q + 2'd1;
            wr_en       <= 1'b1;
            if (sel == 4'd0) begin
              d_q.offset <= fld_new;
              wr_addr    <= d_q.ref_addr;
              wr_data    <= {32'd0, fld_new};
              wr_be      <= 4'b0011;
            end else if (sel == 4'd1) begin
              d_q.hsize <= fld_new[15:0];
              wr_addr   <= d_q.ref_addr;
              wr_data   <= {16'd0, fld_new[15:0], 32'd0};
              wr_be     <= 4'b0100;
            end else begin
              if (!sel[0]) d_q.stride[hw_idx[3:1]] <= fld_new[15:0];
              else         d_q.vsize[hw_idx[3:1]]  <= fld_new[15:0];
              wr_addr <= d_q.ref_addr + ref_t'(1) + ref_t'(hw_idx[4:2]);
              wr_data <= {4{fld_new[15:0]}};
              wr_be   <= 4'b0001 << hw_idx[1:0];
            end
          end else begin
            st_q <= D_HDR;
          end
        end
        D_HDR: begin
          d_q.hdr.iter <= d_q.hdr.iter - 1'b1;
          wr_en   <= 1'b1;
          wr_addr <= d_q.ref_addr;
          wr_data <= {d_q.hdr.size, d_q.hdr.msize, d_q.hdr.iter - ITER_W'(1),
                      d_q.hdr.graph_p, 48'd0};
          wr_be   <= 4'b1000;
          st_q    <= D_IDLE;
          done    <= 1'b1;
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

endmodule
