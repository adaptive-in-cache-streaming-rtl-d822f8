// pdc_pkg: types, field widths and the iteration step shared by the pattern
// description controller (PDC), its address generation unit (AGU), its
// dynamic chain unit (DCU) and the stream management controller.
//
// A descriptor describes the affine pattern
//     y = offset + x0 + sum_k x_k * stride_k,  x0 < hsize, x_k < vsize_k
// with x0 innermost and dynamic pair 1 the next loop out.  Field widths follow
// the evaluated prototype: 16-bit header, hsize, stride, vsize, target mask and
// fmod fields, a 32-bit offset and 8-bit descriptor references, so that a base
// descriptor is one 64-bit word and a dynamic pair is 32 bits.
//
// The bit layout of the header (size, msize, iter, graph_p from left to
// right, as the format is drawn) and the way a descriptor is packed into the
// 64-bit descriptor memory are this design's own choices:
//   word 0            : {header[63:48], hsize[47:32], offset[31:0]}
//   words 1..         : 16-bit fields, four per word from the low lane up:
//                       stride_1, vsize_1, ..., stride_n, vsize_n,
//                       [target mask, fmod_1..fmod_m   if msize != 0]
//                       [{level[15:8], next[7:0]}      if graph_p]
// A reference of 8'hFF means "none".  Target mask bit 0 selects offset, bit 1
// hsize, bit 2k stride_k and bit 2k+1 vsize_k; the fmod values apply to the
// set bits in ascending order.  iter counts the remaining modifier-chain
// applications; the DCU decrements it in memory each time it applies the chain.
package pdc_pkg;

  localparam int MAX_DIMS  = 7;   // header size field is 3 bits
  localparam int MAX_MODS  = 3;   // header msize field is 2 bits
  localparam int ADDR_W    = 32;
  localparam int REF_W     = 8;
  localparam int ITER_W    = 10;
  localparam int MAX_HW    = 2*MAX_DIMS + 1 + MAX_MODS + 1;  // 16-bit fields after word 0
  localparam int MAX_WORDS = 1 + (MAX_HW + 3) / 4;           // words per descriptor
  localparam logic [REF_W-1:0] REF_NONE = '1;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [REF_W-1:0]  ref_t;

  typedef struct packed {
    logic [2:0]        size;     // number of dynamic pairs
    logic [1:0]        msize;    // number of fmod fields
    logic [ITER_W-1:0] iter;     // remaining modifier chain applications
    logic              graph_p;  // {level,next} present
  } header_t;

  // Decoded descriptor, as held in the PDC's control/status register bank.
  typedef struct packed {
    ref_t                       ref_addr;  // where it lives in descriptor memory
    header_t                    hdr;
    logic [31:0]                offset;
    logic [15:0]                hsize;
    logic [MAX_DIMS-1:0][15:0]  stride;    // signed
    logic [MAX_DIMS-1:0][15:0]  vsize;
    logic [15:0]                mask;
    logic [MAX_MODS-1:0][15:0]  fmod;      // signed
    ref_t                       level;
    ref_t                       next;
  } desc_t;

  // Iteration state of one descriptor (x0, x_k and the running block bases).
  typedef struct packed {
    logic [15:0]                x0;
    logic [MAX_DIMS-1:0][15:0]  xk;
    logic [MAX_DIMS-1:0][31:0]  base;      // start of the current block at level k
    logic [31:0]                row;       // start of the current contiguous block
    logic                       last;      // current point is the final one
  } gen_t;

  // Number of 16-bit fields that follow word 0.
  function automatic int unsigned desc_hw(header_t h);
    return 2*int'(h.size) + ((h.msize != 0) ? 1 + int'(h.msize) : 0) + (h.graph_p ? 1 : 0);
  endfunction

  // True when the descriptor produces no point at all.
  function automatic logic desc_empty(desc_t d);
    logic e;
    e = (d.hsize == 0);
    for (int k = 0; k < MAX_DIMS; k++)
      if (k < d.hdr.size && d.vsize[k] == 0) e = 1'b1;
    return e;
  endfunction

  // Is dimension k (0 = x0, k>0 = dynamic pair k) at its final value?
  function automatic logic [MAX_DIMS:0] at_end(desc_t d, gen_t g, logic row_mode);
    logic [MAX_DIMS:0] e;
    e[0] = row_mode || (g.x0 == d.hsize - 16'd1);
    for (int k = 0; k < MAX_DIMS; k++)
      e[k+1] = (k >= d.hdr.size) || (g.xk[k] == d.vsize[k] - 16'd1);
    return e;
  endfunction

  // First point of a descriptor.
  function automatic gen_t gen_init(desc_t d, logic row_mode);
    gen_t g;
    g.x0 = '0;
    for (int k = 0; k < MAX_DIMS; k++) begin
      g.xk[k]   = '0;
      g.base[k] = d.offset;
    end
    g.row  = d.offset;
    g.last = &at_end(d, g, row_mode);
    return g;
  endfunction

  // One iteration step: the innermost counter that is not at its end is
  // incremented, all inner ones restart, and the block bases below it take the
  // new base (a single stride adder, selected by the active dimension).
  function automatic gen_t gen_step(desc_t d, gen_t g, logic row_mode);
    gen_t n;
    logic [MAX_DIMS:0] e;
    logic done;
    logic [31:0] nb;
    n    = g;
    e    = at_end(d, g, row_mode);
    done = 1'b0;
    if (!e[0]) begin
      n.x0 = g.x0 + 16'd1;
      done = 1'b1;
    end
    for (int k = 0; k < MAX_DIMS; k++) begin
      if (!done && !e[k+1]) begin
        nb      = g.base[k] + {{16{d.stride[k][15]}}, d.stride[k]};
        n.xk[k] = g.xk[k] + 16'd1;
        n.x0    = '0;
        for (int j = 0; j < MAX_DIMS; j++)
          if (j <= k) begin
            n.base[j] = nb;
            if (j < k) n.xk[j] = '0;
          end
        n.row = nb;
        done  = 1'b1;
      end
    end
    n.last = &at_end(d, n, row_mode);
    return n;
  endfunction

  // Current point (address, or start of the contiguous block in row mode).
  function automatic logic [31:0] gen_point(gen_t g);
    return g.row + {16'd0, g.x0};
  endfunction

endpackage
