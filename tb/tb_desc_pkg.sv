// tb_desc_pkg: testbench-side descriptor encoder.
//
// Builds the 64-bit words of one descriptor in the descriptor memory layout:
// word 0 = {header, hsize, offset}; then the 16-bit fields stride_1, vsize_1,
// ..., [target mask, fmods], [{level,next}], four per word from the low lane.
// Header = {size[2:0], msize[1:0], iter[9:0], graph_p}.  Reference 255 = none.
package tb_desc_pkg;

  typedef logic [63:0] word_q_t[$];

  function automatic word_q_t encode(int offset, int hsize, int strides[$], int vsizes[$],
                                     int mask, int fmods[$], int iter, int level, int next);
    word_q_t w;
    logic [15:0] h[$];
    logic [15:0] hdr;
    logic graph;
    logic [63:0] cur;
    graph = (level != 255) || (next != 255);
    hdr = {3'(strides.size()), 2'(fmods.size()), 10'(iter), graph};
    w.push_back({hdr, 16'(hsize), 32'(offset)});
    foreach (strides[i]) begin
      h.push_back(16'(strides[i]));
      h.push_back(16'(vsizes[i]));
    end
    if (fmods.size() != 0) begin
      h.push_back(16'(mask));
      foreach (fmods[i]) h.push_back(16'(fmods[i]));
    end
    if (graph) h.push_back({8'(level), 8'(next)});
    cur = '0;
    foreach (h[i]) begin
      cur[16*(i%4) +: 16] = h[i];
      if (i % 4 == 3 || i == h.size() - 1) begin
        w.push_back(cur);
        cur = '0;
      end
    end
    return w;
  endfunction

  // Target mask bits: offset, hsize, stride_k, vsize_k (k from 1).
  localparam int M_OFFSET = 1;
  localparam int M_HSIZE  = 2;
  function automatic int m_stride(int k); return 1 << (2*k);     endfunction
  function automatic int m_vsize(int k);  return 1 << (2*k + 1); endfunction

endpackage
