// pdc: pattern description controller.
//
// Resolves a dynamic descriptor graph held in the descriptor memory into a
// sequence of memory addresses.  It is made of the graph solver unit (GSU,
// this module's control FSM, descriptor stack and graph iterator), one AGU
// (address generation for address-type descriptors) and one DCU (modifier
// chains).
//
// Graph traversal is child-priority: for every point of an offset-type
// descriptor (one that has a `next` child) the whole chain of its children
// (`next`, then each `level` sibling) is solved with that point as the
// relative offset; a descriptor without a child is address-type and is handed
// to the AGU, which adds the relative offset to each of its points.  While
// going down, offset-type descriptors are pushed on the descriptor stack with
// their iteration state, so going up needs no recomputation: the top of the
// stack is simply stepped once (graph iterator, same step function as the
// AGU) or popped when it is exhausted.  Every descriptor, address- or
// offset-type, has its modifier chain applied by the DCU after it has been
// completely solved.  The top-level descriptor may also have `level`
// siblings, which are solved one after the other.
//
// Timing: within an address-type descriptor one address per cycle.  Loading a
// descriptor costs two cycles per 64-bit word and applying a modifier chain
// one cycle per modified field plus one; in this implementation these steps
// run between descriptors instead of overlapping with the AGU (see README).
//
// Interface: start with start_ref/start_off while idle; row_mode makes the
// AGU emit one {address, hsize} item per contiguous block.  Output is a
// valid/ready stream.  done pulses when the whole graph is solved.  err is
// set (until the next start) when the descriptor stack overflows, and the
// traversal is then abandoned.  mem_* is one port of desc_mem.
module pdc
  import pdc_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  ref_t        start_ref,
  input  logic [31:0] start_off,
  input  logic        row_mode,
  output logic        busy,
  output logic        done,
  output logic        err,
  // address stream
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_addr,
  output logic [15:0] out_len,
  // descriptor memory port
  output logic        mem_rd,
  output ref_t        mem_addr,
  input  logic [63:0] mem_rdata,
  output logic        mem_we,
  output ref_t        mem_waddr,
  output logic [63:0] mem_wdata,
  output logic [3:0]  mem_be,
  // statistics
  output logic [15:0] n_desc_solved
);

  typedef enum logic [3:0] {
    S_IDLE, S_LD_A, S_LD_B, S_DEC, S_AGU, S_MOD, S_MODW, S_NEXT, S_POP
  } gstate_e;

  typedef struct packed {
    desc_t       d;
    gen_t        g;
    logic [31:0] rel;
  } frame_t;

  localparam int SPW = $clog2(STACK_DEPTH + 1);
  localparam int SIW = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1;

  gstate_e              st_q;
  ref_t                 cur_ref_q;
  logic [31:0]          cur_rel_q;
  logic                 row_q;
  logic [2:0]           ld_idx_q;
  logic [2:0]           ld_cnt_q;
  logic [MAX_WORDS-1:0][63:0] words_q;
  desc_t                cur_d_q;
  desc_t                fin_d_q;
  logic [31:0]          fin_rel_q;
  frame_t               stack_q [STACK_DEPTH];
  logic [SPW-1:0]       sp_q;

  // ---------------------------------------------------------------- decode
  function automatic logic [15:0] hw(logic [MAX_WORDS-1:0][63:0] w, int unsigned i);
    return w[1 + i/4][16*(i%4) +: 16];
  endfunction

  function automatic desc_t decode(logic [MAX_WORDS-1:0][63:0] w, ref_t r);
    desc_t d;
    int unsigned p;
    d          = '0;
    d.ref_addr = r;
    d.hdr      = header_t'(w[0][63:48]);
    d.hsize    = w[0][47:32];
    d.offset   = w[0][31:0];
    d.level    = REF_NONE;
    d.next     = REF_NONE;
    p = 0;
    for (int k = 0; k < MAX_DIMS; k++)
      if (k < d.hdr.size) begin
        d.stride[k] = hw(w, p);
        d.vsize[k]  = hw(w, p + 1);
        p += 2;
      end
    if (d.hdr.msize != 0) begin
      d.mask = hw(w, p);
      p += 1;
      for (int m = 0; m < MAX_MODS; m++)
        if (m < d.hdr.msize) begin
          d.fmod[m] = hw(w, p);
          p += 1;
        end
    end
    if (d.hdr.graph_p) begin
      d.level = hw(w, p)[15:8];
      d.next  = hw(w, p)[7:0];
    end
    return d;
  endfunction

  desc_t dec_d;
  assign dec_d = decode(words_q, cur_ref_q);

  // number of 64-bit words of the descriptor being loaded, from its header
  logic [2:0] nwords;
  assign nwords = 3'(1 + (desc_hw(header_t'(mem_rdata[63:48])) + 3) / 4);

  // ---------------------------------------------------------------- AGU / DCU
  logic agu_start, agu_busy, agu_done;
  logic dcu_start, dcu_busy, dcu_done;

  agu u_agu (
    .clk, .rst_n,
    .start    (agu_start),
    .desc     (dec_d),
    .rel_base (cur_rel_q),
    .row_mode (row_q),
    .busy     (agu_busy),
    .out_valid, .out_ready, .out_addr, .out_len,
    .out_last (),
    .done     (agu_done)
  );

  dcu u_dcu (
    .clk, .rst_n,
    .start   (dcu_start),
    .desc    (fin_d_q),
    .busy    (dcu_busy),
    .done    (dcu_done),
    .wr_en   (mem_we),
    .wr_addr (mem_waddr),
    .wr_data (mem_wdata),
    .wr_be   (mem_be)
  );

  assign agu_start = (st_q == S_DEC) && !desc_empty(dec_d) &&
                     (!dec_d.hdr.graph_p || dec_d.next == REF_NONE);
  assign dcu_start = (st_q == S_MOD);
  assign mem_rd    = (st_q == S_LD_A);
  assign mem_addr  = cur_ref_q + ref_t'(ld_idx_q);
  assign busy      = (st_q != S_IDLE);

  frame_t top;
  gen_t   top_next;
  assign top      = stack_q[(sp_q == 0) ? '0 : SIW'(sp_q - 1'b1)];
  assign top_next = gen_step(top.d, top.g, 1'b0);

  // ---------------------------------------------------------------- GSU FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= S_IDLE;
      cur_ref_q     <= '0;
      cur_rel_q     <= '0;
      row_q         <= 1'b0;
      ld_idx_q      <= '0;
      ld_cnt_q      <= '0;
      words_q       <= '0;
      cur_d_q       <= '0;
      fin_d_q       <= '0;
      fin_rel_q     <= '0;
      sp_q          <= '0;
      done          <= 1'b0;
      err           <= 1'b0;
      n_desc_solved <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stack_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          cur_ref_q <= start_ref;
          cur_rel_q <= start_off;
          row_q     <= row_mode;
          sp_q      <= '0;
          err       <= 1'b0;
          ld_idx_q  <= '0;
          st_q      <= S_LD_A;
        end
        S_LD_A: st_q <= S_LD_B;
        S_LD_B: begin
          words_q[ld_idx_q] <= mem_rdata;
          if (ld_idx_q == 0) ld_cnt_q <= nwords;
          if ((ld_idx_q == 0 && nwords == 3'd1) ||
              (ld_idx_q != 0 && ld_idx_q + 3'd1 == ld_cnt_q)) begin
            st_q <= S_DEC;
          end else begin
            ld_idx_q <= ld_idx_q + 3'd1;
            st_q     <= S_LD_A;
          end
        end
        S_DEC: begin
          cur_d_q  <= dec_d;
          ld_idx_q <= '0;
          if (desc_empty(dec_d)) begin
            fin_d_q   <= dec_d;
            fin_rel_q <= cur_rel_q;
            st_q      <= S_MOD;
          end else if (!dec_d.hdr.graph_p || dec_d.next == REF_NONE) begin
            st_q <= S_AGU;
          end else if (sp_q == SPW'(STACK_DEPTH)) begin
            err  <= 1'b1;
            done <= 1'b1;
            st_q <= S_IDLE;
          end else begin
            stack_q[SIW'(sp_q)] <= '{d: dec_d, g: gen_init(dec_d, 1'b0), rel: cur_rel_q};
            sp_q          <= sp_q + 1'b1;
            cur_rel_q     <= cur_rel_q + gen_point(gen_init(dec_d, 1'b0));
            cur_ref_q     <= dec_d.next;
            st_q          <= S_LD_A;
          end
        end
        S_AGU: if (agu_done) begin
          fin_d_q   <= cur_d_q;
          fin_rel_q <= cur_rel_q;
          st_q      <= S_MOD;
        end
        S_MOD: st_q <= S_MODW;
        S_MODW: if (dcu_done) begin
          n_desc_solved <= n_desc_solved + 16'd1;
          st_q          <= S_NEXT;
        end
        S_NEXT: begin
          if (fin_d_q.hdr.graph_p && fin_d_q.level != REF_NONE) begin
            cur_ref_q <= fin_d_q.level;
            cur_rel_q <= fin_rel_q;
            ld_idx_q  <= '0;
            st_q      <= S_LD_A;
          end else begin
            st_q <= S_POP;
          end
        end
        S_POP: begin
          if (sp_q == 0) begin
            done <= 1'b1;
            st_q <= S_IDLE;
          end else if (!top.g.last) begin
            stack_q[SIW'(sp_q - 1'b1)].g <= top_next;
            cur_rel_q <= top.rel + gen_point(top_next);
            cur_ref_q <= top.d.next;
            ld_idx_q  <= '0;
            st_q      <= S_LD_A;
          end else begin
            sp_q      <= sp_q - 1'b1;
            fin_d_q   <= top.d;
            fin_rel_q <= top.rel;
            st_q      <= S_MOD;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end


  // the AGU and the DCU are only started when idle
  a_agu_idle: assert property (@(posedge clk) agu_start |-> !agu_busy);
  a_dcu_idle: assert property (@(posedge clk) dcu_start |-> !dcu_busy);


endmodule
