// smc: memory-aware stream management controller.
//
// Turns descriptor-described memory regions into streams for the PEs, and
// stores streams coming from the PEs back to memory.  Stream commands arrive
// from the ring and wait in a small command queue; the controller runs them
// one at a time.  Each command names a pattern descriptor graph in the
// 256 x 64-bit descriptor memory, a base offset, the destination (the PE that
// sent the command, or all PEs) and one of three memory access modes:
//
//   SMC_DIRECT   the streaming PDC's addresses go to memory one word each;
//   SMC_BURST    the streaming PDC runs in row mode and every contiguous block
//                {address, hsize} goes through the burst controller, which
//                issues bursts of up to 256 words;
//   SMC_REORDER  a second, prefetching PDC (row mode, its own descriptor)
//                fetches the region with bursts into the reorder buffer,
//                while the streaming PDC reads the pattern out of that buffer.
//
// Read data go, tagged with destination and stream id, through the stream
// FIFO to the ring.  In store mode (DIRECT only) the PDC's addresses are
// paired with incoming stream words and written to memory one word each;
// the incoming words pass a small FIFO (SIN_DEPTH) so that the ready the ring
// sees never depends on the memory bus.
//
// Memory access bus (shared with the DMA through mem_ctrl): mreq_* carries
// {we, address, length, write data} with valid/ready; read data return in
// order on mr_* with valid/ready.  Writes are single words.
// Descriptor programming: prog_we/prog_addr/prog_data write a whole word
// (meant for a host while the SMC is idle; the PDCs' own write-backs win).
// The document gives the parts and their roles; the command format, the
// queue, the modes as separate commands and the completion rule (all reads
// returned) are this design's choices.
module smc
  import pdc_pkg::*;
  import ring_pkg::*;
  import ics_pkg::*;
#(
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned DESC_DEPTH = 256,
  parameter int unsigned MAX_BURST  = 256,
  parameter int unsigned RB_DEPTH   = 1024,
  parameter int unsigned SFIFO_DEPTH = 8,
  parameter int unsigned CMDQ_DEPTH = 4,
  parameter int unsigned SIN_DEPTH  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // descriptor programming
  input  logic        prog_we,
  input  ref_t        prog_addr,
  input  logic [63:0] prog_data,
  // commands from the ring (two flits: command word, base offset)
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  flit_t       cmd_flit,
  // stream words from the ring to be stored
  input  logic        sin_valid,
  output logic        sin_ready,
  input  flit_t       sin_flit,
  // stream words to the ring
  output logic        sout_valid,
  input  logic        sout_ready,
  output flit_t       sout_flit,
  // memory access bus
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output logic        mreq_we,
  output logic [31:0] mreq_addr,
  output logic [15:0] mreq_len,
  output logic [31:0] mreq_wdata,
  input  logic        mr_valid,
  output logic        mr_ready,
  input  logic [31:0] mr_data,
  // status
  output logic        idle,
  output logic [31:0] n_cmds,
  output logic [31:0] n_bursts,
  output logic [31:0] n_words_out,
  output logic        pdc_err
);

  typedef struct packed {
    smc_cmd_t          c;
    logic [31:0]       base;
    logic [NODE_W-1:0] src;
  } qcmd_t;

  // ------------------------------------------------------------ command queue
  logic [31:0] cmd_w0_q;
  logic        cmd_half_q;
  logic        q_wv, q_wr, q_rv, q_rr;
  qcmd_t       q_in, q_out;
  logic [$clog2(CMDQ_DEPTH+1)-1:0] q_cnt;

  assign q_wv      = cmd_valid && cmd_half_q;
  assign q_in      = '{c: smc_cmd_t'(cmd_w0_q), base: cmd_flit.data, src: cmd_flit.src};
  assign cmd_ready = !cmd_half_q || q_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_half_q <= 1'b0;
      cmd_w0_q   <= '0;
    end else if (cmd_valid && cmd_ready) begin
      cmd_half_q <= !cmd_half_q;
      if (!cmd_half_q) cmd_w0_q <= cmd_flit.data;
    end
  end

  sfifo #(.T(qcmd_t), .DEPTH(CMDQ_DEPTH)) u_cmdq (
    .clk, .rst_n,
    .wr_valid (q_wv), .wr_ready (q_wr), .wr_data (q_in),
    .rd_valid (q_rv), .rd_ready (q_rr), .rd_data (q_out),
    .count    (q_cnt)
  );

  // ------------------------------------------------------------ sequencing
  typedef enum logic [1:0] {M_IDLE, M_START, M_RUN} mstate_e;
  mstate_e     ms_q;
  qcmd_t       cur_q;
  logic        main_done_q, pref_done_q;
  logic [31:0] outstanding_q;

  assign q_rr = (ms_q == M_IDLE) && q_rv;

  // ------------------------------------------------------------ descriptor memory and PDCs
  logic        a_rd, a_we, b_rd, b_we;
  ref_t        a_addr, a_waddr, b_addr, b_waddr;
  logic [63:0] a_rdata, a_wdata, b_rdata, b_wdata;
  logic [3:0]  a_be, b_be;

  desc_mem #(.DEPTH(DESC_DEPTH)) u_desc_mem (
    .clk,
    .a_rd, .a_addr (a_addr[$clog2(DESC_DEPTH)-1:0]), .a_rdata,
    .a_we (a_we | prog_we),
    .a_waddr (a_we ? a_waddr[$clog2(DESC_DEPTH)-1:0] : prog_addr[$clog2(DESC_DEPTH)-1:0]),
    .a_wdata (a_we ? a_wdata : prog_data), .a_be (a_we ? a_be : 4'hF),
    .b_rd, .b_addr (b_addr[$clog2(DESC_DEPTH)-1:0]), .b_rdata,
    .b_we, .b_waddr (b_waddr[$clog2(DESC_DEPTH)-1:0]), .b_wdata, .b_be
  );

  logic        m_start, m_busy, m_done, m_err, m_valid, m_ready;
  logic [31:0] m_addr;
  logic [15:0] m_len, m_nsolved;
  logic        p_start, p_busy, p_done, p_err, p_valid, p_ready;
  logic [31:0] p_addr;
  logic [15:0] p_len, p_nsolved;

  pdc u_pdc (
    .clk, .rst_n,
    .start (m_start), .start_ref (cur_q.c.ref_addr), .start_off (cur_q.base),
    .row_mode (cur_q.c.mode == SMC_BURST),
    .busy (m_busy), .done (m_done), .err (m_err),
    .out_valid (m_valid), .out_ready (m_ready), .out_addr (m_addr), .out_len (m_len),
    .mem_rd (a_rd), .mem_addr (a_addr), .mem_rdata (a_rdata),
    .mem_we (a_we), .mem_waddr (a_waddr), .mem_wdata (a_wdata), .mem_be (a_be),
    .n_desc_solved (m_nsolved)
  );

  pdc u_pref_pdc (
    .clk, .rst_n,
    .start (p_start), .start_ref (cur_q.c.pref_ref), .start_off (cur_q.base),
    .row_mode (1'b1),
    .busy (p_busy), .done (p_done), .err (p_err),
    .out_valid (p_valid), .out_ready (p_ready), .out_addr (p_addr), .out_len (p_len),
    .mem_rd (b_rd), .mem_addr (b_addr), .mem_rdata (b_rdata),
    .mem_we (b_we), .mem_waddr (b_waddr), .mem_wdata (b_wdata), .mem_be (b_be),
    .n_desc_solved (p_nsolved)
  );

  assign m_start = (ms_q == M_START);
  assign p_start = (ms_q == M_START) && cur_q.c.mode == SMC_REORDER;
  assign pdc_err = m_err | p_err;

  // ------------------------------------------------------------ burst controller
  logic        bc_req_v, bc_req_r, bc_v, bc_r, bc_idle;
  logic [31:0] bc_req_a, bc_a;
  logic [15:0] bc_req_l, bc_l;
  logic        mode_burst, mode_reorder, mode_direct, mode_store;

  assign mode_burst   = (cur_q.c.mode == SMC_BURST);
  assign mode_reorder = (cur_q.c.mode == SMC_REORDER);
  assign mode_direct  = !mode_burst && !mode_reorder;
  assign mode_store   = cur_q.c.store && mode_direct;

  assign bc_req_v = (ms_q == M_RUN) && (mode_burst ? m_valid : (mode_reorder && p_valid));
  assign bc_req_a = mode_burst ? m_addr : p_addr;
  assign bc_req_l = mode_burst ? m_len  : p_len;
  assign p_ready  = mode_reorder && bc_req_r;

  burst_ctrl #(.MAX_BURST(MAX_BURST)) u_burst (
    .clk, .rst_n,
    .req_valid (bc_req_v), .req_ready (bc_req_r), .req_addr (bc_req_a), .req_len (bc_req_l),
    .burst_valid (bc_v), .burst_ready (bc_r), .burst_addr (bc_a), .burst_len (bc_l),
    .idle (bc_idle)
  );

  // ------------------------------------------------------------ reorder buffer
  logic        rb_rd_v, rb_rd_r, rb_out_v, rb_out_r;
  logic [31:0] rb_out_d, rb_hit, rb_wait, fill_addr_q;
  logic        fill_v;

  reorder_buf #(.DEPTH(RB_DEPTH)) u_rob (
    .clk, .rst_n,
    .clear (ms_q == M_START),
    .fill_valid (fill_v), .fill_addr (fill_addr_q), .fill_data (mr_data),
    .rd_base ('0), .rd_valid (rb_rd_v), .rd_ready (rb_rd_r), .rd_off (m_addr),
    .out_valid (rb_out_v), .out_ready (rb_out_r), .out_data (rb_out_d),
    .n_hit (rb_hit), .n_wait (rb_wait)
  );

  assign rb_rd_v = (ms_q == M_RUN) && mode_reorder && m_valid;

  // ------------------------------------------------------------ memory requests
  logic direct_rd_v;
  assign direct_rd_v = (ms_q == M_RUN) && mode_direct && !mode_store && m_valid;


  // stream words to be stored wait in a small FIFO, so that the ring sees a
  // ready that depends only on the FIFO fill and never on the memory bus
  logic  si_valid, si_ready;
  flit_t si_flit;
  logic [$clog2(SIN_DEPTH+1)-1:0] si_cnt;
  sfifo #(.T(flit_t), .DEPTH(SIN_DEPTH)) u_sin_fifo (
    .clk, .rst_n,
    .wr_valid (sin_valid), .wr_ready (sin_ready), .wr_data (sin_flit),
    .rd_valid (si_valid),  .rd_ready (si_ready),  .rd_data (si_flit),
    .count    (si_cnt)
  );

  always_comb begin
    mreq_valid = 1'b0;
    mreq_we    = 1'b0;
    mreq_addr  = m_addr;
    mreq_len   = 16'd1;
    mreq_wdata = si_flit.data;
    if (ms_q == M_RUN) begin
      if (mode_store) begin
        mreq_valid = m_valid && si_valid;
        mreq_we    = 1'b1;
      end else if (mode_direct) begin
        mreq_valid = m_valid;
      end else begin
        mreq_valid = bc_v;
        mreq_addr  = bc_a;
        mreq_len   = bc_l;
      end
    end
  end

  assign bc_r      = (ms_q == M_RUN) && !mode_direct && mreq_ready;
  assign si_ready  = (ms_q == M_RUN) && mode_store && m_valid && mreq_ready;
  assign m_ready   = (ms_q == M_RUN) &&
                     (mode_burst   ? bc_req_r :
                      mode_reorder ? rb_rd_r  :
                      mode_store   ? (si_valid && mreq_ready) : mreq_ready);

  // ------------------------------------------------------------ stream FIFO
  flit_t sf_in;
  logic  sf_wv, sf_wr;
  logic [$clog2(SFIFO_DEPTH+1)-1:0] sf_cnt;

  always_comb begin
    sf_in       = '0;
    sf_in.src   = NODE_W'(NODE_ID);
    sf_in.dst   = cur_q.src;
    sf_in.bcast = cur_q.c.bcast;
    sf_in.mtype = MSG_STREAM;
    sf_in.sid   = cur_q.c.sid;
    sf_in.last  = 1'b1;
    sf_in.data  = mode_reorder ? rb_out_d : mr_data;
  end
  assign sf_wv    = mode_reorder ? rb_out_v : (mr_valid && !mode_reorder);
  assign rb_out_r = mode_reorder && sf_wr;
  assign fill_v   = mode_reorder && mr_valid;
  assign mr_ready = mode_reorder ? 1'b1 : sf_wr;

  sfifo #(.T(flit_t), .DEPTH(SFIFO_DEPTH)) u_stream_fifo (
    .clk, .rst_n,
    .wr_valid (sf_wv), .wr_ready (sf_wr), .wr_data (sf_in),
    .rd_valid (sout_valid), .rd_ready (sout_ready), .rd_data (sout_flit),
    .count (sf_cnt)
  );

  // ------------------------------------------------------------ control
  logic req_fire, rd_word;
  assign req_fire = mreq_valid && mreq_ready && !mreq_we;
  assign rd_word  = mr_valid && mr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms_q          <= M_IDLE;
      cur_q         <= '0;
      main_done_q   <= 1'b0;
      pref_done_q   <= 1'b0;
      outstanding_q <= '0;
      fill_addr_q   <= '0;
      n_cmds        <= '0;
      n_bursts      <= '0;
      n_words_out   <= '0;
    end else begin
      outstanding_q <= outstanding_q + (req_fire ? 32'(mreq_len) : 32'd0) - (rd_word ? 32'd1 : 32'd0);
      if (req_fire && mreq_len > 16'd1) n_bursts <= n_bursts + 1;
      if (sout_valid && sout_ready) n_words_out <= n_words_out + 1;
      if (req_fire) fill_addr_q <= mreq_addr;
      else if (fill_v) fill_addr_q <= fill_addr_q + 1;
      unique case (ms_q)
        M_IDLE: if (q_rv) begin
          cur_q <= q_out;
          ms_q  <= M_START;
        end
        M_START: begin
          main_done_q <= 1'b0;
          pref_done_q <= (cur_q.c.mode != SMC_REORDER);
          n_cmds      <= n_cmds + 1;
          ms_q        <= M_RUN;
        end
        M_RUN: begin
          if (m_done) main_done_q <= 1'b1;
          if (p_done) pref_done_q <= 1'b1;
          if (main_done_q && pref_done_q && bc_idle && outstanding_q == 0 &&
              !rb_out_v && !m_busy && !p_busy)
            ms_q <= M_IDLE;
        end
        default: ms_q <= M_IDLE;
      endcase
    end
  end

  assign idle = (ms_q == M_IDLE) && !q_rv && !sout_valid;

endmodule
