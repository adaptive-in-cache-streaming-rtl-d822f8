// mem_ctrl: hybrid main memory controller.
//
// Joins the address-based DMA and the stream management controller (SMC)
// behind one ring port and one memory access bus.  Incoming flits are sorted
// by kind: cache line reads and stores go to the DMA, stream commands and
// streams to be stored go to the SMC.  Outgoing flits of the two are merged;
// a multi-flit message keeps the ring port until its last flit.  The memory
// bus is given to one master for a whole transaction (request and, for a
// read, every returned word), alternating between the two when both wait.
//
// Interface: ring port net_*; memory access bus mreq_*/mr_* (see smc);
// prog_* programs the descriptor memory.  Which master owns the bus and how
// ties are broken are this design's choices.
module mem_ctrl
  import pdc_pkg::*;
  import ring_pkg::*;
#(
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned MAX_BURST  = 256,
  parameter int unsigned RB_DEPTH   = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  ref_t        prog_addr,
  input  logic [63:0] prog_data,
  input  logic        net_in_valid,
  output logic        net_in_ready,
  input  flit_t       net_in_flit,
  output logic        net_out_valid,
  input  logic        net_out_ready,
  output flit_t       net_out_flit,
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output logic        mreq_we,
  output logic [31:0] mreq_addr,
  output logic [15:0] mreq_len,
  output logic [31:0] mreq_wdata,
  input  logic        mr_valid,
  output logic        mr_ready,
  input  logic [31:0] mr_data,
  output logic        smc_idle,
  output logic [31:0] n_cmds,
  output logic [31:0] n_bursts,
  output logic [31:0] n_dma_reads,
  output logic        pdc_err
);

  typedef enum logic [1:0] {O_NONE, O_DMA, O_SMC} owner_e;
  owner_e      own_q;       // memory bus owner for the current transaction

  // ------------------------------------------------------------ ring input
  logic to_dma, to_cmd, to_sin;
  logic d_in_r, c_in_r, s_in_r;
  assign to_dma = net_in_flit.mtype == MSG_RD_REQ || net_in_flit.mtype == MSG_WR_REQ;
  assign to_cmd = net_in_flit.mtype == MSG_SMC_CMD;
  assign to_sin = net_in_flit.mtype == MSG_STREAM;
  assign net_in_ready = to_dma ? d_in_r : to_cmd ? c_in_r : to_sin ? s_in_r : 1'b1;

  // ------------------------------------------------------------ masters
  logic        d_ov, d_or, s_ov, s_or;
  flit_t       d_of, s_of;
  logic        d_mv, d_mr, d_mwe, s_mv, s_mr, s_mwe;
  logic [31:0] d_ma, d_mwd, s_ma, s_mwd;
  logic [15:0] d_ml, s_ml;
  logic        d_rr, s_rr;
  logic [31:0] n_dma_writes, n_words_out;

  dma #(.NODE_ID(NODE_ID), .LINE_WORDS(LINE_WORDS)) u_dma (
    .clk, .rst_n,
    .net_in_valid (net_in_valid && to_dma), .net_in_ready (d_in_r), .net_in_flit,
    .net_out_valid (d_ov), .net_out_ready (d_or), .net_out_flit (d_of),
    .mreq_valid (d_mv), .mreq_ready (d_mr), .mreq_we (d_mwe), .mreq_addr (d_ma),
    .mreq_len (d_ml), .mreq_wdata (d_mwd),
    .mr_valid (mr_valid && own_q == O_DMA), .mr_ready (d_rr), .mr_data,
    .n_reads (n_dma_reads), .n_writes (n_dma_writes)
  );

  smc #(.NODE_ID(NODE_ID), .MAX_BURST(MAX_BURST), .RB_DEPTH(RB_DEPTH)) u_smc (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_data,
    .cmd_valid (net_in_valid && to_cmd), .cmd_ready (c_in_r), .cmd_flit (net_in_flit),
    .sin_valid (net_in_valid && to_sin), .sin_ready (s_in_r), .sin_flit (net_in_flit),
    .sout_valid (s_ov), .sout_ready (s_or), .sout_flit (s_of),
    .mreq_valid (s_mv), .mreq_ready (s_mr), .mreq_we (s_mwe), .mreq_addr (s_ma),
    .mreq_len (s_ml), .mreq_wdata (s_mwd),
    .mr_valid (mr_valid && own_q == O_SMC), .mr_ready (s_rr), .mr_data,
    .idle (smc_idle), .n_cmds, .n_bursts, .n_words_out, .pdc_err
  );

  // ------------------------------------------------------------ ring output merge
  logic out_lock_q, out_sel_q;   // sel 0 = DMA, 1 = SMC
  logic sel;
  assign sel = out_lock_q ? out_sel_q : !d_ov;
  assign net_out_valid = sel ? s_ov : d_ov;
  assign net_out_flit  = sel ? s_of : d_of;
  assign d_or = !sel && net_out_ready;
  assign s_or =  sel && net_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_lock_q <= 1'b0;
      out_sel_q  <= 1'b0;
    end else if (net_out_valid && net_out_ready) begin
      out_lock_q <= !net_out_flit.last;
      out_sel_q  <= sel;
    end
  end

  // ------------------------------------------------------------ memory bus arbiter
  logic        last_smc_q;
  logic [15:0] left_q;
  logic        pick_smc;

  assign pick_smc = s_mv && (!d_mv || !last_smc_q);

  always_comb begin
    mreq_valid = 1'b0;
    mreq_we    = 1'b0;
    mreq_addr  = '0;
    mreq_len   = '0;
    mreq_wdata = '0;
    d_mr       = 1'b0;
    s_mr       = 1'b0;
    if (own_q == O_NONE) begin
      if (pick_smc) begin
        mreq_valid = 1'b1; mreq_we = s_mwe; mreq_addr = s_ma; mreq_len = s_ml;
        mreq_wdata = s_mwd; s_mr = mreq_ready;
      end else if (d_mv) begin
        mreq_valid = 1'b1; mreq_we = d_mwe; mreq_addr = d_ma; mreq_len = d_ml;
        mreq_wdata = d_mwd; d_mr = mreq_ready;
      end
    end
  end
  assign mr_ready = (own_q == O_DMA) ? d_rr : (own_q == O_SMC) ? s_rr : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q      <= O_NONE;
      last_smc_q <= 1'b0;
      left_q     <= '0;
    end else begin
      if (mreq_valid && mreq_ready) begin
        last_smc_q <= pick_smc;
        if (!mreq_we) begin
          own_q  <= pick_smc ? O_SMC : O_DMA;
          left_q <= mreq_len;
        end
      end else if (mr_valid && mr_ready) begin
        left_q <= left_q - 16'd1;
        if (left_q == 16'd1) own_q <= O_NONE;
      end
    end
  end

endmodule
