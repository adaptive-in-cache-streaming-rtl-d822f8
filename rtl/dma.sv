// dma: address-based DMA of the main memory controller.
//
// Serves the memory-addressed traffic of the PEs' caches: a line read request
// from the ring becomes one memory read of LINE_WORDS words, streamed back to
// the requesting node as a multi-flit response; a write-through store (two
// flits: address, data) becomes a single-word memory write.  Requests are
// served one at a time, in arrival order.
//
// Interface: net_in_* receives the flits meant for the DMA, net_out_* sends
// responses; the memory bus is the same as the SMC's (mreq_* with valid/ready,
// read data in order on mr_*).  The document names the module and its role;
// the message handling is this design's.
module dma
  import ring_pkg::*;
#(
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned LINE_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
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
  output logic [31:0] n_reads,
  output logic [31:0] n_writes
);

  typedef enum logic [2:0] {D_IDLE, D_RREQ, D_RDATA, D_WDATA, D_WREQ} dstate_e;

  dstate_e           st_q;
  logic [31:0]       addr_q, wdata_q;
  logic [NODE_W-1:0] src_q;
  logic [15:0]       left_q;

  assign net_in_ready = (st_q == D_IDLE) || (st_q == D_WDATA);

  assign mreq_valid = (st_q == D_RREQ) || (st_q == D_WREQ);
  assign mreq_we    = (st_q == D_WREQ);
  assign mreq_addr  = addr_q;
  assign mreq_len   = (st_q == D_WREQ) ? 16'd1 : 16'(LINE_WORDS);
  assign mreq_wdata = wdata_q;

  assign mr_ready      = (st_q == D_RDATA) && net_out_ready;
  assign net_out_valid = (st_q == D_RDATA) && mr_valid;
  always_comb begin
    net_out_flit       = '0;
    net_out_flit.src   = NODE_W'(NODE_ID);
    net_out_flit.dst   = src_q;
    net_out_flit.mtype = MSG_RD_RSP;
    net_out_flit.last  = (left_q == 16'd1);
    net_out_flit.data  = mr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= D_IDLE;
      addr_q   <= '0;
      wdata_q  <= '0;
      src_q    <= '0;
      left_q   <= '0;
      n_reads  <= '0;
      n_writes <= '0;
    end else begin
      unique case (st_q)
        D_IDLE: if (net_in_valid) begin
          addr_q <= net_in_flit.data;
          src_q  <= net_in_flit.src;
          if (net_in_flit.mtype == MSG_RD_REQ)      st_q <= D_RREQ;
          else if (net_in_flit.mtype == MSG_WR_REQ) st_q <= D_WDATA;
        end
        D_RREQ: if (mreq_ready) begin
          left_q  <= 16'(LINE_WORDS);
          n_reads <= n_reads + 1;
          st_q    <= D_RDATA;
        end
        D_RDATA: if (mr_valid && mr_ready) begin
          left_q <= left_q - 16'd1;
          if (left_q == 16'd1) st_q <= D_IDLE;
        end
        D_WDATA: if (net_in_valid) begin
          wdata_q <= net_in_flit.data;
          st_q    <= D_WREQ;
        end
        D_WREQ: if (mreq_ready) begin
          n_writes <= n_writes + 1;
          st_q     <= D_IDLE;
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

endmodule
