// ics_top: morphable in-cache streaming communication infrastructure.
//
// N_PES processing elements each reach the system through an in-cache stream
// controller (icsc), whose 4-way cache can serve as a cache, as stream
// buffers, or as both at once.  The controllers and the hybrid main memory
// controller (mem_ctrl: DMA + stream management controller) are joined by a
// bidirectional ring of ring_node instances: node i (0 <= i < N_PES) serves
// PE i and node N_PES serves the memory controller.  The PEs themselves and
// the external memory are outside this module: each PE's request port and
// the memory access bus are ports of the top.
//
// PE ports are arrays indexed by PE number; see icsc for the operations.
// The memory access bus expects a memory that takes one request at a time
// (mreq_*) and returns read data in order (mr_*).  prog_* writes the
// descriptor memory.  n_hit/n_miss are the cache hit and miss counts of each
// controller.  Default size: 64 PEs, the largest configuration the
// document evaluates.
//
// Lint notes: the ring links are packed arrays indexed by node, so a linter
// that tracks whole vectors reports a combinational loop (UNOPTFLAT) through
// them.  The loop is not real: no node's ready depends on its own valid
// through a neighbour; each bit is driven by a different node.
module ics_top
  import pdc_pkg::*;
  import ring_pkg::*;
  import ics_pkg::*;
#(
  parameter int unsigned N_PES      = 64,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned SETS       = 32,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned N_STREAMS  = 8,
  parameter int unsigned MAX_BURST  = 256,
  parameter int unsigned RB_DEPTH   = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processing elements
  input  logic   [N_PES-1:0]    pe_req,
  output logic   [N_PES-1:0]    pe_ready,
  input  pe_op_e [N_PES-1:0]    pe_op,
  input  logic   [N_PES-1:0][31:0] pe_addr,
  input  logic   [N_PES-1:0][31:0] pe_wdata,
  input  logic   [N_PES-1:0][7:0]  pe_sid,
  output logic   [N_PES-1:0]    pe_rsp_valid,
  output logic   [N_PES-1:0][31:0] pe_rdata,
  output logic   [N_PES-1:0][WAYS-1:0] way_stream,
  // descriptor memory programming
  input  logic                  prog_we,
  input  ref_t                  prog_addr,
  input  logic   [63:0]         prog_data,
  // memory access bus
  output logic                  mreq_valid,
  input  logic                  mreq_ready,
  output logic                  mreq_we,
  output logic   [31:0]         mreq_addr,
  output logic   [15:0]         mreq_len,
  output logic   [31:0]         mreq_wdata,
  input  logic                  mr_valid,
  output logic                  mr_ready,
  input  logic   [31:0]         mr_data,
  // status
  output logic                  smc_idle,
  output logic   [31:0]         n_cmds,
  output logic   [31:0]         n_bursts,
  output logic   [31:0]         n_dma_reads,
  output logic                  pdc_err,
  output logic   [N_PES:0][31:0] n_ring_conflicts,
  output logic   [N_PES-1:0][31:0] n_hit,
  output logic   [N_PES-1:0][31:0] n_miss
);

  localparam int unsigned N_NODES = N_PES + 1;

  // per node: port 0 local, 1 left, 2 right
  logic  [N_NODES-1:0][2:0] in_v, in_r, out_v, out_r;
  flit_t [N_NODES-1:0][2:0] in_f, out_f;

  for (genvar n = 0; n < N_NODES; n++) begin : g_ring
    localparam int unsigned L = (n + N_NODES - 1) % N_NODES;
    localparam int unsigned R = (n + 1) % N_NODES;

    ring_node #(.N_NODES(N_NODES), .NODE_ID(n)) u_node (
      .clk, .rst_n,
      .in_valid (in_v[n]), .in_ready (in_r[n]), .in_flit (in_f[n]),
      .out_valid (out_v[n]), .out_ready (out_r[n]), .out_flit (out_f[n]),
      .n_conflicts (n_ring_conflicts[n])
    );

    // from the left neighbour's right output, from the right neighbour's left output
    assign in_v[n][1] = out_v[L][2];
    assign in_f[n][1] = out_f[L][2];
    assign out_r[L][2] = in_r[n][1];
    assign in_v[n][2] = out_v[R][1];
    assign in_f[n][2] = out_f[R][1];
    assign out_r[R][1] = in_r[n][2];
  end

  for (genvar p = 0; p < N_PES; p++) begin : g_pe
    icsc #(.WAYS(WAYS), .SETS(SETS), .LINE_WORDS(LINE_WORDS), .N_STREAMS(N_STREAMS),
           .NODE_ID(p), .MEM_NODE(N_PES)) u_icsc (
      .clk, .rst_n,
      .pe_req (pe_req[p]), .pe_ready (pe_ready[p]), .pe_op (pe_op[p]),
      .pe_addr (pe_addr[p]), .pe_wdata (pe_wdata[p]), .pe_sid (pe_sid[p]),
      .pe_rsp_valid (pe_rsp_valid[p]), .pe_rdata (pe_rdata[p]),
      .net_in_valid (out_v[p][0]), .net_in_ready (out_r[p][0]), .net_in_flit (out_f[p][0]),
      .net_out_valid (in_v[p][0]), .net_out_ready (in_r[p][0]), .net_out_flit (in_f[p][0]),
      .way_stream (way_stream[p]), .n_hit (n_hit[p]), .n_miss (n_miss[p])
    );
  end

  mem_ctrl #(.NODE_ID(N_PES), .LINE_WORDS(LINE_WORDS), .MAX_BURST(MAX_BURST),
             .RB_DEPTH(RB_DEPTH)) u_mem_ctrl (
    .clk, .rst_n,
    .prog_we, .prog_addr, .prog_data,
    .net_in_valid (out_v[N_PES][0]), .net_in_ready (out_r[N_PES][0]),
    .net_in_flit (out_f[N_PES][0]),
    .net_out_valid (in_v[N_PES][0]), .net_out_ready (in_r[N_PES][0]),
    .net_out_flit (in_f[N_PES][0]),
    .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data,
    .smc_idle, .n_cmds, .n_bursts, .n_dma_reads, .pdc_err
  );

endmodule
