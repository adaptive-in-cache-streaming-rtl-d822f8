// tb_ics_top: end-to-end test of the whole system on a reduced ring of four
// PEs (plus the memory controller node), with the DDR3 model on the memory
// access bus.  The PE programs, checks and mechanism counts are in
// ics_top_env.svh.
module tb_ics_top;
  import pdc_pkg::*;
  import ring_pkg::*;
  import ics_pkg::*;
  import tb_desc_pkg::*;

  localparam int NP = 4;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset

  logic   [NP-1:0]       pe_req = '0, pe_ready, pe_rsp_valid;
  pe_op_e [NP-1:0]       pe_op;
  logic   [NP-1:0][31:0] pe_addr, pe_wdata, pe_rdata;
  logic   [NP-1:0][7:0]  pe_sid;
  logic   [NP-1:0][3:0]  way_stream;
  logic                  prog_we = 0;
  ref_t                  prog_addr = '0;
  logic   [63:0]         prog_data = '0;
  logic                  mreq_valid, mreq_ready, mreq_we, mr_valid, mr_ready;
  logic   [31:0]         mreq_addr, mreq_wdata, mr_data;
  logic   [15:0]         mreq_len;
  logic                  smc_idle, pdc_err;
  logic   [31:0]         n_cmds, n_bursts, n_dma_reads;
  logic   [NP:0][31:0]   n_ring_conflicts;
  logic   [NP-1:0][31:0] n_hit, n_miss;
  int unsigned           n_req, n_words;

  ics_top #(.N_PES(NP)) u_dut (.*);

  ddr_model #(.WORDS(1 << 14)) u_ddr (
    .clk, .rst_n, .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data, .n_req, .n_words);


`include "ics_top_env.svh"

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
