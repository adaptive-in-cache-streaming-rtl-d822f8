// tb_mem_ctrl: self-checking test of the hybrid memory controller with the
// DDR3 model.  A burst-mode stream command (256 words) and a cache line read
// arrive together; both must complete with correct data, the line response
// must not be interleaved with stream flits, and a line read and a stream
// store issued together must both reach memory through the shared bus.
module tb_mem_ctrl;
  import pdc_pkg::*;
  import ring_pkg::*;
  import ics_pkg::*;
  import tb_desc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  int checks = 0, failures = 0;

  logic        prog_we = 0;
  ref_t        prog_addr = '0;
  logic [63:0] prog_data = '0;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t       in_flit, out_flit;
  logic        mreq_valid, mreq_ready, mreq_we, mr_valid, mr_ready, smc_idle, pdc_err;
  logic [31:0] mreq_addr, mreq_wdata, mr_data, n_cmds, n_bursts, n_dma_reads;
  logic [15:0] mreq_len;
  int unsigned n_req, n_words;

  mem_ctrl #(.NODE_ID(4)) u_dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .net_in_valid(in_valid), .net_in_ready(in_ready), .net_in_flit(in_flit),
    .net_out_valid(out_valid), .net_out_ready(out_ready), .net_out_flit(out_flit),
    .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data, .smc_idle, .n_cmds, .n_bursts, .n_dma_reads, .pdc_err);

  ddr_model #(.WORDS(1 << 13)) u_ddr (
    .clk, .rst_n, .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data, .n_req, .n_words);

  function automatic logic [31:0] mw(int a);
    return 32'(a) * 32'h9E37_79B1 + 32'd12345;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t got[$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_flit);

  task automatic put(int r, word_q_t w);
    foreach (w[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = ref_t'(r + i); prog_data = w[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic send(int src, msg_e t, int data, bit last);
    @(negedge clk);
    in_valid = 1; in_flit = '0; in_flit.src = 8'(src); in_flit.dst = 8'd4;
    in_flit.mtype = t; in_flit.data = 32'(data); in_flit.last = last;
    #1; while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  smc_cmd_t c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    put(0, encode(0, 256, '{}, '{}, 0, '{}, 0, 255, 255));
    c = '{mode: SMC_BURST, store: 1'b0, bcast: 1'b0, rsv: '0, pref_ref: 8'd0, ref_addr: 8'd0, sid: 8'd6};
    send(2, MSG_SMC_CMD, c, 0);
    send(2, MSG_SMC_CMD, 1024, 1);
    send(1, MSG_RD_REQ, 64, 1);
    repeat (10) @(posedge clk);
    while (!smc_idle) @(posedge clk);
    repeat (100) @(posedge clk);
    begin
      int ns, nr, run_start, bad;
      ns = 0; nr = 0; bad = 0; run_start = -1;
      foreach (got[i]) begin
        if (got[i].mtype == MSG_STREAM) begin
          if (got[i].data !== mw(1024 + ns) || got[i].dst != 2 || got[i].sid != 6) bad++;
          ns++;
        end else if (got[i].mtype == MSG_RD_RSP) begin
          if (run_start < 0) run_start = i;
          if (i != run_start + nr) bad++;           // contiguous
          if (got[i].data !== mw(64 + nr) || got[i].dst != 1) bad++;
          nr++;
        end else bad++;
      end
      chk(ns == 256, $sformatf("%0d stream words", ns));
      chk(nr == 16, $sformatf("%0d line words", nr));
      chk(bad == 0, $sformatf("%0d wrong flits", bad));
    end
    chk(n_cmds == 1 && n_dma_reads == 1 && !pdc_err, "counters");

    // store stream of 8 words plus a concurrent line read
    got.delete();
    put(2, encode(0, 8, '{}, '{}, 0, '{}, 0, 255, 255));
    c = '{mode: SMC_DIRECT, store: 1'b1, bcast: 1'b0, rsv: '0, pref_ref: 8'd0, ref_addr: 8'd2, sid: 8'd1};
    send(2, MSG_SMC_CMD, c, 0);
    send(2, MSG_SMC_CMD, 3000, 1);
    send(3, MSG_RD_REQ, 128, 1);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      in_valid = 1; in_flit = '0; in_flit.src = 8'd2; in_flit.dst = 8'd4; in_flit.mtype = MSG_STREAM;
      in_flit.sid = 8'd1; in_flit.data = 32'h5500_0000 + i; in_flit.last = 1;
      #1; while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    while (!smc_idle) @(posedge clk);
    repeat (100) @(posedge clk);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 8; i++) if (u_ddr.mem[3000 + i] !== 32'h5500_0000 + i) bad++;
      chk(bad == 0, "stream stored");
    end
    chk(got.size() == 16 && got[15].last, "line read during store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
