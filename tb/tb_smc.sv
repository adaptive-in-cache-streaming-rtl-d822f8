// tb_smc: self-checking test of the stream management controller with a
// behavioural DDR model (20-cycle overhead per request).
//  A. linear 1024-word region in burst mode: 4 bursts of 256 words, stream
//     data in address order, throughput above 0.9 words/cycle
//  B. 8x8 zig-zag in direct mode: 64 single-word requests, data in zig-zag order
//  C. the same zig-zag in reorder mode: the block is prefetched with eight
//     8-word bursts and read out of the reorder buffer in zig-zag order
//  D. store: 16 incoming stream words written to a linear region
module tb_smc;
  import pdc_pkg::*;
  import ring_pkg::*;
  import ics_pkg::*;
  import tb_desc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        prog_we = 0;
  ref_t        prog_addr = '0;
  logic [63:0] prog_data = '0;
  logic        cmd_valid = 0, cmd_ready;
  flit_t       cmd_flit = '0;
  logic        sin_valid = 0, sin_ready;
  flit_t       sin_flit = '0;
  logic        sout_valid, sout_ready;
  flit_t       sout_flit;
  logic        mreq_valid, mreq_ready, mreq_we, mr_valid, mr_ready;
  logic [31:0] mreq_addr, mreq_wdata, mr_data;
  logic [15:0] mreq_len;
  logic        idle, pdc_err;
  logic [31:0] n_cmds, n_bursts, n_words_out;
  int unsigned n_req, n_words;

  smc #(.NODE_ID(4)) u_dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .cmd_valid, .cmd_ready, .cmd_flit, .sin_valid, .sin_ready, .sin_flit,
    .sout_valid, .sout_ready, .sout_flit,
    .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data,
    .idle, .n_cmds, .n_bursts, .n_words_out, .pdc_err
  );

  ddr_model #(.WORDS(1 << 14)) u_ddr (
    .clk, .rst_n, .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data, .n_req, .n_words
  );

  function automatic logic [31:0] mw(int a);
    return 32'(a) * 32'h9E37_79B1 + 32'd12345;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign sout_ready = 1'b1;
  logic [31:0] got[$];
  always @(posedge clk) if (sout_valid && sout_ready) got.push_back(sout_flit.data);

  task automatic put(int r, word_q_t w);
    foreach (w[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = ref_t'(r + i); prog_data = w[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic zigzag_graph();
    put(20, encode(0, 1, '{0}, '{4}, 0, '{}, 0, 36, 24));
    put(24, encode(0, 1, '{-7}, '{1}, M_OFFSET | m_vsize(1), '{16, 2}, 4, 30, 255));
    put(30, encode(1, 1, '{7}, '{2}, M_OFFSET | m_vsize(1), '{2, 2}, 4, 255, 255));
    put(36, encode(0, 1, '{0}, '{3}, 0, '{}, 0, 52, 40));
    put(40, encode(57, 1, '{-7}, '{7}, M_OFFSET | m_vsize(1), '{2, -2}, 3, 46, 255));
    put(46, encode(23, 1, '{7}, '{6}, M_OFFSET | m_vsize(1), '{16, -2}, 3, 255, 255));
    put(52, encode(63, 1, '{}, '{}, 0, '{}, 0, 255, 255));
  endtask

  task automatic send_cmd(smc_mode_e mode, bit store, int pref, int r, int base);
    smc_cmd_t c;
    c = '{mode: mode, store: store, bcast: 1'b0, rsv: '0, pref_ref: 8'(pref),
          ref_addr: 8'(r), sid: 8'd3};
    @(negedge clk);
    cmd_valid = 1; cmd_flit = '0; cmd_flit.src = 8'd1; cmd_flit.mtype = MSG_SMC_CMD;
    cmd_flit.data = c; cmd_flit.last = 0;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_flit.data = base; cmd_flit.last = 1;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_idle();
    repeat (3) @(posedge clk);
    while (!idle) @(posedge clk);
  endtask

  task automatic cmp(string name, logic [31:0] exp[$]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("%s: %0d words, expected %0d", name, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("%s[%0d] wrong", name, i);
      end
    end
  endtask

  logic [31:0] exp[$];
  int zz[$];
  int t0, t1, r0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 15; s++) begin
      int lo, hi;
      lo = (s > 7) ? s - 7 : 0;
      hi = (s < 7) ? s : 7;
      if (s % 2 == 0) for (int r = hi; r >= lo; r--) zz.push_back(r*8 + (s - r));
      else            for (int r = lo; r <= hi; r++) zz.push_back(r*8 + (s - r));
    end

    // ---- A. linear, burst mode
    put(0, encode(0, 1024, '{}, '{}, 0, '{}, 0, 255, 255));
    got.delete(); exp.delete(); r0 = n_req;
    for (int i = 0; i < 1024; i++) exp.push_back(mw(2048 + i));
    t0 = $time / 10;
    send_cmd(SMC_BURST, 0, 0, 0, 2048);
    wait_idle();
    t1 = $time / 10;
    cmp("linear_burst", exp);
    checks++;
    if (n_req - r0 != 4) begin failures++; $display("linear: %0d requests, expected 4", n_req - r0); end
    checks++;
    if (real'(1024) / real'(t1 - t0) < 0.9) begin
      failures++; $display("linear: %0d cycles for 1024 words", t1 - t0);
    end
    $display("linear burst: 1024 words in %0d cycles", t1 - t0);

    // ---- B. zig-zag, direct mode
    zigzag_graph();
    got.delete(); exp.delete(); r0 = n_req;
    foreach (zz[i]) exp.push_back(mw(4096 + zz[i]));
    t0 = $time / 10;
    send_cmd(SMC_DIRECT, 0, 0, 20, 4096);
    wait_idle();
    t1 = $time / 10;
    cmp("zigzag_direct", exp);
    checks++;
    if (n_req - r0 != 64) begin failures++; $display("zigzag direct: %0d requests", n_req - r0); end
    $display("zig-zag direct: 64 words in %0d cycles", t1 - t0);

    // ---- C. zig-zag, reorder mode (8 rows of 8 words prefetched)
    zigzag_graph();
    put(60, encode(0, 8, '{8}, '{8}, 0, '{}, 0, 255, 255));
    got.delete(); exp.delete(); r0 = n_req;
    foreach (zz[i]) exp.push_back(mw(8192 + zz[i]));
    t0 = $time / 10;
    send_cmd(SMC_REORDER, 0, 60, 20, 8192);
    wait_idle();
    t1 = $time / 10;
    cmp("zigzag_reorder", exp);
    checks++;
    if (n_req - r0 != 8) begin failures++; $display("zigzag reorder: %0d requests, expected 8", n_req - r0); end
    $display("zig-zag reorder: 64 words in %0d cycles", t1 - t0);

    // ---- D. store 16 words
    put(70, encode(0, 16, '{}, '{}, 0, '{}, 0, 255, 255));
    send_cmd(SMC_DIRECT, 1, 0, 70, 12000);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      sin_valid = 1; sin_flit = '0; sin_flit.mtype = MSG_STREAM; sin_flit.last = 1;
      sin_flit.data = 32'hC0DE_0000 + i;
      @(posedge clk); while (!sin_ready) @(posedge clk);
    end
    @(negedge clk);
    sin_valid = 0;
    wait_idle();
    repeat (30) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (u_ddr.mem[12000 + i] !== 32'hC0DE_0000 + i) begin
        failures++; $display("store word %0d wrong", i);
      end
    end
    checks++;
    if (n_cmds != 4 || pdc_err) begin failures++; $display("n_cmds %0d err %0d", n_cmds, pdc_err); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
