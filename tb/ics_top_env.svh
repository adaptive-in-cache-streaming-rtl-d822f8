// ics_top_env.svh: test body shared by the end-to-end testbenches of ics_top
// (reduced ring and full-size ring).  The including module declares NP (the
// number of PEs of its ics_top instance), the DUT signals, the DUT itself
// (instance u_dut) and the DDR3 model (instance u_ddr).
//
// Every mechanism is exercised by PE programs running on the PE ports, and
// how often it happened is counted and printed:
//   cache hits / misses (address mode), pseudo-LRU replacements,
//   write-through stores seen by another PE, way hand-overs,
//   SMC streams in direct, burst and reorder mode, a broadcast stream,
//   a PE-to-PE stream, a stream stored to memory, memory bursts,
//   DMA line reads and ring arbitration conflicts.
// Cycle checks: a 64-word burst stream arrives at the PE at one word per
// cycle, the first word within the memory overhead plus ring and controller
// latency, and the same 64 words read in zig-zag order in direct mode are more
// than ten times slower than in burst mode (the effect the document reports
// between linear and zig-zag access without reordering).

  int checks = 0, failures = 0;
  localparam int MEMN = NP;

  function automatic logic [31:0] mw(int a);
    return 32'(a) * 32'h9E37_79B1 + 32'd12345;
  endfunction

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------------------------------------------------- PE programs
  task automatic op(int p, pe_op_e o, int a, int d, int s, output logic [31:0] r);
    @(negedge clk);
    pe_req[p] = 1; pe_op[p] = o; pe_addr[p] = 32'(a); pe_wdata[p] = 32'(d); pe_sid[p] = 8'(s);
    #1; while (!pe_ready[p]) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    pe_req[p] = 0;
    while (!pe_rsp_valid[p]) @(negedge clk);
    r = pe_rdata[p];
  endtask

  function automatic int cfg_in(int way);
    return (1 << 31) | (way << 28);
  endfunction
  function automatic int cfg_out(int way, int dest, int dsid, bit bc);
    return (1 << 31) | (1 << 30) | (way << 28) | (dest << 20) | (dsid << 12) | (int'(bc) << 11);
  endfunction
  function automatic int smc_cmd(smc_mode_e m, bit store, bit bc, int pref, int r, int sid);
    smc_cmd_t c;
    c = '{mode: m, store: store, bcast: bc, rsv: '0, pref_ref: 8'(pref), ref_addr: 8'(r), sid: 8'(sid)};
    return int'(c);
  endfunction

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

  task automatic wait_smc();
    repeat (5) @(posedge clk);
    while (!smc_idle) @(posedge clk);
  endtask

  // pop n words of input stream s of PE p and compare
  task automatic pop_check(int p, int s, logic [31:0] exp[$], string name);
    logic [31:0] r;
    int bad;
    bad = 0;
    foreach (exp[i]) begin
      op(p, OP_SPOP, 0, 0, s, r);
      if (r !== exp[i]) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d of %0d words wrong at PE %0d", name, bad, exp.size(), p));
  endtask

  // stream words arriving at each PE's ring port, with their arrival cycle
  int arr_first[NP], arr_last[NP], arr_n[NP];
  always @(posedge clk)
    for (int p = 0; p < NP; p++)
      if (u_dut.out_v[p][0] && u_dut.out_r[p][0] && u_dut.out_f[p][0].mtype == MSG_STREAM) begin
        if (arr_n[p] == 0) arr_first[p] = cyc;
        arr_last[p] = cyc;
        arr_n[p]++;
      end
  task automatic arr_clear(int p); arr_n[p] = 0; endtask


  // mechanism counters
  int c_store = 0, c_handover = 0, c_direct = 0, c_burst = 0, c_reorder = 0, c_bcast = 0;
  int c_p2p = 0, c_sstore = 0, c_repl = 0, c_words = 0;

  int zz[$];
  int t_burst, t_direct, t0;
  logic [31:0] r, exp[$];

  initial begin
    for (int s = 0; s < 15; s++) begin
      int lo, hi;
      lo = (s > 7) ? s - 7 : 0;
      hi = (s < 7) ? s : 7;
      if (s % 2 == 0) for (int rr = hi; rr >= lo; rr--) zz.push_back(rr*8 + (s - rr));
      else            for (int rr = lo; rr <= hi; rr++) zz.push_back(rr*8 + (s - rr));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- address mode: every PE loads its own line twice (miss, hit)
    for (int p = 0; p < NP; p++)
      fork
        automatic int pp = p;
        begin
          logic [31:0] rr;
          op(pp, OP_LOAD, 64 * pp + 3, 0, 0, rr);
          chk(rr === mw(64 * pp + 3), $sformatf("PE %0d miss data", pp));
          op(pp, OP_LOAD, 64 * pp + 4, 0, 0, rr);
          chk(rr === mw(64 * pp + 4), $sformatf("PE %0d hit data", pp));
        end
      join_none
    wait fork;

    // ---- replacement: five lines of one set at PE 1, then the first again
    for (int i = 0; i < 5; i++) op(1, OP_LOAD, 8192 + 512 * i, 0, 0, r);
    begin
      int m0;
      m0 = n_miss[1];
      op(1, OP_LOAD, 8192, 0, 0, r);
      chk(r === mw(8192), "reloaded line data");
      chk(n_miss[1] == m0 + 1, "evicted line misses");
      c_repl += n_miss[1] - m0;
    end

    // ---- write-through store by PE 0, seen by the last PE through memory
    op(0, OP_STORE, 5000, 32'hCAFE_0001, 0, r);
    c_store++;
    op(NP - 1, OP_LOAD, 5000, 0, 0, r);
    chk(r === 32'hCAFE_0001, "store visible to another PE");

    // ---- SMC streams: input stream 1 in way 0 of PEs 1 and 2
    op(1, OP_CFG_STRM, 63 << 16, cfg_in(0), 1, r); c_handover++;
    op(2, OP_CFG_STRM, 63 << 16, cfg_in(0), 1, r); c_handover++;
    chk(way_stream[1] == 4'b0001 && way_stream[2] == 4'b0001, "ways handed over");
    put(0, encode(0, 64, '{}, '{}, 0, '{}, 0, 255, 255));
    zigzag_graph();

    // burst mode, linear 64 words, to PE 2
    arr_clear(2);
    t0 = cyc;
    op(2, OP_SMC_CMD, 2048, smc_cmd(SMC_BURST, 0, 0, 0, 0, 1), 0, r);
    wait_smc();
    repeat (NP + 10) @(posedge clk);
    t_burst = arr_last[2] - t0;
    chk(arr_n[2] == 64, $sformatf("burst stream: %0d words arrived", arr_n[2]));
    chk(arr_last[2] - arr_first[2] <= 66, $sformatf("burst stream: 64 words in %0d cycles",
        arr_last[2] - arr_first[2] + 1));
    chk(arr_first[2] - t0 <= 20 + 40 + NP, $sformatf("burst stream: first word after %0d cycles",
        arr_first[2] - t0));
    exp.delete();
    for (int i = 0; i < 64; i++) exp.push_back(mw(2048 + i));
    pop_check(2, 1, exp, "burst stream");
    c_burst++; c_words += 64;

    // direct mode, zig-zag 8x8, to PE 1
    arr_clear(1);
    t0 = cyc;
    op(1, OP_SMC_CMD, 2048, smc_cmd(SMC_DIRECT, 0, 0, 0, 20, 1), 0, r);
    wait_smc();
    repeat (NP + 10) @(posedge clk);
    t_direct = arr_last[1] - t0;
    exp.delete();
    foreach (zz[i]) exp.push_back(mw(2048 + zz[i]));
    pop_check(1, 1, exp, "direct zig-zag stream");
    chk(t_direct > 10 * t_burst, $sformatf("direct %0d cycles vs burst %0d cycles", t_direct, t_burst));
    c_direct++; c_words += 64;

    // reorder mode, zig-zag 8x8 with an 8x8 prefetch, to PE 2
    zigzag_graph();
    put(60, encode(0, 8, '{8}, '{8}, 0, '{}, 0, 255, 255));
    op(2, OP_SMC_CMD, 4096, smc_cmd(SMC_REORDER, 0, 0, 60, 20, 1), 0, r);
    exp.delete();
    foreach (zz[i]) exp.push_back(mw(4096 + zz[i]));
    pop_check(2, 1, exp, "reorder zig-zag stream");
    wait_smc();
    c_reorder++; c_words += 64;

    // ---- broadcast: 32 words to input stream 2 (way 1) of every PE
    for (int p = 0; p < NP; p++) begin
      op(p, OP_CFG_STRM, 63 << 16, cfg_in(1), 2, r);
      c_handover++;
    end
    put(4, encode(0, 32, '{}, '{}, 0, '{}, 0, 255, 255));
    op(0, OP_SMC_CMD, 6000, smc_cmd(SMC_BURST, 0, 1, 0, 4, 2), 0, r);
    exp.delete();
    for (int i = 0; i < 32; i++) exp.push_back(mw(6000 + i));
    for (int p = 0; p < NP; p++)
      fork
        automatic int pp = p;
        pop_check(pp, 2, exp, "broadcast stream");
      join_none
    wait fork;
    wait_smc();
    c_bcast++; c_words += 32 * NP;

    // ---- PE-to-PE stream: PE 0 (way 2) to the last PE (way 2), 40 words
    op(0, OP_CFG_STRM, 15 << 16, cfg_out(2, NP - 1, 3, 0), 3, r); c_handover++;
    op(NP - 1, OP_CFG_STRM, 15 << 16, cfg_in(2), 3, r); c_handover++;
    exp.delete();
    for (int i = 0; i < 40; i++) exp.push_back(32'h9900_0000 + i);
    fork
      for (int i = 0; i < 40; i++) op(0, OP_SPUSH, 0, 32'h9900_0000 + i, 3, r);
      pop_check(NP - 1, 3, exp, "PE-to-PE stream");
    join
    c_p2p++; c_words += 40;

    // ---- stream stored to memory: PE 0 way 3 to the memory node, 16 words
    op(0, OP_CFG_STRM, 15 << 16, cfg_out(3, MEMN, 0, 0), 4, r); c_handover++;
    chk(way_stream[0] == 4'b1110, "PE 0 keeps one cache way");
    put(2, encode(0, 16, '{}, '{}, 0, '{}, 0, 255, 255));
    op(0, OP_SMC_CMD, 9000, smc_cmd(SMC_DIRECT, 1, 0, 0, 2, 0), 0, r);
    for (int i = 0; i < 16; i++) op(0, OP_SPUSH, 0, 32'h5700_0000 + i, 4, r);
    wait_smc();
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 16; i++) if (u_ddr.mem[9000 + i] !== 32'h5700_0000 + i) bad++;
      chk(bad == 0, "stored stream in memory");
    end
    c_sstore++; c_words += 16;

    // ---- PE 0 still works in address mode with its remaining way
    op(0, OP_LOAD, 777, 0, 0, r);
    chk(r === mw(777), "load with one cache way");
    chk(!pdc_err, "no descriptor stack overflow");

    // ---- report
    begin
      int hits, misses, conf;
      hits = 0; misses = 0; conf = 0;
      for (int p = 0; p < NP; p++) begin
        hits   += n_hit[p];
        misses += n_miss[p];
      end
      for (int n = 0; n <= NP; n++) conf += n_ring_conflicts[n];
      $display("MECHANISM cache_hit=%0d", hits);
      $display("MECHANISM cache_miss=%0d", misses);
      $display("MECHANISM plru_replacement=%0d", c_repl);
      $display("MECHANISM write_through_store=%0d", c_store);
      $display("MECHANISM way_handover=%0d", c_handover);
      $display("MECHANISM smc_direct_stream=%0d", c_direct);
      $display("MECHANISM smc_burst_stream=%0d", c_burst);
      $display("MECHANISM smc_reorder_stream=%0d", c_reorder);
      $display("MECHANISM broadcast_stream=%0d", c_bcast);
      $display("MECHANISM pe_to_pe_stream=%0d", c_p2p);
      $display("MECHANISM stream_store=%0d", c_sstore);
      $display("MECHANISM stream_words=%0d", c_words);
      $display("MECHANISM smc_commands=%0d", n_cmds);
      $display("MECHANISM memory_bursts=%0d", n_bursts);
      $display("MECHANISM dma_line_reads=%0d", n_dma_reads);
      $display("MECHANISM ring_conflicts=%0d", conf);
      $display("MECHANISM ddr_requests=%0d", n_req);
      chk(hits > 0 && misses > 0 && c_repl > 0 && n_bursts > 0 && n_dma_reads > 0 && conf > 0,
          "every mechanism happened");
      chk(n_cmds == 5, $sformatf("%0d SMC commands", n_cmds));
    end
    $display("burst stream 64 words: %0d cycles from command to last word", t_burst);
    $display("direct zig-zag stream 64 words: %0d cycles from command to last word", t_direct);
    $display("cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
