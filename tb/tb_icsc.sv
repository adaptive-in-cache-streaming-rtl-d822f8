// tb_icsc: self-checking test of one in-cache stream controller.  The test
// bench plays the memory node (answers line reads after a fixed delay,
// records stores and stream commands) and the other end of the streams.
// Checked: load miss then hit with its latency, a pseudo-LRU replacement
// sequence, write-through store with update on hit, way hand-over to the
// stream controller, an output stream (order, destination, stall when the
// buffer is full), an input stream (order, PE waits on empty), a stream
// command and loads bypassing the cache when it owns no way.
module tb_icsc;
  import ring_pkg::*;
  import ics_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  int checks = 0, failures = 0;

  localparam int MEM = 9;

  logic        pe_req = 0, pe_ready, pe_rsp_valid;
  pe_op_e      pe_op = OP_LOAD;
  logic [31:0] pe_addr = 0, pe_wdata = 0, pe_rdata, n_hit, n_miss;
  logic [7:0]  pe_sid = 0;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t       in_flit, out_flit;
  logic [3:0]  way_stream;

  icsc #(.NODE_ID(2), .MEM_NODE(MEM)) u_dut (
    .clk, .rst_n, .pe_req, .pe_ready, .pe_op, .pe_addr, .pe_wdata, .pe_sid,
    .pe_rsp_valid, .pe_rdata,
    .net_in_valid(in_valid), .net_in_ready(in_ready), .net_in_flit(in_flit),
    .net_out_valid(out_valid), .net_out_ready(out_ready), .net_out_flit(out_flit),
    .way_stream, .n_hit, .n_miss);

  function automatic logic [31:0] mw(int a);
    return 32'(a) * 32'h9E37_79B1 + 32'd12345;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---- memory side: outgoing flits are sorted; line reads are answered
  flit_t strm_out[$], stores[$], cmds[$];
  flit_t rsp_q[$];
  int    rsp_time[$];
  always @(posedge clk) if (out_valid && out_ready) begin
    case (out_flit.mtype)
      MSG_RD_REQ: for (int i = 0; i < 16; i++) begin
        flit_t f;
        f = '0; f.src = 8'(MEM); f.dst = 8'd2; f.mtype = MSG_RD_RSP;
        f.data = mw(int'(out_flit.data) + i); f.last = (i == 15);
        rsp_q.push_back(f); rsp_time.push_back(cyc + 10);
      end
      MSG_WR_REQ:  stores.push_back(out_flit);
      MSG_SMC_CMD: cmds.push_back(out_flit);
      MSG_STREAM:  strm_out.push_back(out_flit);
      default: ;
    endcase
  end
  // injected input stream words, sent after the responses
  flit_t inj_q[$];
  always @(negedge clk) begin
    in_valid = 0;
    if (rsp_q.size() != 0 && rsp_time[0] <= cyc) begin in_valid = 1; in_flit = rsp_q[0]; end
    else if (inj_q.size() != 0) begin in_valid = 1; in_flit = inj_q[0]; end
  end
  always @(posedge clk) if (in_valid && in_ready) begin
    if (rsp_q.size() != 0 && in_flit == rsp_q[0]) begin void'(rsp_q.pop_front()); void'(rsp_time.pop_front()); end
    else void'(inj_q.pop_front());
  end

  // ---- PE side
  task automatic op(pe_op_e o, int a, int d, int s, output logic [31:0] r, output int lat);
    int t0;
    @(negedge clk);
    pe_req = 1; pe_op = o; pe_addr = 32'(a); pe_wdata = 32'(d); pe_sid = 8'(s);
    #1; while (!pe_ready) begin @(negedge clk); #1; end
    t0 = cyc;
    @(posedge clk);
    @(negedge clk);
    pe_req = 0;
    while (!pe_rsp_valid) @(negedge clk);
    r = pe_rdata; lat = cyc - t0;
  endtask

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] r;
  int lat, m0;

  task automatic load_exp(int a, bit exp_miss, string tag);
    m0 = n_miss;
    op(OP_LOAD, a, 0, 0, r, lat);
    chk(r === mw(a), {tag, " data"});
    chk((n_miss != m0) == exp_miss, $sformatf("%s: %s expected", tag, exp_miss ? "miss" : "hit"));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // miss, then hit on the same line; a hit answers two cycles after acceptance
    load_exp(100, 1, "first load");
    load_exp(101, 0, "same line");
    chk(lat <= 2, $sformatf("hit latency %0d", lat));

    // five lines of one set (set stride 512 words) in a 4-way cache
    for (int i = 0; i < 5; i++) load_exp(i * 512, 1, "fill");
    load_exp(0, 1, "evicted first line");
    load_exp(1024, 0, "recently used line");
    load_exp(512, 1, "replaced line");
    load_exp(2048, 0, "kept line");
    load_exp(1536, 1, "pseudo-LRU victim");

    // write-through store hitting the cache
    op(OP_STORE, 2048 + 3, 32'h1234_5678, 0, r, lat);
    chk(stores.size() == 2 && stores[0].data == 2051 && stores[1].data == 32'h1234_5678,
        "store sent to memory");
    m0 = n_miss;
    op(OP_LOAD, 2051, 0, 0, r, lat);
    chk(r == 32'h1234_5678 && n_miss == m0, "store updated the cached line");

    // output stream 1 in way 0, words 0..15, to node 5 stream 4
    op(OP_CFG_STRM, (15 << 16) | 0, (1 << 31) | (1 << 30) | (0 << 28) | (5 << 20) | (4 << 12), 1, r, lat);
    chk(way_stream == 4'b0001, "way 0 handed to the stream controller");
    out_ready = 0;
    for (int i = 0; i < 16; i++) op(OP_SPUSH, 0, 1000 + i, 1, r, lat);
    fork
      op(OP_SPUSH, 0, 1016, 1, r, lat);
      begin repeat (30) @(posedge clk); chk(!pe_rsp_valid && !pe_ready, "push into full stream waits"); out_ready = 1; end
    join
    for (int i = 17; i < 24; i++) op(OP_SPUSH, 0, 1000 + i, 1, r, lat);
    repeat (20) @(posedge clk);
    chk(strm_out.size() == 24, $sformatf("%0d stream words sent", strm_out.size()));
    begin
      int bad;
      bad = 0;
      foreach (strm_out[i])
        if (strm_out[i].data != 1000 + i || strm_out[i].dst != 5 || strm_out[i].sid != 4) bad++;
      chk(bad == 0, "output stream order and destination");
    end

    // input stream 2 in way 1, words 0..7
    op(OP_CFG_STRM, (7 << 16) | 0, (1 << 31) | (0 << 30) | (1 << 28), 2, r, lat);
    chk(way_stream == 4'b0011, "way 1 handed to the stream controller");
    for (int i = 0; i < 5; i++) begin
      flit_t f;
      f = '0; f.src = 8'(MEM); f.dst = 8'd2; f.mtype = MSG_STREAM; f.sid = 8'd2;
      f.data = 32'h7700 + i; f.last = 1;
      inj_q.push_back(f);
    end
    repeat (10) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      op(OP_SPOP, 0, 0, 2, r, lat);
      chk(r == 32'h7700 + i, "input stream word");
    end
    fork
      op(OP_SPOP, 0, 0, 2, r, lat);
      begin
        repeat (20) @(posedge clk);
        chk(!pe_rsp_valid, "pop from empty stream waits");
        inj_q.push_back('{bcast: 0, src: 8'(MEM), dst: 8'd2, mtype: MSG_STREAM, sid: 8'd2,
                          last: 1'b1, data: 32'h7705});
      end
    join
    chk(r == 32'h7705, "late input stream word");

    // the remaining cache ways still serve loads
    op(OP_LOAD, 1024, 0, 0, r, lat);
    chk(r === mw(1024), "load after hand-over");
    load_exp(1025, 0, "hit after hand-over");

    // stream command to the memory node
    op(OP_SMC_CMD, 4096, 32'hAB, 0, r, lat);
    chk(cmds.size() == 2 && cmds[0].data == 32'hAB && cmds[1].data == 4096 && cmds[1].last &&
        int'(cmds[0].dst) == MEM, "stream command");

    // all ways to streams: loads bypass the cache
    op(OP_CFG_WAYS, 0, 4'b1111, 0, r, lat);
    load_exp(300, 1, "bypass 1");
    load_exp(300, 1, "bypass 2");

    // ways back to the cache
    op(OP_CFG_WAYS, 0, 4'b0000, 0, r, lat);
    load_exp(300, 1, "refill");
    load_exp(301, 0, "cached again");

    $display("hits %0d misses %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
