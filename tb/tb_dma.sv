// tb_dma: self-checking test of the address-based DMA with the DDR3 model.
// Line reads from two nodes must return 16 response flits each, addressed to
// the requester, with the memory contents and `last` on the final flit; the
// first word must arrive within the memory overhead plus a few cycles, and a
// line must stream at one word per cycle.  A store must update memory.
module tb_dma;
  import ring_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  int checks = 0, failures = 0;

  logic        in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t       in_flit, out_flit;
  logic        mreq_valid, mreq_ready, mreq_we, mr_valid, mr_ready;
  logic [31:0] mreq_addr, mreq_wdata, mr_data, n_reads, n_writes;
  logic [15:0] mreq_len;
  int unsigned n_req, n_words;

  dma #(.NODE_ID(8), .LINE_WORDS(16)) u_dut (
    .clk, .rst_n, .net_in_valid(in_valid), .net_in_ready(in_ready), .net_in_flit(in_flit),
    .net_out_valid(out_valid), .net_out_ready(out_ready), .net_out_flit(out_flit),
    .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data, .n_reads, .n_writes);

  ddr_model #(.WORDS(1 << 12)) u_ddr (
    .clk, .rst_n, .mreq_valid, .mreq_ready, .mreq_we, .mreq_addr, .mreq_len, .mreq_wdata,
    .mr_valid, .mr_ready, .mr_data, .n_req, .n_words);

  function automatic logic [31:0] mw(int a);
    return 32'(a) * 32'h9E37_79B1 + 32'd12345;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;
  flit_t got[$];
  int    gt[$];
  always @(posedge clk) if (out_valid && out_ready) begin got.push_back(out_flit); gt.push_back(cyc); end

  task automatic send(int src, msg_e t, int data, bit last);
    @(negedge clk);
    in_valid = 1; in_flit = '0; in_flit.src = 8'(src); in_flit.dst = 8'd8;
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

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    send(3, MSG_RD_REQ, 160, 1);
    send(5, MSG_RD_REQ, 512, 1);
    send(1, MSG_WR_REQ, 700, 0);
    send(1, MSG_WR_REQ, 32'hABCD_0123, 1);
    repeat (150) @(posedge clk);
    chk(got.size() == 32, $sformatf("%0d response flits", got.size()));
    if (got.size() == 32) begin
      bit ok;
      ok = 1;
      for (int i = 0; i < 32; i++) begin
        int a;
        a = (i < 16) ? 160 + i : 512 + i - 16;
        if (got[i].data !== mw(a) || got[i].dst != ((i < 16) ? 3 : 5) ||
            got[i].mtype != MSG_RD_RSP || got[i].last != (i % 16 == 15)) ok = 0;
      end
      chk(ok, "line contents, destination and last");
      chk(gt[0] - t0 <= 20 + 6, $sformatf("first word after %0d cycles", gt[0] - t0));
      chk(gt[15] - gt[0] == 15, "one word per cycle within a line");
    end
    chk(u_ddr.mem[700] === 32'hABCD_0123, "store written");
    chk(n_reads == 2 && n_writes == 1, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
