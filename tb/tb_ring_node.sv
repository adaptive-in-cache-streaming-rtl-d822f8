// tb_ring_node: self-checking test of one ring node (node 2 of an 8-node
// ring).  Checks the routing decision of unicast flits (local, shorter way
// round), broadcast copies (local plus onward to the right, stopping before
// the source), one-cycle latency through the node, messages of two inputs
// competing for one output not being interleaved, and the conflict counter.
module tb_ring_node;
  import ring_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  int checks = 0, failures = 0;

  logic  [2:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  flit_t [2:0] in_flit, out_flit;
  logic  [31:0] n_conflicts;

  ring_node #(.N_NODES(8), .NODE_ID(2)) u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit, .n_conflicts);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int src, int dst, bit bc, int data, bit last);
    flit_t f;
    f = '0; f.src = 8'(src); f.dst = 8'(dst); f.bcast = bc; f.mtype = MSG_STREAM;
    f.data = 32'(data); f.last = last;
    return f;
  endfunction

  // per-port input queues, driven at the falling edge, popped on acceptance
  flit_t iq[3][$];
  always @(negedge clk)
    for (int i = 0; i < 3; i++) begin
      in_valid[i] = (iq[i].size() != 0);
      if (iq[i].size() != 0) in_flit[i] = iq[i][0];
    end
  always @(posedge clk)
    for (int i = 0; i < 3; i++)
      if (in_valid[i] && in_ready[i]) void'(iq[i].pop_front());

  // captured output: data words and capture cycle
  int cyc = 0;
  always @(posedge clk) cyc++;
  int oq[3][$], ot[3][$];
  always @(posedge clk)
    for (int o = 0; o < 3; o++)
      if (out_valid[o] && out_ready[o]) begin oq[o].push_back(out_flit[o].data); ot[o].push_back(cyc); end

  task automatic clear_out();
    for (int o = 0; o < 3; o++) begin oq[o].delete(); ot[o].delete(); end
  endtask

  task automatic settle(); repeat (20) @(posedge clk); endtask

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // routing from the left input
    clear_out();
    iq[1].push_back(mk(0, 2, 0, 100, 1));   // arrived
    iq[1].push_back(mk(0, 5, 0, 101, 1));   // 3 hops clockwise -> right
    iq[1].push_back(mk(0, 6, 0, 102, 1));   // 4 hops clockwise -> right
    iq[0].push_back(mk(2, 0, 0, 103, 1));   // 6 hops clockwise -> left
    iq[0].push_back(mk(2, 7, 0, 104, 1));   // 5 hops clockwise -> left
    settle();
    chk(oq[0].size() == 1 && oq[0][0] == 100, "local delivery");
    chk(oq[2].size() == 2 && oq[2][0] == 101 && oq[2][1] == 102, "right routing");
    chk(oq[1].size() == 2 && oq[1][0] == 103 && oq[1][1] == 104, "left routing");

    // latency: a flit presented at a falling edge leaves at the next-but-one rising edge
    clear_out();
    @(negedge clk);
    t0 = cyc;
    iq[1].push_back(mk(0, 2, 0, 7, 1));
    settle();
    chk(ot[0].size() == 1 && ot[0][0] - t0 == 2, $sformatf("latency %0d", ot[0].size() ? ot[0][0] - t0 : -1));

    // broadcast from node 0 passing node 2: copy to local and onward right
    clear_out();
    iq[1].push_back(mk(0, 0, 1, 200, 1));
    // broadcast from node 3 reaching node 2: next node is the source, local only
    iq[1].push_back(mk(3, 0, 1, 201, 1));
    // broadcast issued by node 2 itself: no local copy, onward right
    iq[0].push_back(mk(2, 0, 1, 202, 1));
    settle();
    chk(oq[0].size() == 2 && oq[0][0] == 200 && oq[0][1] == 201, "broadcast local copies");
    chk(oq[2].size() == 2 && 200 inside {oq[2][0], oq[2][1]} && 202 inside {oq[2][0], oq[2][1]},
        "broadcast forwarding");

    // two 4-flit messages from local and left, both to node 4 (right)
    clear_out();
    for (int k = 0; k < 4; k++) begin
      iq[0].push_back(mk(2, 4, 0, 300 + k, k == 3));
      iq[1].push_back(mk(1, 4, 0, 400 + k, k == 3));
    end
    settle();
    chk(oq[2].size() == 8, "both messages forwarded");
    begin
      bit ok;
      ok = (oq[2].size() == 8);
      if (ok) for (int k = 1; k < 4; k++) begin
        if (oq[2][k] != oq[2][0] + k) ok = 0;
        if (oq[2][4 + k] != oq[2][4] + k) ok = 0;
      end
      chk(ok, "messages not interleaved");
    end
    chk(n_conflicts != 0, "conflicts counted");

    // back-pressure on the right output holds the message without loss
    clear_out();
    out_ready[2] = 0;
    for (int k = 0; k < 6; k++) iq[1].push_back(mk(0, 4, 0, 500 + k, k == 5));
    settle();
    chk(oq[2].size() == 0, "held while not ready");
    out_ready[2] = 1;
    settle();
    chk(oq[2].size() == 6 && oq[2][5] == 505, "delivered after back-pressure");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
