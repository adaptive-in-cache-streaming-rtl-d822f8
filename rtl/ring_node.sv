// ring_node: one node of the bidirectional ring interconnect.
//
// Each node connects its two neighbours (left = lower id, right = higher id,
// wrapping around) and one component (a PE's in-cache stream controller or
// the main memory controller).  Every input has a small register FIFO.
// Routing: a unicast flit goes to the local port when it has arrived,
// otherwise towards the shorter way round (right when the clockwise distance
// is at most N/2).  A broadcast always travels right; every node it passes
// delivers a copy to its component, until it would return to its source.
// Arbitration: the three inputs are ordered by one round-robin pointer per
// node, which moves past an input when that input finishes a message; each
// output serves the first requester in that order and stays locked to it
// until the message's last flit, so messages are never interleaved.  A flit
// that needs two outputs (a broadcast copy) moves only when both are free.
// The ring with round-robin rotation on message completion and the broadcast
// support follow the document; the routing rule, the FIFO depth and the lock
// are this design's choices.
//
// Interface: *_valid/*_ready/*_flit per port; a flit moves in a cycle with
// valid and ready.  Latency: one cycle through the input FIFO per hop.
module ring_node
  import ring_pkg::*;
#(
  parameter int unsigned N_NODES = 4,
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // inputs: 0 = local, 1 = from left neighbour, 2 = from right neighbour
  input  logic  [2:0] in_valid,
  output logic  [2:0] in_ready,
  input  flit_t [2:0] in_flit,
  // outputs: 0 = local, 1 = to left neighbour, 2 = to right neighbour
  output logic  [2:0] out_valid,
  input  logic  [2:0] out_ready,
  output flit_t [2:0] out_flit,
  output logic  [31:0] n_conflicts
);

  localparam logic [NODE_W-1:0] ME   = NODE_W'(NODE_ID);
  localparam logic [NODE_W-1:0] NXT  = NODE_W'((NODE_ID + 1) % N_NODES);

  logic  [2:0] h_valid, h_pop;
  flit_t [2:0] h_flit;

  for (genvar i = 0; i < 3; i++) begin : g_in
    logic [$clog2(FIFO_DEPTH+1)-1:0] cnt;
    sfifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_valid (in_valid[i]), .wr_ready (in_ready[i]), .wr_data (in_flit[i]),
      .rd_valid (h_valid[i]),  .rd_ready (h_pop[i]),    .rd_data (h_flit[i]),
      .count    (cnt)
    );
  end

  // route of each input head: bit 0 local, 1 left, 2 right
  function automatic logic [2:0] route(flit_t f, int unsigned port);
    logic [NODE_W-1:0] dcw;
    logic [2:0] r;
    r = '0;
    if (f.bcast) begin
      if (port != 0) r[0] = 1'b1;
      if (NXT != f.src && N_NODES > 1) r[2] = 1'b1;
    end else if (f.dst == ME) begin
      r[0] = 1'b1;
    end else begin
      dcw = NODE_W'((int'(f.dst) + N_NODES - NODE_ID) % N_NODES);
      if (int'(dcw) <= N_NODES / 2) r[2] = 1'b1;
      else                           r[1] = 1'b1;
    end
    return r;
  endfunction

  logic [2:0][2:0] req;     // req[input][output]
  logic [2:0][1:0] gnt;     // gnt[output] = input index
  logic [2:0]      gnt_v;
  logic [2:0]      lock_q;
  logic [2:0][1:0] owner_q;
  logic [1:0]      ptr_q;

  always_comb begin
    for (int i = 0; i < 3; i++)
      req[i] = h_valid[i] ? route(h_flit[i], i) : 3'b000;
  end

  always_comb begin
    for (int o = 0; o < 3; o++) begin
      gnt[o]   = '0;
      gnt_v[o] = 1'b0;
      if (lock_q[o]) begin
        gnt[o]   = owner_q[o];
        gnt_v[o] = req[owner_q[o]][o];
      end else begin
        for (int k = 2; k >= 0; k--) begin
          automatic int i = (int'(ptr_q) + k) % 3;
          if (req[i][o]) begin
            gnt[o]   = 2'(i);
            gnt_v[o] = 1'b1;
          end
        end
      end
    end
  end

  // an input moves when every output it needs grants it and is ready
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      h_pop[i] = h_valid[i];
      for (int o = 0; o < 3; o++)
        if (req[i][o] && !(gnt_v[o] && gnt[o] == 2'(i) && out_ready[o])) h_pop[i] = 1'b0;
    end
    for (int o = 0; o < 3; o++) begin
      out_valid[o] = gnt_v[o] && h_pop[gnt[o]];
      out_flit[o]  = h_flit[gnt[o]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q      <= '0;
      owner_q     <= '0;
      ptr_q       <= '0;
      n_conflicts <= '0;
    end else begin
      for (int o = 0; o < 3; o++)
        if (out_valid[o] && out_ready[o]) begin
          lock_q[o]  <= !out_flit[o].last;
          owner_q[o] <= gnt[o];
        end
      for (int i = 0; i < 3; i++)
        if (h_pop[i] && h_flit[i].last) ptr_q <= (i == 2) ? 2'd0 : 2'(i + 1);
      // two inputs wanting the same output in one cycle
      for (int o = 0; o < 3; o++)
        if (int'(req[0][o]) + int'(req[1][o]) + int'(req[2][o]) > 1)
          n_conflicts <= n_conflicts + 1;
    end
  end

endmodule
