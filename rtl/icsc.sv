// icsc: in-cache stream controller of one processing element.
//
// The PE's local n-way set-associative cache (8 kB, 4 ways, 64-byte lines by
// default) is shared by two controllers.  A way-ownership register says, per
// way, whether the way belongs to the cache controller (address mode) or to
// the stream controller (stream mode).  Ownership can change at run time
// without any reconfiguration delay: handing a way to the stream controller
// only drops the cache lines it held.
//
// Address mode: a load that hits a cache-owned way answers at once; a miss
// sends a line read to the main memory controller over the ring and fills the
// line into the pseudo-LRU victim among the cache-owned ways (binary-tree
// pseudo-LRU).  Stores are write-through with no allocation: the word is sent
// to memory and updated in the cache only on a hit.  When no way is owned by
// the cache, loads bypass it.
//
// Stream mode: a stream table holds, per stream id, the way it lives in, the
// START..END region of that way used as a circular buffer, read and write
// pointers and a word count.  The PE appends to output streams (SPUSH) and
// takes from input streams (SPOP); output stream words are sent automatically
// to the stream's destination as soon as they are in the buffer, and words of
// input streams arriving from the ring are written into their buffer.  A PE
// operation on a full or empty stream waits.  Configuring a stream entry also
// hands its way to the stream controller (implicit ownership change).
//
// Interface: pe_req/pe_op/pe_addr/pe_wdata/pe_sid is accepted when pe_ready
// is high; pe_rsp_valid pulses with pe_rdata when the operation completes
// (every operation answers).  net_in_*/net_out_* are the ring port.
// OP_CFG_STRM: pe_sid = entry; pe_wdata = {enable[31], out[30], way[29:28],
// dest node[27:20], dest sid[19:12], broadcast[11]}; pe_addr = {END[24:16],
// START[8:0]} as word indices inside the way.
// Taken from the document: way ownership, stream buffers in cache ways with
// the stream table fields, write-through no-allocate and tree pseudo-LRU.
// This design's own choices: message formats, the operation set, blocking
// PE operations, single-flit stream messages, and no snooping (other PEs'
// caches are not invalidated by a store), see README.
module icsc
  import ring_pkg::*;
  import ics_pkg::*;
#(
  parameter int unsigned WAYS       = 4,
  parameter int unsigned SETS       = 32,
  parameter int unsigned LINE_WORDS = 16,
  parameter int unsigned N_STREAMS  = 8,
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned MEM_NODE   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // PE side
  input  logic        pe_req,
  output logic        pe_ready,
  input  pe_op_e      pe_op,
  input  logic [31:0] pe_addr,
  input  logic [31:0] pe_wdata,
  input  logic [7:0]  pe_sid,
  output logic        pe_rsp_valid,
  output logic [31:0] pe_rdata,
  // ring side
  input  logic        net_in_valid,
  output logic        net_in_ready,
  input  flit_t       net_in_flit,
  output logic        net_out_valid,
  input  logic        net_out_ready,
  output flit_t       net_out_flit,
  // status
  output logic [WAYS-1:0] way_stream,
  output logic [31:0] n_hit,
  output logic [31:0] n_miss
);

  localparam int WW   = SETS * LINE_WORDS;      // words per way
  localparam int PW   = $clog2(WW);
  localparam int OW   = $clog2(LINE_WORDS);
  localparam int SW   = $clog2(SETS);
  localparam int TW   = 32 - OW - SW;
  localparam int WYW  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int SIDW = $clog2(N_STREAMS);

  typedef struct packed {
    logic             en;
    logic             out;
    logic [WYW-1:0]   way;
    logic [NODE_W-1:0] dest;
    logic [7:0]       dsid;
    logic             bcast;
    logic [PW-1:0]    start;
    logic [PW-1:0]    last;    // END
    logic [PW-1:0]    rd;      // PE_RD / send pointer
    logic [PW-1:0]    wr;      // PE_WR / receive pointer
    logic [PW:0]      cnt;     // N_RW: words held
  } sentry_t;

  typedef enum logic [3:0] {
    C_IDLE, C_MISS_REQ, C_MISS_WAIT, C_RESP, C_ST_A, C_ST_D, C_CMD_A, C_CMD_B, C_STALL
  } cstate_e;

  // ------------------------------------------------------------ storage
  logic [31:0]    data_q [WAYS][WW];
  logic [TW-1:0]  tag_q  [WAYS][SETS];
  logic [SETS-1:0] val_q [WAYS];
  logic [WAYS-2:0] plru_q [SETS];
  logic [WAYS-1:0] own_q;               // 1 = stream controller owns the way
  sentry_t        st_q [N_STREAMS];

  assign way_stream = own_q;

  // ------------------------------------------------------------ PE request
  cstate_e        cs_q;
  pe_op_e         op_q;
  logic [31:0]    addr_q, wdata_q;
  logic [SIDW-1:0] sid_q;
  logic [WYW-1:0] vict_q;
  logic           bypass_q;
  logic [OW-1:0]  fill_cnt_q;
  logic [31:0]    rdata_q;

  logic [OW-1:0]  a_off;
  logic [SW-1:0]  a_set;
  logic [TW-1:0]  a_tag;
  assign a_off = addr_q[OW-1:0];
  assign a_set = addr_q[OW+SW-1:OW];
  assign a_tag = addr_q[31:OW+SW];

  // hit detection on the latched request
  logic           hit;
  logic [WYW-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (!own_q[w] && val_q[w][a_set] && tag_q[w][a_set] == a_tag) begin
        hit     = 1'b1;
        hit_way = WYW'(w);
      end
  end

  // tree pseudo-LRU victim, restricted to cache-owned ways
  logic [WYW-1:0] plru_way, victim;
  logic           any_cache_way;
  always_comb begin
    int node;
    node = 1;
    for (int l = 0; l < WYW; l++) node = 2*node + int'(plru_q[a_set][node-1]);
    plru_way      = WYW'(node - WAYS);
    victim        = plru_way;
    any_cache_way = ~&own_q;
    if (own_q[plru_way])
      for (int w = WAYS-1; w >= 0; w--) if (!own_q[w]) victim = WYW'(w);
  end

  function automatic logic [WAYS-2:0] plru_touch(logic [WAYS-2:0] b, logic [WYW-1:0] w);
    int node;
    node = int'(w) + WAYS;
    for (int l = 0; l < WYW; l++) begin
      b[node/2 - 1] = (node % 2 == 0);  // point away from the used half
      node = node / 2;
    end
    return b;
  endfunction

  // ------------------------------------------------------------ streams
  sentry_t        cur_s;
  assign cur_s = st_q[sid_q];

  function automatic logic [PW-1:0] ptr_inc(sentry_t s, logic [PW-1:0] p);
    return (p == s.last) ? s.start : p + 1'b1;
  endfunction
  function automatic logic [PW:0] s_size(sentry_t s);
    return {1'b0, s.last} - {1'b0, s.start} + 1'b1;
  endfunction

  // PE stream operation possible this cycle
  logic pe_push_ok, pe_pop_ok;
  assign pe_push_ok = (cs_q == C_STALL) && op_q == OP_SPUSH && cur_s.en && cur_s.out &&
                      cur_s.cnt < s_size(cur_s);
  assign pe_pop_ok  = (cs_q == C_STALL) && op_q == OP_SPOP && cur_s.en && !cur_s.out &&
                      cur_s.cnt != 0;

  // outgoing stream sender: lowest output stream with data
  logic            snd_v;
  logic [SIDW-1:0] snd_sid;
  sentry_t         snd_s;
  always_comb begin
    snd_v   = 1'b0;
    snd_sid = '0;
    for (int s = N_STREAMS-1; s >= 0; s--)
      if (st_q[s].en && st_q[s].out && st_q[s].cnt != 0) begin
        snd_v   = 1'b1;
        snd_sid = SIDW'(s);
      end
  end
  assign snd_s = st_q[snd_sid];

  // ring output: the request FSM has priority, a stream word otherwise
  logic fsm_send;
  flit_t fsm_flit;
  always_comb begin
    fsm_send = 1'b0;
    fsm_flit = '0;
    fsm_flit.src  = NODE_W'(NODE_ID);
    fsm_flit.dst  = NODE_W'(MEM_NODE);
    fsm_flit.last = 1'b1;
    unique case (cs_q)
      C_MISS_REQ: begin
        fsm_send = 1'b1; fsm_flit.mtype = MSG_RD_REQ;
        fsm_flit.data = {addr_q[31:OW], OW'(0)};
      end
      C_ST_A: begin
        fsm_send = 1'b1; fsm_flit.mtype = MSG_WR_REQ; fsm_flit.last = 1'b0;
        fsm_flit.data = addr_q;
      end
      C_ST_D: begin
        fsm_send = 1'b1; fsm_flit.mtype = MSG_WR_REQ; fsm_flit.data = wdata_q;
      end
      C_CMD_A: begin
        fsm_send = 1'b1; fsm_flit.mtype = MSG_SMC_CMD; fsm_flit.last = 1'b0;
        fsm_flit.data = wdata_q;
      end
      C_CMD_B: begin
        fsm_send = 1'b1; fsm_flit.mtype = MSG_SMC_CMD; fsm_flit.data = addr_q;
      end
      default: ;
    endcase
  end

  logic snd_go;
  always_comb begin
    net_out_valid = fsm_send || snd_v;
    net_out_flit  = fsm_flit;
    if (!fsm_send) begin
      net_out_flit       = '0;
      net_out_flit.src   = NODE_W'(NODE_ID);
      net_out_flit.dst   = snd_s.dest;
      net_out_flit.bcast = snd_s.bcast;
      net_out_flit.mtype = MSG_STREAM;
      net_out_flit.sid   = snd_s.dsid;
      net_out_flit.last  = 1'b1;
      net_out_flit.data  = data_q[snd_s.way][snd_s.rd];
    end
  end
  assign snd_go = !fsm_send && snd_v && net_out_ready;

  // ring input: line fill for the pending miss, or an input stream word
  logic            in_fill, in_strm;
  logic [SIDW-1:0] in_sid;
  sentry_t         in_s;
  assign in_sid  = SIDW'(net_in_flit.sid);
  assign in_s    = st_q[in_sid];
  assign in_fill = net_in_valid && net_in_flit.mtype == MSG_RD_RSP && cs_q == C_MISS_WAIT;
  assign in_strm = net_in_valid && net_in_flit.mtype == MSG_STREAM && in_s.en && !in_s.out &&
                   in_s.cnt < s_size(in_s);
  // flits of other kinds, or for a stream that is not an input stream, are
  // dropped.  Ready depends only on the flit and the state, never on valid,
  // because the ring node's valid depends on ready.
  always_comb begin
    unique case (net_in_flit.mtype)
      MSG_RD_RSP: net_in_ready = (cs_q == C_MISS_WAIT);
      MSG_STREAM: net_in_ready = !in_s.en || in_s.out || in_s.cnt < s_size(in_s);
      default:    net_in_ready = 1'b1;
    endcase
  end

  assign pe_ready = (cs_q == C_IDLE);

  // ------------------------------------------------------------ data array
  always_ff @(posedge clk) begin
    if (cs_q == C_RESP && op_q == OP_STORE && hit)
      data_q[hit_way][{a_set, a_off}] <= wdata_q;
    if (pe_push_ok)
      data_q[cur_s.way][cur_s.wr] <= wdata_q;
    if (in_fill && !bypass_q)
      data_q[vict_q][{a_set, fill_cnt_q}] <= net_in_flit.data;
    if (in_strm)
      data_q[in_s.way][in_s.wr] <= net_in_flit.data;
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q         <= C_IDLE;
      op_q         <= OP_LOAD;
      addr_q       <= '0;
      wdata_q      <= '0;
      sid_q        <= '0;
      vict_q       <= '0;
      bypass_q     <= 1'b0;
      fill_cnt_q   <= '0;
      rdata_q      <= '0;
      own_q        <= '0;
      pe_rsp_valid <= 1'b0;
      pe_rdata     <= '0;
      n_hit        <= '0;
      n_miss       <= '0;
      for (int w = 0; w < WAYS; w++) val_q[w] <= '0;
      for (int s = 0; s < SETS; s++) plru_q[s] <= '0;
      for (int s = 0; s < N_STREAMS; s++) st_q[s] <= '0;
    end else begin
      pe_rsp_valid <= 1'b0;

      // stream pointer and count updates from the three stream users
      for (int s = 0; s < N_STREAMS; s++) begin
        automatic logic inc = 1'b0, dec = 1'b0;
        if (pe_push_ok && sid_q == SIDW'(s)) begin
          st_q[s].wr <= ptr_inc(st_q[s], st_q[s].wr); inc = 1'b1;
        end
        if (pe_pop_ok && sid_q == SIDW'(s)) begin
          st_q[s].rd <= ptr_inc(st_q[s], st_q[s].rd); dec = 1'b1;
        end
        if (snd_go && snd_sid == SIDW'(s)) begin
          st_q[s].rd <= ptr_inc(st_q[s], st_q[s].rd); dec = 1'b1;
        end
        if (in_strm && in_sid == SIDW'(s)) begin
          st_q[s].wr <= ptr_inc(st_q[s], st_q[s].wr); inc = 1'b1;
        end
        if (inc && !dec) st_q[s].cnt <= st_q[s].cnt + 1'b1;
        if (dec && !inc) st_q[s].cnt <= st_q[s].cnt - 1'b1;
      end

      unique case (cs_q)
        C_IDLE: if (pe_req) begin
          op_q    <= pe_op;
          addr_q  <= pe_addr;
          wdata_q <= pe_wdata;
          sid_q   <= SIDW'(pe_sid);
          unique case (pe_op)
            OP_LOAD, OP_STORE: cs_q <= C_RESP;
            OP_SPUSH, OP_SPOP: cs_q <= C_STALL;
            OP_SMC_CMD:        cs_q <= C_CMD_A;
            OP_CFG_WAYS: begin
              for (int w = 0; w < WAYS; w++)
                if (pe_wdata[w] && !own_q[w]) val_q[w] <= '0;
              own_q        <= pe_wdata[WAYS-1:0];
              pe_rsp_valid <= 1'b1;
            end
            OP_CFG_STRM: begin
              st_q[SIDW'(pe_sid)] <= '{en: pe_wdata[31], out: pe_wdata[30],
                                      way: WYW'(pe_wdata[29:28]), dest: pe_wdata[27:20],
                                      dsid: pe_wdata[19:12], bcast: pe_wdata[11],
                                      start: pe_addr[PW-1:0], last: pe_addr[16 +: PW],
                                      rd: pe_addr[PW-1:0], wr: pe_addr[PW-1:0], cnt: '0};
              if (pe_wdata[31]) begin
                own_q[pe_wdata[29:28]] <= 1'b1;
                if (!own_q[pe_wdata[29:28]]) val_q[pe_wdata[29:28]] <= '0;
              end
              pe_rsp_valid <= 1'b1;
            end
            default: pe_rsp_valid <= 1'b1;
          endcase
        end
        // address mode: tag check on the latched request
        C_RESP: begin
          if (op_q == OP_LOAD) begin
            if (hit) begin
              pe_rdata       <= data_q[hit_way][{a_set, a_off}];
              pe_rsp_valid   <= 1'b1;
              plru_q[a_set]  <= plru_touch(plru_q[a_set], hit_way);
              n_hit          <= n_hit + 1;
              cs_q           <= C_IDLE;
            end else begin
              n_miss     <= n_miss + 1;
              vict_q     <= victim;
              bypass_q   <= !any_cache_way;
              fill_cnt_q <= '0;
              cs_q       <= C_MISS_REQ;
            end
          end else begin
            if (hit) begin
              plru_q[a_set] <= plru_touch(plru_q[a_set], hit_way);
              n_hit         <= n_hit + 1;
            end else begin
              n_miss <= n_miss + 1;
            end
            cs_q <= C_ST_A;
          end
        end
        C_MISS_REQ: if (net_out_ready) begin
          if (!bypass_q) val_q[vict_q][a_set] <= 1'b0;
          cs_q <= C_MISS_WAIT;
        end
        C_MISS_WAIT: if (in_fill) begin
          if (fill_cnt_q == a_off) rdata_q <= net_in_flit.data;
          fill_cnt_q <= fill_cnt_q + 1'b1;
          if (net_in_flit.last) begin
            if (!bypass_q) begin
              val_q[vict_q][a_set] <= 1'b1;
              tag_q[vict_q][a_set] <= a_tag;
              plru_q[a_set]        <= plru_touch(plru_q[a_set], vict_q);
            end
            pe_rdata     <= (fill_cnt_q == a_off) ? net_in_flit.data : rdata_q;
            pe_rsp_valid <= 1'b1;
            cs_q         <= C_IDLE;
          end
        end
        C_ST_A: if (net_out_ready) cs_q <= C_ST_D;
        C_ST_D: if (net_out_ready) begin
          pe_rsp_valid <= 1'b1;
          cs_q         <= C_IDLE;
        end
        C_CMD_A: if (net_out_ready) cs_q <= C_CMD_B;
        C_CMD_B: if (net_out_ready) begin
          pe_rsp_valid <= 1'b1;
          cs_q         <= C_IDLE;
        end
        // stream operation waiting for room or data
        C_STALL: begin
          if (pe_push_ok) begin
            pe_rsp_valid <= 1'b1;
            cs_q         <= C_IDLE;
          end else if (pe_pop_ok) begin
            pe_rdata     <= data_q[cur_s.way][cur_s.rd];
            pe_rsp_valid <= 1'b1;
            cs_q         <= C_IDLE;
          end
        end
        default: cs_q <= C_IDLE;
      endcase
    end
  end

  // a flit leaves only with valid; streams never exceed their region
  a_cnt: assert property (@(posedge clk) disable iff (!rst_n)
                          !(st_q[0].en) || st_q[0].cnt <= s_size(st_q[0]));

endmodule
