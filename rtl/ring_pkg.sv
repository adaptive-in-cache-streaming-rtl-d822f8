// ring_pkg: message format of the ring interconnect.
//
// The interconnect moves messages made of one or more flits between the
// in-cache stream controllers and the main memory controller, point to point
// or as a broadcast.  Every flit carries the routing fields so that a node
// can route it on its own; `last` marks the final flit of a message.  The
// message kinds and the field widths are this design's choices.
package ring_pkg;

  localparam int NODE_W = 8;

  typedef enum logic [2:0] {
    MSG_RD_REQ  = 3'd0,  // cache line read: data = word address
    MSG_RD_RSP  = 3'd1,  // cache line data, LINE_WORDS flits
    MSG_WR_REQ  = 3'd2,  // write-through store: flit 0 address, flit 1 data
    MSG_STREAM  = 3'd3,  // stream data word for stream `sid`
    MSG_SMC_CMD = 3'd4,  // stream command to the SMC: flits = command words
    MSG_WR_ACK  = 3'd5   // store completed
  } msg_e;

  typedef struct packed {
    logic              bcast;
    logic [NODE_W-1:0] src;
    logic [NODE_W-1:0] dst;
    msg_e              mtype;
    logic [7:0]        sid;
    logic              last;
    logic [31:0]       data;
  } flit_t;

endpackage
