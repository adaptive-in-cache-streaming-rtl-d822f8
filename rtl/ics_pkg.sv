// ics_pkg: types shared by the in-cache stream controller and its users.
//
// pe_op_e lists the operations a processing element issues to its in-cache
// stream controller through the memory-mapped request port.  The encodings,
// and the packing of the configuration words described at each operation,
// are this design's choices.
package ics_pkg;

  typedef enum logic [2:0] {
    OP_LOAD     = 3'd0,  // address-mode load  (addr = word address)
    OP_STORE    = 3'd1,  // address-mode store (write-through, no allocate)
    OP_SPUSH    = 3'd2,  // append wdata to output stream sid
    OP_SPOP     = 3'd3,  // take the next word of input stream sid
    OP_CFG_WAYS = 3'd4,  // wdata[WAYS-1:0]: 1 = way owned by the stream controller
    OP_CFG_STRM = 3'd5,  // stream table entry sid, see icsc
    OP_SMC_CMD  = 3'd6   // send a stream command (wdata, addr) to the SMC
  } pe_op_e;

  // SMC stream command, first command word (the second is the base offset).
  typedef enum logic [1:0] {
    SMC_DIRECT  = 2'd0,  // one single-word memory access per address
    SMC_BURST   = 2'd1,  // contiguous blocks as bursts of up to 256 words
    SMC_REORDER = 2'd2   // prefetch a region with bursts, reorder from buffer
  } smc_mode_e;

  typedef struct packed {
    smc_mode_e  mode;
    logic       store;     // 1: write the incoming stream to memory
    logic       bcast;     // broadcast the stream to every PE
    logic [3:0] rsv;
    logic [7:0] pref_ref;  // prefetch descriptor (SMC_REORDER)
    logic [7:0] ref_addr;  // stream pattern descriptor
    logic [7:0] sid;       // stream id at the destination
  } smc_cmd_t;

endpackage
