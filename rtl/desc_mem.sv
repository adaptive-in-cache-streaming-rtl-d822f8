// desc_mem: pattern descriptor memory of the stream management controller.
//
// A 256 x 64-bit scratchpad (the size the evaluated prototype uses) holding
// the descriptor graphs.  It has two ports so that the streaming PDC and the
// prefetching PDC can read their descriptors independently; each port can
// also write, with one enable per 16-bit lane, which the dynamic chain units
// use to store modified descriptor fields.  Reads are synchronous: data
// appears the cycle after the address.  If both ports write the same lane of
// the same word in one cycle, port B wins (a choice of this design).
module desc_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A
  input  logic          a_rd,
  input  logic [AW-1:0] a_addr,
  output logic [63:0]   a_rdata,
  input  logic          a_we,
  input  logic [AW-1:0] a_waddr,
  input  logic [63:0]   a_wdata,
  input  logic [3:0]    a_be,
  // port B
  input  logic          b_rd,
  input  logic [AW-1:0] b_addr,
  output logic [63:0]   b_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_waddr,
  input  logic [63:0]   b_wdata,
  input  logic [3:0]    b_be
);

  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_rd) a_rdata <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_addr];
    for (int l = 0; l < 4; l++) begin
      if (a_we && a_be[l] && !(b_we && b_be[l] && b_waddr == a_waddr))
        mem[a_waddr][16*l +: 16] <= a_wdata[16*l +: 16];
      if (b_we && b_be[l])
        mem[b_waddr][16*l +: 16] <= b_wdata[16*l +: 16];
    end
  end

endmodule
