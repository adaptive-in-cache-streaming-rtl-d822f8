// tb_dcu: self-checking test of the dynamic chain unit.
// A descriptor at word 10 with two dynamic pairs and the target mask
// {offset, hsize, vsize_2} with fmods {+2, -1, +5} must produce the writes
// offset+2 (word 10 lanes 0-1), hsize-1 (word 10 lane 2), vsize_2+5 (word 11
// lane 3) and the header with iter-1 (word 10 lane 3), in that order.  A
// descriptor with iter 0 must produce no write.
module tb_dcu;
  import pdc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0, busy, done, wr_en;
  desc_t       desc;
  ref_t        wr_addr;
  logic [63:0] wr_data;
  logic [3:0]  wr_be;

  dcu u_dut (.clk, .rst_n, .start, .desc, .busy, .done, .wr_en, .wr_addr, .wr_data, .wr_be);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int a; logic [15:0] v; int lane; } wr_t;
  wr_t w[$];
  always @(posedge clk) if (wr_en)
    for (int l = 0; l < 4; l++) if (wr_be[l]) w.push_back('{int'(wr_addr), wr_data[16*l +: 16], l});

  task automatic run();
    w.delete();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic expect_w(int i, int a, int lane, logic [15:0] v);
    checks++;
    if (i >= w.size() || w[i].a != a || w[i].lane != lane || w[i].v != v) begin
      failures++; $display("write %0d wrong", i);
    end
  endtask

  initial begin
    desc = '0;
    desc.ref_addr = 10;
    desc.hdr = '{size: 3'd2, msize: 2'd3, iter: 10'd7, graph_p: 1'b0};
    desc.offset = 32'h0001_FFFF; desc.hsize = 16'd9;
    desc.stride[0] = 16'd4; desc.vsize[0] = 16'd3;
    desc.stride[1] = 16'd8; desc.vsize[1] = 16'd6;
    desc.mask = 16'b0010_0011;  // offset, hsize, vsize_2
    desc.fmod[0] = 16'd2; desc.fmod[1] = 16'hFFFF; desc.fmod[2] = 16'd5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run();
    checks++;
    if (w.size() != 5) begin failures++; $display("%0d lane writes, expected 5", w.size()); end
    expect_w(0, 10, 0, 16'h0001);          // offset 0x1FFFF + 2 = 0x20001
    expect_w(1, 10, 1, 16'h0002);
    expect_w(2, 10, 2, 16'd8);             // hsize 9 - 1
    expect_w(3, 11, 3, 16'd11);            // vsize_2 6 + 5
    expect_w(4, 10, 3, {3'd2, 2'd3, 10'd6, 1'b0});
    desc.hdr.iter = 0;
    run();
    checks++;
    if (w.size() != 0) begin failures++; $display("iter 0 still modified"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
