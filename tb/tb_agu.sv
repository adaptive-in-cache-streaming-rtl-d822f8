// tb_agu: self-checking test of the address generation unit.
// A 3-D descriptor (hsize 3, pairs {10,4} and {-50,2}, offset 100, base 1000)
// is compared with nested loops; it must produce one address per cycle.
// Row mode must give one {start, hsize} item per contiguous block, and an
// empty descriptor must finish without output.
module tb_agu;
  import pdc_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start = 0, row_mode = 0, busy, out_valid, out_last, done;
  logic        out_ready = 1;
  desc_t       desc;
  logic [31:0] rel_base = '0, out_addr;
  logic [15:0] out_len;

  agu u_dut (.clk, .rst_n, .start, .desc, .rel_base, .row_mode, .busy,
             .out_valid, .out_ready, .out_addr, .out_len, .out_last, .done);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned got[$], lens[$];
  int lasts;
  always @(posedge clk) if (out_valid && out_ready) begin
    got.push_back(out_addr); lens.push_back(out_len);
    if (out_last) lasts++;
  end

  task automatic run(bit rm, output int cycles);
    int t0;
    got.delete(); lens.delete(); lasts = 0;
    @(negedge clk); start = 1; row_mode = rm;
    t0 = $time / 10;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    cycles = $time / 10 - t0;
  endtask

  int unsigned exp[$];
  int cyc;

  initial begin
    desc = '0;
    desc.hdr.size = 3'd2;
    desc.offset = 100; desc.hsize = 3;
    desc.stride[0] = 16'd10;            desc.vsize[0] = 4;
    desc.stride[1] = 16'(-50);          desc.vsize[1] = 2;
    rel_base = 1000;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 4; a++)
        for (int x = 0; x < 3; x++) exp.push_back(1000 + 100 + x + 10*a - 50*b);
    run(0, cyc);
    checks++;
    if (got != exp) begin failures++; $display("address sequence wrong"); end
    checks++;
    if (cyc != 25) begin failures++; $display("24 addresses took %0d cycles", cyc); end
    checks++;
    if (lasts != 1) begin failures++; $display("out_last seen %0d times", lasts); end

    exp.delete();
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < 4; a++) exp.push_back(1100 + 10*a - 50*b);
    run(1, cyc);
    checks++;
    if (got != exp) begin failures++; $display("row sequence wrong"); end
    checks++;
    if (lens.size() != 8 || lens[0] != 3) begin failures++; $display("row lengths wrong"); end

    desc.vsize[1] = 0;
    run(0, cyc);
    checks++;
    if (got.size() != 0) begin failures++; $display("empty descriptor produced output"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
