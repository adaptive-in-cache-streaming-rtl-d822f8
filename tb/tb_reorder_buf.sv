// tb_reorder_buf: self-checking test of the reorder buffer.  Reads in a
// scrambled order must wait until their word has been filled and then return
// it; words replaced by a fill with another tag must not be returned.
module tb_reorder_buf;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        clear = 0, fill_valid = 0, rd_valid = 0, rd_ready, out_valid, out_ready = 1;
  logic [31:0] fill_addr = 0, fill_data = 0, rd_base = 0, rd_off = 0, out_data, n_hit, n_wait;

  reorder_buf u_dut (.clk, .rst_n, .clear, .fill_valid, .fill_addr, .fill_data, .rd_base,
                     .rd_valid, .rd_ready, .rd_off, .out_valid, .out_ready, .out_data,
                     .n_hit, .n_wait);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] val(int a); return 32'(a) ^ 32'h5A5A_0000; endfunction

  logic [31:0] got[$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_data);

  int order[$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) order.push_back((i * 37) % 64);
    fork
      begin  // filler: words 4096..4159 in address order, slowly
        repeat (10) @(posedge clk);
        for (int i = 0; i < 64; i++) begin
          @(negedge clk); fill_valid = 1; fill_addr = 4096 + i; fill_data = val(4096 + i);
          @(negedge clk); fill_valid = 0;
        end
      end
      begin  // reader
        rd_base = 4096;
        foreach (order[i]) begin
          @(negedge clk); rd_valid = 1; rd_off = order[i];
          #1; while (!rd_ready) begin @(negedge clk); #1; end
          @(posedge clk);
        end
        @(negedge clk); rd_valid = 0;
      end
    join
    repeat (3) @(posedge clk);
    foreach (order[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== val(4096 + order[i])) begin failures++; $display("read %0d", i); end
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("reads never had to wait"); end
    // overwrite line of 4096 with 4096+1024: a read of 4096 must now wait
    @(negedge clk); fill_valid = 1; fill_addr = 4096 + 1024; fill_data = 1;
    @(negedge clk); fill_valid = 0; rd_valid = 1; rd_off = 0;
    #1;
    checks++;
    if (rd_ready) begin failures++; $display("stale word returned"); end
    @(negedge clk); rd_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
