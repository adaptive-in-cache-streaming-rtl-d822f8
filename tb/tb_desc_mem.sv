// tb_desc_mem: self-checking test of the dual-port descriptor memory:
// full-word writes, 16-bit lane writes, synchronous reads on both ports, and
// port B winning a same-lane collision.
module tb_desc_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        a_rd = 0, a_we = 0, b_rd = 0, b_we = 0;
  logic [7:0]  a_addr = 0, a_waddr = 0, b_addr = 0, b_waddr = 0;
  logic [63:0] a_rdata, b_rdata, a_wdata = 0, b_wdata = 0;
  logic [3:0]  a_be = 0, b_be = 0;

  desc_mem u_dut (.clk, .a_rd, .a_addr, .a_rdata, .a_we, .a_waddr, .a_wdata, .a_be,
                  .b_rd, .b_addr, .b_rdata, .b_we, .b_waddr, .b_wdata, .b_be);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] model [256];

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a_we = 1; a_waddr = 8'(i); a_wdata = {32'(i * 7), 32'(~i)}; a_be = 4'hF;
      model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    // random lane writes on both ports
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      a_we = 1; a_waddr = 8'($urandom); a_wdata = {$urandom, $urandom}; a_be = 4'($urandom);
      b_we = 1; b_waddr = 8'($urandom); b_wdata = {$urandom, $urandom}; b_be = 4'($urandom);
      if (n % 10 == 0) b_waddr = a_waddr;
      for (int l = 0; l < 4; l++) begin
        if (a_be[l] && !(b_be[l] && b_waddr == a_waddr)) model[a_waddr][16*l +: 16] = a_wdata[16*l +: 16];
        if (b_be[l]) model[b_waddr][16*l +: 16] = b_wdata[16*l +: 16];
      end
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); a_rd = 1; a_addr = 8'(i); b_rd = 1; b_addr = 8'(255 - i);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== model[i])       begin failures++; $display("port A word %0d", i); end
      if (b_rdata !== model[255 - i]) begin failures++; $display("port B word %0d", 255 - i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
