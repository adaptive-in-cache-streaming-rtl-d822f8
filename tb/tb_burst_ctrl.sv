// tb_burst_ctrl: self-checking test of the burst controller.  Regions of
// 1024, 300, 16, 256 and 1 words must be split into bursts of at most 256
// words covering each region exactly, under random back-pressure.
module tb_burst_ctrl;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        req_valid = 0, req_ready, burst_valid, burst_ready, idle;
  logic [31:0] req_addr = 0, burst_addr;
  logic [15:0] req_len = 0, burst_len;

  burst_ctrl u_dut (.clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_len,
                    .burst_valid, .burst_ready, .burst_addr, .burst_len, .idle);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) burst_ready <= ($urandom_range(0, 3) != 0);
  int unsigned ga[$], gl[$];
  always @(posedge clk) if (burst_valid && burst_ready) begin
    ga.push_back(burst_addr); gl.push_back(burst_len);
  end

  int unsigned ra[5] = '{1000, 5000, 20, 9000, 77};
  int unsigned rl[5] = '{1024, 300, 16, 256, 1};
  int unsigned ea[$], el[$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) begin
      int unsigned a, l;
      a = ra[i]; l = rl[i];
      while (l > 0) begin
        ea.push_back(a); el.push_back(l > 256 ? 256 : l);
        a += (l > 256 ? 256 : l); l -= (l > 256 ? 256 : l);
      end
    end
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); req_valid = 1; req_addr = ra[i]; req_len = 16'(rl[i]);
      #1; while (!req_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); req_valid = 0;
    repeat (3) @(posedge clk);
    while (!idle) @(posedge clk);
    checks++;
    if (ga.size() != ea.size()) begin failures++; $display("%0d bursts, expected %0d", ga.size(), ea.size()); end
    foreach (ea[i]) begin
      checks++;
      if (i >= ga.size() || ga[i] != ea[i] || gl[i] != el[i]) begin
        failures++; $display("burst %0d wrong: %0d/%0d vs %0d/%0d", i, ga[i], gl[i], ea[i], el[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
