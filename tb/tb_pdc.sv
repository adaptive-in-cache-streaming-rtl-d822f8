// tb_pdc: self-checking test of the pattern description controller.
//
// Loads descriptor graphs into a desc_mem and compares the PDC's address
// stream with reference sequences computed here:
//  1. the two-level graph with modifier chains of the worked example
//     (16-word-wide region, d1 -> {d2, d3}); expected addresses listed by hand
//  2. an 8x8 zig-zag scan (two top-level chains with modifier chains),
//     checked against a zig-zag walk computed by diagonals
//  3. the tiled pattern (128 x 72 tiles in a 512-wide matrix) in row mode,
//     as a three-level graph,
//     checked against nested loops
// The consumer's ready is randomised; inside one descriptor an address must
// follow every cycle in which ready was high.
module tb_pdc;
  import pdc_pkg::*;
  import tb_desc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, row_mode, busy, done, err;
  ref_t        start_ref;
  logic [31:0] start_off;
  logic        out_valid, out_ready;
  logic [31:0] out_addr;
  logic [15:0] out_len, n_solved;
  logic        p_rd, p_we;
  ref_t        p_addr, p_waddr;
  logic [63:0] p_rdata, p_wdata;
  logic [3:0]  p_be;

  // testbench programming port (used while the PDC is idle)
  logic        t_we = 0;
  ref_t        t_waddr = '0;
  logic [63:0] t_wdata = '0;
  logic [63:0] unused_b;

  desc_mem u_mem (
    .clk,
    .a_rd(p_rd), .a_addr(p_addr), .a_rdata(p_rdata),
    .a_we(p_we | t_we), .a_waddr(t_we ? t_waddr : p_waddr),
    .a_wdata(t_we ? t_wdata : p_wdata), .a_be(t_we ? 4'hF : p_be),
    .b_rd(1'b0), .b_addr('0), .b_rdata(unused_b),
    .b_we(1'b0), .b_waddr('0), .b_wdata('0), .b_be('0)
  );

  pdc u_dut (
    .clk, .rst_n, .start, .start_ref, .start_off, .row_mode, .busy, .done, .err,
    .out_valid, .out_ready, .out_addr, .out_len,
    .mem_rd(p_rd), .mem_addr(p_addr), .mem_rdata(p_rdata),
    .mem_we(p_we), .mem_waddr(p_waddr), .mem_wdata(p_wdata), .mem_be(p_be),
    .n_desc_solved(n_solved)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int r, word_q_t w);
    foreach (w[i]) begin
      @(negedge clk);
      t_we = 1; t_waddr = ref_t'(r + i); t_wdata = w[i];
    end
    @(negedge clk);
    t_we = 0;
  endtask

  int unsigned got_a[$];
  int unsigned got_l[$];
  bit rand_ready;
  int gap_fail;

  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (out_valid && out_ready) begin
    got_a.push_back(out_addr);
    got_l.push_back(int'(out_len));
  end

  task automatic run(int r, int off, bit rm);
    got_a.delete(); got_l.delete();
    @(negedge clk);
    start = 1; start_ref = ref_t'(r); start_off = off; row_mode = rm;
    @(negedge clk);
    start = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic cmp(string name, int unsigned exp[$]);
    checks++;
    if (got_a.size() != exp.size()) begin
      failures++;
      $display("%s: %0d addresses, expected %0d", name, got_a.size(), exp.size());
    end
    foreach (exp[i]) begin
      checks++;
      if (i >= got_a.size() || got_a[i] != exp[i]) begin
        failures++;
        if (failures < 20) $display("%s[%0d]: got %0d expected %0d", name, i,
                                    (i < got_a.size()) ? got_a[i] : -1, exp[i]);
      end
    end
  endtask

  // a run of addresses of one descriptor: no idle cycle while ready is high
  int run_len, max_run;
  always @(posedge clk) begin
    if (out_valid && out_ready) run_len <= run_len + 1;
    else if (out_ready) run_len <= 0;
    if (run_len > max_run) max_run <= run_len;
  end

  int unsigned exp_a[$];
  int unsigned base;

  initial begin
    start = 0; start_ref = '0; start_off = '0; row_mode = 0; rand_ready = 0;
    run_len = 0; max_run = 0; gap_fail = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- 1. worked example graph
    put(0,  encode(0, 1, '{64}, '{2}, 0, '{}, 0, 255, 4));
    put(4,  encode(0, 4, '{32, 8}, '{2, 2}, M_HSIZE, '{-2}, 1, 10, 255));
    put(10, encode(16, 4, '{8, 32}, '{2, 2}, M_OFFSET | M_HSIZE, '{2, 2}, 1, 255, 255));
    base = 256;
    exp_a = '{};
    begin
      int unsigned e[$] = '{0,1,2,3,32,33,34,35,8,9,10,11,40,41,42,43,
                  16,17,18,19,24,25,26,27,48,49,50,51,56,57,58,59,
                  64,65,96,97,72,73,104,105,
                  82,83,84,85,86,87,90,91,92,93,94,95,
                  114,115,116,117,118,119,122,123,124,125,126,127};
      foreach (e[i]) exp_a.push_back(e[i] + base);
    end
    run(0, base, 0);
    cmp("example", exp_a);
    checks++;
    if (max_run < 16) begin failures++; $display("no 16-address back-to-back run (max %0d)", max_run); end
    checks++;
    if (n_solved != 16'd5) begin failures++; $display("solved %0d descriptors, expected 5", n_solved); end
    // the modifier chains have been applied once (iter 1 -> 0): a second run
    // repeats the modified pattern without further change
    run(0, 0, 0);
    checks++;
    if (got_a.size() != 64 || got_a[0] != 0 || got_a[1] != 1 || got_a[2] != 32) begin
      failures++; $display("second run after modification wrong (%0d addresses)", got_a.size());
    end

    // ---------------- 2. zig-zag 8x8, random back-pressure
    rand_ready = 1;
    put(20, encode(0, 1, '{0}, '{4}, 0, '{}, 0, 36, 24));
    put(24, encode(0, 1, '{-7}, '{1}, M_OFFSET | m_vsize(1), '{16, 2}, 4, 30, 255));
    put(30, encode(1, 1, '{7}, '{2}, M_OFFSET | m_vsize(1), '{2, 2}, 4, 255, 255));
    put(36, encode(0, 1, '{0}, '{3}, 0, '{}, 0, 52, 40));
    put(40, encode(57, 1, '{-7}, '{7}, M_OFFSET | m_vsize(1), '{2, -2}, 3, 46, 255));
    put(46, encode(23, 1, '{7}, '{6}, M_OFFSET | m_vsize(1), '{16, -2}, 3, 255, 255));
    put(52, encode(63, 1, '{}, '{}, 0, '{}, 0, 255, 255));
    exp_a = '{};
    for (int s = 0; s < 15; s++) begin
      int lo, hi;
      lo = (s > 7) ? s - 7 : 0;
      hi = (s < 7) ? s : 7;
      if (s % 2 == 0) for (int r = hi; r >= lo; r--) exp_a.push_back(r*8 + (s - r));
      else            for (int r = lo; r <= hi; r++) exp_a.push_back(r*8 + (s - r));
    end
    run(20, 1000, 0);
    foreach (exp_a[i]) exp_a[i] += 1000;
    cmp("zigzag", exp_a);

    // ---------------- 3. tiled, row mode
    rand_ready = 0;
    // the tile-row stride 72*512 = 36864 does not fit a signed 16-bit stride:
    // d0 steps 18432 per tile row and d1 adds another 18432 through its
    // modifier chain, d2 is one 128 x 72 tile
    put(60, encode(0, 1, '{18432}, '{7}, 0, '{}, 0, 255, 64));
    put(64, encode(0, 1, '{128}, '{4}, M_OFFSET, '{18432}, 6, 255, 68));
    put(68, encode(0, 128, '{512}, '{72}, 0, '{}, 0, 255, 255));
    exp_a = '{};
    for (int T = 0; T < 7; T++)
      for (int t = 0; t < 4; t++)
        for (int r = 0; r < 72; r++) exp_a.push_back(T*36864 + t*128 + r*512);
    run(60, 0, 1);
    cmp("tiled_rows", exp_a);
    checks++;
    if (got_l.size() == 0 || got_l[0] != 128) begin failures++; $display("row length wrong"); end
    checks++;
    if (err) begin failures++; $display("unexpected err"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
