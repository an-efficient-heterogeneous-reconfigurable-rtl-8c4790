// tb_rfu_config_mem: loads the four configuration parts and a CI table in
// which several CIs share one P1 entry (same functions and connections,
// different inputs, outputs and immediates), reads every CI back and compares
// with a model; checks the one-cycle read latency, that the output holds
// without rd_en, and that rewriting a shared P1 entry changes every CI that
// uses it while leaving its other parts alone.
module tb_rfu_config_mem;
  import rfu_pkg::*;

  localparam int N = 128;
  localparam int AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic ci_we = 0, p1_we = 0, p2_we = 0, p3_we = 0, p4_we = 0, rd_en = 0;
  logic [AW-1:0] ci_waddr, p1_waddr, p2_waddr, p3_waddr, p4_waddr, rd_ci;
  logic [4*AW-1:0] ci_wdata;
  p1_t p1_wdata; p2_t p2_wdata; p3_t p3_wdata; p4_t p4_wdata;
  ci_cfg_t cfg;
  int checks = 0, failures = 0;

  p1_t m1 [N]; p2_t m2 [N]; p3_t m3 [N]; p4_t m4 [N];
  int  mci [N][4];

  rfu_config_mem dut (.*);

  always #5 clk = ~clk;

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  task automatic wr_parts(int idx);
    @(negedge clk);
    m1[idx] = p1_t'(rnd256()); m2[idx] = p2_t'(rnd256());
    m3[idx] = p3_t'(rnd256()); m4[idx] = p4_t'(rnd256());
    p1_we = 1; p1_waddr = AW'(idx); p1_wdata = m1[idx];
    p2_we = 1; p2_waddr = AW'(idx); p2_wdata = m2[idx];
    p3_we = 1; p3_waddr = AW'(idx); p3_wdata = m3[idx];
    p4_we = 1; p4_waddr = AW'(idx); p4_wdata = m4[idx];
    @(negedge clk);
    p1_we = 0; p2_we = 0; p3_we = 0; p4_we = 0;
  endtask

  task automatic wr_ci(int ci, int a, int b, int c, int d);
    @(negedge clk);
    mci[ci] = '{a, b, c, d};
    ci_we = 1; ci_waddr = AW'(ci);
    ci_wdata = {AW'(a), AW'(b), AW'(c), AW'(d)};
    @(negedge clk);
    ci_we = 0;
  endtask

  task automatic rd_check(int ci);
    ci_cfg_t e;
    @(negedge clk);
    rd_en = 1; rd_ci = AW'(ci);
    @(negedge clk);
    rd_en = 0;
    rd_ci = AW'($urandom);
    e = '{p1: m1[mci[ci][0]], p2: m2[mci[ci][1]], p3: m3[mci[ci][2]], p4: m4[mci[ci][3]]};
    checks++;
    if (cfg !== e) begin failures++; $display("FAIL read of CI %0d", ci); end
    @(negedge clk);
    checks++;
    if (cfg !== e) begin failures++; $display("FAIL hold of CI %0d", ci); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (cfg !== '0) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 16; i++) wr_parts(i);
    wr_parts(N - 1);
    // CIs 0..3 share P1 entry 5; CI 4..7 have their own; CI 127 uses the last entries
    for (int ci = 0; ci < 4; ci++) wr_ci(ci, 5, ci, ci + 4, 15 - ci);
    for (int ci = 4; ci < 8; ci++) wr_ci(ci, ci + 4, ci, ci, ci);
    wr_ci(N - 1, N - 1, N - 1, 0, N - 1);
    for (int ci = 0; ci < 8; ci++) rd_check(ci);
    rd_check(N - 1);
    // partial reconfiguration: new P1 at entry 5
    @(negedge clk);
    m1[5] = p1_t'(rnd256());
    p1_we = 1; p1_waddr = AW'(5); p1_wdata = m1[5];
    @(negedge clk);
    p1_we = 0;
    for (int ci = 0; ci < 4; ci++) rd_check(ci);
    // order of reads does not matter
    for (int k = 0; k < 30; k++) rd_check($urandom_range(0, 7));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
