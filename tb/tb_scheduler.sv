// tb_scheduler: loads CI start addresses, lengths and cycle counts, then
// presents PCs as a halted-on-demand core would. For each CI it checks the
// exact cycle of every step: halt and configuration read in the matching
// cycle, RFU start one cycle later, commit after the stored number of cycles,
// the extra write-back cycle when the CI has outputs 4/5, the new PC
// (start + 4 * length) and the release of halt. PCs without a valid entry,
// and any PC while the scheduler is disabled (training mode), must not halt.
module tb_scheduler;
  import rfu_pkg::*;

  localparam int N = 128;
  localparam int AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic tab_we = 0, tab_wvalid;
  logic [AW-1:0] tab_waddr;
  logic [PC_W-1:0] tab_wpc;
  logic [7:0] tab_wlen;
  logic [3:0] tab_wcycles;
  logic pc_valid = 0;
  logic [PC_W-1:0] pc = '0;
  logic halt, pc_set_valid, cfg_rd_en, rfu_start, rfu_commit, rfu_wb_extra = 0;
  logic [PC_W-1:0] pc_set;
  logic [AW-1:0] cfg_rd_ci;
  int checks = 0, failures = 0, n_extra = 0, n_ci = 0;

  scheduler dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic load(int idx, bit v, logic [31:0] a, int len, int cyc);
    @(negedge clk);
    tab_we = 1; tab_waddr = AW'(idx); tab_wvalid = v; tab_wpc = a;
    tab_wlen = 8'(len); tab_wcycles = 4'(cyc);
    @(negedge clk);
    tab_we = 0;
  endtask

  // present one PC; if a CI is expected, follow it cycle by cycle
  task automatic present(logic [31:0] a, bit exp_hit, int ci, int len, int cyc, bit extra);
    @(negedge clk);
    pc_valid = 1; pc = a; rfu_wb_extra = extra;
    #1;
    chk(halt == exp_hit, "halt in matching cycle");
    chk(cfg_rd_en == exp_hit, "configuration read");
    if (exp_hit) chk(cfg_rd_ci == AW'(ci), "CI number");
    chk(!rfu_start && !rfu_commit && !pc_set_valid, "quiet in matching cycle");
    if (!exp_hit) return;
    n_ci++;
    @(negedge clk); #1;                     // start cycle
    chk(halt && rfu_start && !rfu_commit && !pc_set_valid, "start cycle");
    for (int k = 1; k <= cyc; k++) begin
      @(negedge clk); #1;
      chk(halt && !rfu_start, "halt while running");
      chk(rfu_commit == (k == cyc), "commit after stored cycles");
      chk(pc_set_valid == (k == cyc && !extra), "pc set without extra cycle");
    end
    if (extra) begin
      n_extra++;
      @(negedge clk); #1;
      chk(halt && !rfu_commit && pc_set_valid, "extra write-back cycle");
    end
    chk(pc_set == a + 32'(4 * len), "new PC");
    @(negedge clk);
    pc = a + 32'(4 * len); #1;
    chk(!halt && !pc_set_valid, "halt released");
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
    load(3,   1, 32'h0040_0100, 10, 2);
    load(77,  1, 32'h0040_0200, 5,  1);
    load(127, 1, 32'h0040_0300, 20, 4);
    load(10,  0, 32'h0040_0400, 3,  1);
    load(11,  1, 32'h0040_0500, 7, 15);
    // training mode: nothing happens
    present(32'h0040_0100, 0, 0, 0, 0, 0);
    @(negedge clk); pc_valid = 0; enable = 1;
    present(32'h0040_0104, 0, 0, 0, 0, 0);
    present(32'h0040_0100, 1, 3,   10, 2,  0);
    present(32'h0040_0200, 1, 77,  5,  1,  1);
    present(32'h0040_0300, 1, 127, 20, 4,  1);
    present(32'h0040_0400, 0, 0, 0, 0, 0);   // invalid entry
    present(32'h0040_0500, 1, 11,  7,  15, 0);
    present(32'h0040_0200, 1, 77,  5,  1,  0);
    // pc_valid low: no match
    @(negedge clk); pc_valid = 0; pc = 32'h0040_0100; #1;
    chk(!halt, "no halt without pc_valid");
    chk(n_extra == 2 && n_ci == 5, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
