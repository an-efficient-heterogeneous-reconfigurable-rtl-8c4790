// tb_profiler: feeds the profiler a committed-PC stream made of straight-line
// runs and jumps among 20 basic-block targets (more than the 16 table
// entries), with idle cycles in between, and compares with a model: number
// of taken branches, table contents in insertion order, counts, hot flags,
// hot-block events with their addresses, dropped addresses once the table is
// full, the effect of disabling and of clear.
module tb_profiler;
  import rfu_pkg::*;

  localparam int E = 16;
  localparam int TARGETS = 20;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1, clear = 1'b0, pc_valid = 1'b0;
  logic [31:0] pc = '0;
  logic [15:0] threshold = 16'd5;
  logic taken, hot_new, dropped, full, rd_valid, rd_hot;
  logic [31:0] hot_addr, rd_addr;
  logic [15:0] rd_count;
  logic [3:0] rd_idx = '0;
  int checks = 0, failures = 0;

  // model
  logic [31:0] m_addr [E];
  int          m_cnt  [E];
  int          m_used = 0, m_taken = 0, m_drop = 0, m_hot = 0;
  logic [31:0] m_hot_q [$];
  logic [31:0] last_pc;
  bit          have_last = 0;
  int          d_taken = 0, d_drop = 0, d_hot = 0;

  profiler dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n && !clear) begin
    if (taken) d_taken++;
    if (dropped) d_drop++;
    if (hot_new) begin
      d_hot++;
      chk(m_hot_q.size() > 0 && hot_addr == m_hot_q[0], "hot block address");
      if (m_hot_q.size() > 0) void'(m_hot_q.pop_front());
    end
  end

  function automatic void model(logic [31:0] a);
    int f = -1;
    if (have_last && a != last_pc + 4) begin
      m_taken++;
      for (int i = 0; i < m_used; i++) if (m_addr[i] == a) f = i;
      if (f >= 0) begin
        if (m_cnt[f] < 65535) begin
          m_cnt[f]++;
          if (m_cnt[f] == threshold) begin m_hot++; m_hot_q.push_back(a); end
        end
      end else if (m_used < E) begin
        m_addr[m_used] = a; m_cnt[m_used] = 1; m_used++;
        if (threshold == 1) begin m_hot++; m_hot_q.push_back(a); end
      end else m_drop++;
    end
    last_pc = a; have_last = 1;
  endfunction

  task automatic send(logic [31:0] a);
    @(negedge clk);
    pc_valid = 1; pc = a;
    if (enable) model(a);
    @(negedge clk);
    pc_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  task automatic compare_table();
    repeat (3) @(negedge clk);
    for (int i = 0; i < E; i++) begin
      rd_idx = 4'(i); #1;
      chk(rd_valid == (i < m_used), "entry valid");
      if (i < m_used) begin
        chk(rd_addr == m_addr[i], "entry address");
        chk(rd_count == 16'(m_cnt[i]), "entry count");
        chk(rd_hot == (m_cnt[i] >= threshold), "entry hot");
      end
    end
    chk(full == (m_used == E), "full flag");
    chk(d_taken == m_taken, "taken branch count");
    chk(d_drop == m_drop, "dropped count");
    chk(d_hot == m_hot, "hot event count");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 1: eight targets only, repeated (hot blocks appear)
    p = 32'h0040_0000;
    for (int k = 0; k < 120; k++) begin
      repeat ($urandom_range(1, 4)) begin send(p); p += 4; end
      p = 32'h0040_1000 + 32'h40 * $urandom_range(0, 7);
    end
    compare_table();
    // phase 2: twenty targets, the table fills and later new ones are dropped
    for (int k = 0; k < 300; k++) begin
      repeat ($urandom_range(1, 3)) begin send(p); p += 4; end
      p = 32'h0040_1000 + 32'h40 * $urandom_range(0, TARGETS - 1);
    end
    compare_table();
    chk(m_drop > 0 && m_hot > 0 && full, "table filled, drops and hot blocks seen");
    // disabled (normal mode): nothing changes
    enable = 0;
    for (int k = 0; k < 20; k++) send(32'h0050_0000 + 32'h100 * k);
    enable = 1;
    have_last = 0;   // the PC registers still hold a PC from before
    compare_table();
    // clear empties the table
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    m_used = 0;
    #1;
    chk(!full, "clear");
    for (int i = 0; i < E; i++) begin rd_idx = 4'(i); #1; chk(!rd_valid, "cleared entry"); end
    $display("taken=%0d hot=%0d dropped=%0d", m_taken, m_hot, m_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
