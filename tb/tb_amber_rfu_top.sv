// tb_amber_rfu_top: end-to-end run of the extension hardware with a
// behavioural single-issue core and register file, at default parameters.
//
// Program (one instruction per cycle, 4-byte instructions):
//   0x400000..0x40000c  preamble, jump to A
//   A 0x400100..0x400124  10 instructions: software version of data-flow
//                         graph G with inputs r1,r9..r15, results r16..r21
//   0x400128            branch: to B while iter < 5, else to the stubs
//   B 0x400200..0x400210  5 instructions: G with other inputs (r16..r23) and
//                         immediates, four results r24..r27
//   0x400214            r1 += 1 (through the shared write port), jump to A
//   stubs 0x401000 + 0x40*k, k = 0..17: one jump each, then the end
// Phase 1, training mode: the program runs in software; the profiler must
// find A and B hot (threshold 4) with exact counts, fill its table on the
// stubs and drop the rest.
// Phase 2: CI 0 (A: 10 instructions, 2 cycles, 6 outputs) and CI 1 (B:
// 5 instructions, 1 cycle, 4 outputs) are loaded; both use one P1 entry and
// differ in P2, P3, P4. Phase 3, normal mode, same initial registers: the
// scheduler must replace every A and B by the RFU, with halt lasting
// 1 + 1 + cycles (+1 for outputs 5-6) cycles, and the final register file
// must equal the one of the software run. Every mechanism is counted.
module tb_amber_rfu_top;
  import rfu_pkg::*;

  localparam int AW = 7;
  localparam logic [31:0] A_PC = 32'h0040_0100, B_PC = 32'h0040_0200;
  localparam logic [31:0] BR_PC = 32'h0040_0128, J_PC = 32'h0040_0214;
  localparam logic [31:0] STUB0 = 32'h0040_1000, END_PC = 32'h0040_2000;
  localparam int ITER = 5, NSTUB = 18;

  logic clk = 1'b0, rst_n = 1'b0, mode = 1'b0;
  logic core_pc_valid = 1'b0;
  logic [31:0] core_pc = '0;
  logic core_halt, core_pc_set_valid;
  logic [31:0] core_pc_set;
  reg_t  core_raddr [NUM_IN];
  logic  core_wp_en [NUM_WP];
  reg_t  core_wp_addr [NUM_WP];
  word_t core_wp_data [NUM_WP];
  reg_t  rf_raddr [NUM_IN];
  word_t rf_rdata [NUM_IN];
  logic  rf_wp_en [NUM_WP];
  reg_t  rf_wp_addr [NUM_WP];
  word_t rf_wp_data [NUM_WP];
  logic prof_clear = 1'b0;
  logic [15:0] prof_threshold = 16'd4;
  logic prof_taken, prof_hot_new, prof_dropped, prof_full, prof_rd_valid, prof_rd_hot;
  logic [31:0] prof_hot_addr, prof_rd_addr;
  logic [15:0] prof_rd_count;
  logic [3:0] prof_rd_idx = '0;
  logic sch_we = 0, sch_wvalid = 0;
  logic [AW-1:0] sch_waddr = '0;
  logic [31:0] sch_wpc = '0;
  logic [7:0] sch_wlen = '0;
  logic [3:0] sch_wcycles = '0;
  logic ci_we = 0, p1_we = 0, p2_we = 0, p3_we = 0, p4_we = 0;
  logic [AW-1:0] ci_waddr = '0, p1_waddr = '0, p2_waddr = '0, p3_waddr = '0, p4_waddr = '0;
  logic [4*AW-1:0] ci_wdata = '0;
  p1_t p1_wdata = '0; p2_t p2_wdata = '0; p3_t p3_wdata = '0; p4_t p4_wdata = '0;

  amber_rfu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_taken = 0, n_hot = 0, n_drop = 0, n_ci0 = 0, n_ci1 = 0, n_extra_wb = 0;
  int n_redirect = 0, n_core_wr_normal = 0, n_mode_switch = 0, n_full = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------- register file model ----------------
  word_t rf [32];
  always_comb for (int i = 0; i < NUM_IN; i++) rf_rdata[i] = rf[rf_raddr[i]];
  always @(posedge clk) begin
    cyc++;
    for (int w = 0; w < NUM_WP; w++)
      if (rf_wp_en[w] && rf_wp_addr[w] != 0) rf[rf_wp_addr[w]] <= rf_wp_data[w];
  end

  // ---------------- graph G (as the software computes it) ----------------
  typedef word_t w6_t [6];
  function automatic w6_t graph(word_t x [8], int sh, logic [15:0] mask, logic [15:0] k, int sra);
    word_t y0, y1, y2, y3, y4;
    w6_t r;
    y0 = x[0] + x[1];
    y1 = y0 << sh;
    y2 = ((y1 - x[2]) & {16'h0, mask}) | x[3];
    y3 = x[5] - (y2 + x[4]);
    y4 = word_t'($signed(y3 + y2) >>> ((x[6] ^ x[7]) & 32'h1f));
    r[0] = y2;
    r[1] = y3;
    r[2] = y4;
    r[3] = y4 & y0;
    r[4] = word_t'($signed(y4) >>> sra) + y3;
    r[5] = (y3 + {{16{k[15]}}, k}) - (y0 ^ y1);
    return r;
  endfunction

  // CI 0: inputs r1, r9..r15; CI 1: inputs r16..r23
  function automatic reg_t in_reg(int ci, int i);
    return (ci == 0) ? ((i == 0) ? reg_t'(1) : reg_t'(8 + i)) : reg_t'(16 + i);
  endfunction

  // ---------------- behavioural core ----------------
  logic [31:0] pc;
  int          iter;
  word_t       snap [8];
  w6_t         sw_res;
  bit          running = 0;
  int          halt_len = 0;
  logic [31:0] halt_pc;

  function automatic logic [31:0] next_pc(logic [31:0] p);
    if (p == 32'h0040_000c) return A_PC;
    if (p == BR_PC) return (iter < ITER) ? B_PC : STUB0;
    if (p == J_PC) return A_PC;
    if (p >= STUB0 && p < STUB0 + 32'h40 * NSTUB) begin
      if (p == STUB0 + 32'h40 * (NSTUB - 1)) return END_PC;
      return p + 32'h40;
    end
    return p + 4;
  endfunction

  // core-side write ports: software results and the loop counter
  always_comb begin
    for (int w = 0; w < NUM_WP; w++) begin
      core_wp_en[w] = 1'b0; core_wp_addr[w] = '0; core_wp_data[w] = '0;
    end
    for (int i = 0; i < NUM_IN; i++) core_raddr[i] = reg_t'(i);
    if (running && !core_halt) begin
      if (pc == A_PC + 32'h20)
        for (int w = 0; w < 4; w++) begin
          core_wp_en[w] = 1'b1; core_wp_addr[w] = reg_t'(16 + w); core_wp_data[w] = sw_res[w];
        end
      if (pc == A_PC + 32'h24)
        for (int w = 0; w < 2; w++) begin
          core_wp_en[w] = 1'b1; core_wp_addr[w] = reg_t'(20 + w); core_wp_data[w] = sw_res[4 + w];
        end
      if (pc == B_PC + 32'h10)
        for (int w = 0; w < 4; w++) begin
          core_wp_en[w] = 1'b1; core_wp_addr[w] = reg_t'(24 + w); core_wp_data[w] = sw_res[w];
        end
      if (pc == J_PC) begin
        core_wp_en[0] = 1'b1; core_wp_addr[0] = 5'd1; core_wp_data[0] = rf[1] + 1;
      end
    end
  end

  always_comb begin
    core_pc_valid = running;
    core_pc = pc;
  end

  // expected RFU results of the CI in progress
  w6_t ci_exp;
  int  ci_cur;

  // profiler events lag the PC by up to two cycles: count them at all times
  always @(posedge clk) if (rst_n) begin
    if (prof_taken) n_taken++;
    if (prof_hot_new) n_hot++;
    if (prof_dropped) n_drop++;
    if (prof_full) n_full++;
  end

  always @(posedge clk) if (running) begin
    if (!core_halt && mode && core_wp_en[0]) n_core_wr_normal++;
    // extra write-back cycle of the RFU: ports 0/1 carry outputs 5/6
    if (core_halt && rf_wp_en[0] && rf_wp_addr[0] == 5'd20) begin
      n_extra_wb++;
      chk(rf_wp_data[0] == ci_exp[4] && rf_wp_en[1] && rf_wp_addr[1] == 5'd21 &&
          rf_wp_data[1] == ci_exp[5], "RFU outputs 5-6 in the extra cycle");
    end
    if (core_halt && rf_wp_en[0] && rf_wp_addr[0] == 5'(ci_cur == 0 ? 16 : 24)) begin
      for (int w = 0; w < 4; w++)
        chk(rf_wp_en[w] && rf_wp_addr[w] == 5'((ci_cur == 0 ? 16 : 24) + w) &&
            rf_wp_data[w] == ci_exp[w], "RFU outputs 1-4");
    end
    if (core_halt) begin
      if (halt_len == 0) begin
        halt_pc = pc;
        ci_cur = (pc == A_PC) ? 0 : 1;
        for (int i = 0; i < 8; i++) snap[i] = rf[in_reg(ci_cur, i)];
        ci_exp = (ci_cur == 0) ? graph(snap, 3, 16'h00ff, 16'hfff0, 2)
                               : graph(snap, 5, 16'h0f0f, 16'h0123, 7);
      end
      halt_len++;
      if (core_pc_set_valid) begin
        n_redirect++;
        if (halt_pc == A_PC) begin
          n_ci0++;
          chk(halt_len == 5 && core_pc_set == A_PC + 40, "CI 0 takes 5 cycles, PC past A");
        end else begin
          n_ci1++;
          chk(halt_pc == B_PC && halt_len == 3 && core_pc_set == B_PC + 20, "CI 1 takes 3 cycles, PC past B");
        end
        pc <= core_pc_set;
        halt_len = 0;
      end
    end else begin
      chk(halt_len == 0, "halt only ends with a new PC");
      // software view of the blocks
      if (pc == A_PC || pc == B_PC) begin
        for (int i = 0; i < 8; i++) snap[i] = rf[in_reg(pc == A_PC ? 0 : 1, i)];
        sw_res = (pc == A_PC) ? graph(snap, 3, 16'h00ff, 16'hfff0, 2)
                              : graph(snap, 5, 16'h0f0f, 16'h0123, 7);
      end
      if (pc == J_PC) iter++;
      if (pc == END_PC) running <= 1'b0;
      else pc <= next_pc(pc);
    end
  end

  // ---------------- configuration ----------------
  function automatic src_t IN(int i);  return src_t'(SRC_IN0 + i);  endfunction
  function automatic src_t FU(int i);  return src_t'(SRC_FU0 + i);  endfunction
  function automatic src_t IMM(int i); return src_t'(SRC_IMM0 + i); endfunction

  function automatic p1_t graph_p1();
    p1_t p = '0;
    p.fu0.op_a = OP_ADD; p.fu0.src[0] = IN(0); p.fu0.src[1] = IN(1);
    p.fu1.op_a = OP_SLL; p.fu1.src[0] = FU(0); p.fu1.src[1] = IMM(0);
    p.fu2.op_a = OP_SUB; p.fu2.op_b = OP_AND; p.fu2.op_c = OP_OR;
    p.fu2.src[0] = FU(1); p.fu2.src[1] = IN(2); p.fu2.src[2] = IMM(1); p.fu2.src[3] = IN(3);
    p.fu3.op_a = OP_ADD; p.fu3.op_b = OP_SUB; p.fu3.swap_b = 1'b1;
    p.fu3.src[0] = FU(2); p.fu3.src[1] = IN(4); p.fu3.src[2] = IN(5);
    p.fu4.op_a = OP_ADD; p.fu4.op_b = OP_XOR; p.fu4.op_c = OP_SRA; p.fu4.tree = 1'b1;
    p.fu4.src[0] = FU(3); p.fu4.src[1] = FU(2); p.fu4.src[2] = IN(6); p.fu4.src[3] = IN(7);
    p.fu5.op_a = OP_AND; p.fu5.src[0] = FU(4); p.fu5.src[1] = FU(0);
    p.fu6.op_a = OP_SRA; p.fu6.op_b = OP_ADD;
    p.fu6.src[0] = FU(4); p.fu6.src[1] = IMM(3); p.fu6.src[2] = FU(3);
    p.fu7.op_a = OP_XOR; p.fu7.op_b = OP_ADD; p.fu7.op_c = OP_SUB; p.fu7.tree = 1'b1;
    p.fu7.swap_c = 1'b1;
    p.fu7.src[0] = FU(0); p.fu7.src[1] = FU(1); p.fu7.src[2] = FU(3); p.fu7.src[3] = IMM(2);
    return p;
  endfunction

  task automatic load_config();
    p2_t p2; p3_t p3; p4_t p4;
    // scheduler table
    @(negedge clk);
    sch_we = 1; sch_waddr = 0; sch_wvalid = 1; sch_wpc = A_PC; sch_wlen = 10; sch_wcycles = 2;
    @(negedge clk);
    sch_waddr = 1; sch_wpc = B_PC; sch_wlen = 5; sch_wcycles = 1;
    @(negedge clk);
    sch_we = 0;
    // one shared P1 at entry 9
    p1_we = 1; p1_waddr = 9; p1_wdata = graph_p1();
    // P2/P3/P4 entries 0 and 1
    for (int c = 0; c < 2; c++) begin
      p2 = '0; p3 = '0; p4 = '0;
      for (int i = 0; i < 8; i++) p2.in_reg[i] = in_reg(c, i);
      for (int o = 0; o < 6; o++) begin
        p3.out[o].fu = 3'(o + 2);
        p3.out[o].en = (c == 0) || (o < 4);
        p3.out[o].dest = reg_t'((c == 0 ? 16 : 24) + o);
      end
      p4.imm[0] = '{zext: 1'b0, val: (c == 0) ? 16'd3 : 16'd5};
      p4.imm[1] = '{zext: 1'b1, val: (c == 0) ? 16'h00ff : 16'h0f0f};
      p4.imm[2] = '{zext: 1'b0, val: (c == 0) ? 16'hfff0 : 16'h0123};
      p4.imm[3] = '{zext: 1'b0, val: (c == 0) ? 16'd2 : 16'd7};
      p2_we = 1; p2_waddr = AW'(c); p2_wdata = p2;
      p3_we = 1; p3_waddr = AW'(c); p3_wdata = p3;
      p4_we = 1; p4_waddr = AW'(c); p4_wdata = p4;
      ci_we = 1; ci_waddr = AW'(c); ci_wdata = {AW'(9), AW'(c), AW'(c), AW'(c)};
      @(negedge clk);
      p1_we = 0;
    end
    p2_we = 0; p3_we = 0; p4_we = 0; ci_we = 0;
  endtask

  // ---------------- sequence ----------------
  word_t rf_init [32], rf_sw [32];
  int    cyc_sw, cyc_hw, cyc_train;

  task automatic run_program();
    int c0;
    for (int i = 0; i < 32; i++) rf[i] = rf_init[i];
    pc = 32'h0040_0000; iter = 0; halt_len = 0;
    @(negedge clk);
    c0 = cyc;
    running = 1;
    wait (!running);
    cyc_sw = cyc - c0;
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rf_init[0] = '0;
    for (int i = 1; i < 32; i++) rf_init[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // phase 1: training
    run_program();
    repeat (3) @(negedge clk);
    for (int i = 0; i < 32; i++) rf_sw[i] = rf[i];
    cyc_train = cyc_sw;
    chk(n_ci0 == 0 && n_ci1 == 0, "no CI in training mode");
    // profiler table: A first, then B, then the stubs until full
    prof_rd_idx = 0; #1;
    chk(prof_rd_valid && prof_rd_addr == A_PC && prof_rd_count == ITER + 1 && prof_rd_hot, "A is hot");
    prof_rd_idx = 1; #1;
    chk(prof_rd_valid && prof_rd_addr == B_PC && prof_rd_count == ITER && prof_rd_hot, "B is hot");
    prof_rd_idx = 2; #1;
    chk(prof_rd_valid && prof_rd_addr == STUB0 && prof_rd_count == 1 && !prof_rd_hot, "stub entry");
    prof_rd_idx = 15; #1;
    chk(prof_rd_valid && prof_rd_addr == STUB0 + 32'h40 * 13, "last entry");
    // taken: jump to A, ITER x (to B, back to A), to stub 0, NSTUB-1 stub jumps, to end
    chk(n_taken == 1 + 2 * ITER + 1 + (NSTUB - 1) + 1, "taken branches");
    chk(n_drop == (NSTUB - 14) + 1, "dropped addresses");

    // phase 2: load the CIs and switch mode
    load_config();
    @(negedge clk);
    mode = 1'b1;
    n_mode_switch++;

    // phase 3: normal mode, same start state
    run_program();
    cyc_hw = cyc_sw;
    for (int i = 0; i < 32; i++) chk(rf[i] == rf_sw[i], $sformatf("register r%0d matches software run", i));

    // every mechanism must have happened
    chk(n_taken > 0,  "mechanism: taken branch detected");
    chk(n_hot == 2,   "mechanism: two hot basic blocks");
    chk(n_drop > 0 && n_full > 0, "mechanism: profiler table full");
    chk(n_mode_switch == 1, "mechanism: training to normal mode");
    chk(n_ci0 == ITER + 1, "mechanism: CI 0 (multi-cycle, 6 outputs) runs");
    chk(n_ci1 == ITER, "mechanism: CI 1 (shared P1) runs");
    chk(n_extra_wb == ITER + 1, "mechanism: extra write-back cycle");
    chk(n_redirect == 2 * ITER + 1, "mechanism: PC set past the CI");
    chk(n_core_wr_normal > 0, "mechanism: core writes through shared ports");
    $display("program cycles: software %0d, with the RFU %0d", cyc_train, cyc_hw);
    $display("taken=%0d hot=%0d dropped=%0d ci0=%0d ci1=%0d extra_wb=%0d redirect=%0d core_writes=%0d",
             n_taken, n_hot, n_drop, n_ci0, n_ci1, n_extra_wb, n_redirect, n_core_wr_normal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
