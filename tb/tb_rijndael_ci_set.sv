// tb_rijndael_ci_set: capacity workload at default parameters: 117 custom
// instructions (the CI count of the AES/rijndael application) are loaded into
// the scheduler table and the configuration memory, with 40 shared P1 entries
// (functions and connections) and a P2/P3/P4 of their own each. Every P1 is
// random but legal: each operand port picks only links its row has, and each
// FU only operations of its classes. A behavioural core then runs through all
// 117 CIs; after each one the register file must match a reference evaluation
// of the array written independently here, and the halt must last
// cycles + 2 (+1 when outputs 5/6 are used).
module tb_rijndael_ci_set;
  import rfu_pkg::*;

  localparam int AW = 7;
  localparam int NCI = 117;
  localparam int NP1 = 40;

  logic clk = 1'b0, rst_n = 1'b0, mode = 1'b1;
  logic core_pc_valid;
  logic [31:0] core_pc;
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

  int checks = 0, failures = 0;

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- reference model of the RFU ----------------
  // legal source lists per FU (RFU inputs and immediates are always legal)
  function automatic bit legal_fu_src(int fu, int src_fu);
    case (fu)
      0: return 0;
      1: return src_fu == 0;
      2: return src_fu == 1;
      3: return src_fu <= 2;
      4: return src_fu <= 3;
      default: return src_fu <= 4;
    endcase
  endfunction

  function automatic int fu_classes(int fu);   // bit0 logic, bit1 arith, bit2 shift
    case (fu)
      0: return 3; 1: return 4; 2: return 7; 3: return 2; 4: return 7;
      5: return 3; 6: return 7; default: return 3;
    endcase
  endfunction

  function automatic int fu_nops(int fu);
    case (fu)
      2, 4, 7: return 3;
      3, 6:    return 2;
      default: return 1;
    endcase
  endfunction

  function automatic word_t apply(op_e o, word_t x, word_t z);
    case (o)
      OP_MOVE: return x;
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_XOR:  return x ^ z;
      OP_NOR:  return ~(x | z);
      OP_ADD:  return x + z;
      OP_SUB:  return x - z;
      OP_SLT:  return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      OP_SLTU: return (x < z) ? 32'd1 : 32'd0;
      OP_SLL:  return x << z[4:0];
      OP_SRL:  return x >> z[4:0];
      OP_SRA:  return word_t'($signed(x) >>> z[4:0]);
      default: return '0;
    endcase
  endfunction

  // one FU, described independently of the packed structs
  typedef struct {
    op_e ops [3];
    int  src [4];
    bit  tree, swb, swc;
  } fu_desc_t;

  typedef struct {
    fu_desc_t fu [8];
    int       out_fu [6];
  } graph_t;

  function automatic op_e rand_op(int classes);
    op_e pool [$];
    pool.push_back(OP_MOVE);
    if (classes & 1) begin pool.push_back(OP_AND); pool.push_back(OP_OR); pool.push_back(OP_XOR); pool.push_back(OP_NOR); end
    if (classes & 2) begin pool.push_back(OP_ADD); pool.push_back(OP_SUB); pool.push_back(OP_SLT); pool.push_back(OP_SLTU); end
    if (classes & 4) begin pool.push_back(OP_SLL); pool.push_back(OP_SRL); pool.push_back(OP_SRA); end
    return pool[$urandom_range(0, pool.size() - 1)];
  endfunction

  function automatic int rand_src(int fu);
    int s;
    do s = $urandom_range(0, 27);
    while (s >= 8 && s < 16 && !legal_fu_src(fu, s - 8));
    return s;
  endfunction

  function automatic graph_t rand_graph();
    graph_t g;
    for (int f = 0; f < 8; f++) begin
      for (int k = 0; k < 3; k++) g.fu[f].ops[k] = (k < fu_nops(f)) ? rand_op(fu_classes(f)) : OP_MOVE;
      for (int k = 0; k < 4; k++) g.fu[f].src[k] = rand_src(f);
      g.fu[f].tree = (fu_nops(f) == 3) ? 1'($urandom) : 1'b0;
      g.fu[f].swb  = (fu_nops(f) >= 2) ? 1'($urandom) : 1'b0;
      g.fu[f].swc  = (fu_nops(f) == 3) ? 1'($urandom) : 1'b0;
    end
    for (int o = 0; o < 6; o++) g.out_fu[o] = $urandom_range(0, 7);
    return g;
  endfunction

  typedef word_t w6_t [6];
  function automatic w6_t evaluate(graph_t g, word_t x [8], word_t imm [12]);
    word_t y [8];
    w6_t r;
    for (int f = 0; f < 8; f++) begin
      word_t p [4];
      word_t a, b;
      for (int k = 0; k < 4; k++) begin
        int s = g.fu[f].src[k];
        p[k] = (s < 8) ? x[s] : (s < 16) ? y[s - 8] : imm[s - 16];
      end
      a = apply(g.fu[f].ops[0], p[0], p[1]);
      case (fu_nops(f))
        1: y[f] = a;
        2: y[f] = g.fu[f].swb ? apply(g.fu[f].ops[1], p[2], a) : apply(g.fu[f].ops[1], a, p[2]);
        default: begin
          if (g.fu[f].tree) begin
            b = g.fu[f].swb ? apply(g.fu[f].ops[1], p[3], p[2]) : apply(g.fu[f].ops[1], p[2], p[3]);
            y[f] = g.fu[f].swc ? apply(g.fu[f].ops[2], b, a) : apply(g.fu[f].ops[2], a, b);
          end else begin
            b = g.fu[f].swb ? apply(g.fu[f].ops[1], p[2], a) : apply(g.fu[f].ops[1], a, p[2]);
            y[f] = g.fu[f].swc ? apply(g.fu[f].ops[2], p[3], b) : apply(g.fu[f].ops[2], b, p[3]);
          end
        end
      endcase
    end
    for (int o = 0; o < 6; o++) r[o] = y[g.out_fu[o]];
    return r;
  endfunction

  // packing into the configuration format
  function automatic p1_t pack_p1(graph_t g);
    p1_t p = '0;
    p.fu0.op_a = g.fu[0].ops[0]; for (int k = 0; k < 2; k++) p.fu0.src[k] = src_t'(g.fu[0].src[k]);
    p.fu1.op_a = g.fu[1].ops[0]; for (int k = 0; k < 2; k++) p.fu1.src[k] = src_t'(g.fu[1].src[k]);
    p.fu5.op_a = g.fu[5].ops[0]; for (int k = 0; k < 2; k++) p.fu5.src[k] = src_t'(g.fu[5].src[k]);
    p.fu3.op_a = g.fu[3].ops[0]; p.fu3.op_b = g.fu[3].ops[1]; p.fu3.swap_b = g.fu[3].swb;
    for (int k = 0; k < 3; k++) p.fu3.src[k] = src_t'(g.fu[3].src[k]);
    p.fu6.op_a = g.fu[6].ops[0]; p.fu6.op_b = g.fu[6].ops[1]; p.fu6.swap_b = g.fu[6].swb;
    for (int k = 0; k < 3; k++) p.fu6.src[k] = src_t'(g.fu[6].src[k]);
    p.fu2 = '{op_a: g.fu[2].ops[0], op_b: g.fu[2].ops[1], op_c: g.fu[2].ops[2], tree: g.fu[2].tree,
              swap_b: g.fu[2].swb, swap_c: g.fu[2].swc,
              src: {src_t'(g.fu[2].src[3]), src_t'(g.fu[2].src[2]), src_t'(g.fu[2].src[1]), src_t'(g.fu[2].src[0])}};
    p.fu4 = '{op_a: g.fu[4].ops[0], op_b: g.fu[4].ops[1], op_c: g.fu[4].ops[2], tree: g.fu[4].tree,
              swap_b: g.fu[4].swb, swap_c: g.fu[4].swc,
              src: {src_t'(g.fu[4].src[3]), src_t'(g.fu[4].src[2]), src_t'(g.fu[4].src[1]), src_t'(g.fu[4].src[0])}};
    p.fu7 = '{op_a: g.fu[7].ops[0], op_b: g.fu[7].ops[1], op_c: g.fu[7].ops[2], tree: g.fu[7].tree,
              swap_b: g.fu[7].swb, swap_c: g.fu[7].swc,
              src: {src_t'(g.fu[7].src[3]), src_t'(g.fu[7].src[2]), src_t'(g.fu[7].src[1]), src_t'(g.fu[7].src[0])}};
    return p;
  endfunction

  // ---------------- the CI set ----------------
  graph_t      shared [NP1];
  int          ci_p1 [NCI], ci_len [NCI], ci_cyc [NCI], ci_nout [NCI];
  logic [31:0] ci_pc [NCI];
  int          ci_in [NCI][8], ci_dst [NCI][6];
  word_t       ci_imm [NCI][12];

  // ---------------- register file and core ----------------
  word_t rf [32];
  always_comb for (int i = 0; i < NUM_IN; i++) rf_rdata[i] = rf[rf_raddr[i]];
  always @(posedge clk)
    for (int w = 0; w < NUM_WP; w++)
      if (rf_wp_en[w] && rf_wp_addr[w] != 0) rf[rf_wp_addr[w]] <= rf_wp_data[w];

  always_comb begin
    for (int w = 0; w < NUM_WP; w++) begin
      core_wp_en[w] = 1'b0; core_wp_addr[w] = '0; core_wp_data[w] = '0;
    end
    for (int i = 0; i < NUM_IN; i++) core_raddr[i] = '0;
  end

  logic [31:0] pc;
  bit running = 0;
  int k_ci = 0, halt_len = 0, n_done = 0, n_extra = 0;
  word_t expect_rf [32];
  assign core_pc_valid = running;
  assign core_pc = pc;

  always @(posedge clk) if (running) begin
    if (core_halt) begin
      if (halt_len == 0) begin
        word_t x [8];
        w6_t r;
        chk(pc == ci_pc[k_ci], "CI taken at its start address");
        for (int i = 0; i < 8; i++) x[i] = rf[ci_in[k_ci][i]];
        r = evaluate(shared[ci_p1[k_ci]], x, ci_imm[k_ci]);
        for (int i = 0; i < 32; i++) expect_rf[i] = rf[i];
        for (int o = 0; o < ci_nout[k_ci]; o++) expect_rf[ci_dst[k_ci][o]] = r[o];
      end
      halt_len++;
      if (core_pc_set_valid) begin
        chk(halt_len == ci_cyc[k_ci] + 2 + (ci_nout[k_ci] > 4 ? 1 : 0), "halt length");
        chk(core_pc_set == ci_pc[k_ci] + 32'(4 * ci_len[k_ci]), "PC after CI");
        if (ci_nout[k_ci] > 4) n_extra++;
        pc <= core_pc_set;
        halt_len = 0;
      end
    end else begin
      if (k_ci < NCI && pc == ci_pc[k_ci] + 32'(4 * ci_len[k_ci])) begin
        // the instruction after the CI: check its results, jump to the next CI
        for (int i = 1; i < 32; i++)
          chk(rf[i] == expect_rf[i], $sformatf("CI %0d register r%0d", k_ci, i));
        n_done++;
        k_ci++;
        if (k_ci == NCI) running <= 1'b0;
        else pc <= ci_pc[k_ci];
      end else pc <= pc + 4;
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) rf[i] = (i == 0) ? '0 : $urandom;
    for (int s = 0; s < NP1; s++) shared[s] = rand_graph();
    for (int c = 0; c < NCI; c++) begin
      int regs [$];
      ci_p1[c]  = c % NP1;
      ci_pc[c]  = 32'h0001_0000 + 32'h100 * c;
      ci_len[c] = $urandom_range(3, 16);
      ci_cyc[c] = $urandom_range(1, 4);
      ci_nout[c] = $urandom_range(1, 6);
      for (int i = 0; i < 8; i++) ci_in[c][i] = $urandom_range(0, 31);
      for (int i = 1; i < 32; i++) regs.push_back(i);
      regs.shuffle();
      for (int o = 0; o < 6; o++) ci_dst[c][o] = regs[o];
      for (int m = 0; m < 12; m++) ci_imm[c][m] = $urandom;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load P1 entries
    for (int s = 0; s < NP1; s++) begin
      p1_we = 1; p1_waddr = AW'(s); p1_wdata = pack_p1(shared[s]);
      @(negedge clk);
    end
    p1_we = 0;
    // load each CI's own parts, its CI table entry and scheduler entry
    for (int c = 0; c < NCI; c++) begin
      p2_t p2; p3_t p3; p4_t p4;
      p2 = '0; p3 = '0; p4 = '0;
      for (int i = 0; i < 8; i++) p2.in_reg[i] = reg_t'(ci_in[c][i]);
      for (int o = 0; o < 6; o++) begin
        p3.out[o].en = (o < ci_nout[c]);
        p3.out[o].fu = 3'(shared[ci_p1[c]].out_fu[o]);
        p3.out[o].dest = reg_t'(ci_dst[c][o]);
      end
      for (int m = 0; m < 12; m++) begin
        p4.imm[m].zext = ci_imm[c][m][31];
        p4.imm[m].val  = ci_imm[c][m][15:0];
        ci_imm[c][m] = imm_extend(p4.imm[m]);
      end
      p2_we = 1; p2_waddr = AW'(c); p2_wdata = p2;
      p3_we = 1; p3_waddr = AW'(c); p3_wdata = p3;
      p4_we = 1; p4_waddr = AW'(c); p4_wdata = p4;
      ci_we = 1; ci_waddr = AW'(c); ci_wdata = {AW'(ci_p1[c]), AW'(c), AW'(c), AW'(c)};
      sch_we = 1; sch_waddr = AW'(c); sch_wvalid = 1; sch_wpc = ci_pc[c];
      sch_wlen = 8'(ci_len[c]); sch_wcycles = 4'(ci_cyc[c]);
      @(negedge clk);
    end
    p2_we = 0; p3_we = 0; p4_we = 0; ci_we = 0; sch_we = 0;
    pc = ci_pc[0];
    running = 1;
    wait (!running);
    chk(n_done == NCI, "all 117 CIs ran");
    chk(n_extra > 0, "CIs with outputs 5/6 ran");
    $display("CIs run: %0d (with extra write-back: %0d), shared P1 entries: %0d", n_done, n_extra, NP1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
