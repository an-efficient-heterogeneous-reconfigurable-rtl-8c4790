// tb_rfu_unit: runs custom instructions through the RFU bound to a model of
// the core's register file (eight read ports, four write ports).
// Checks that the read addresses come from the configuration, that operands
// are latched at start (the register file is scrambled afterwards), that
// outputs 0..3 appear on the write ports exactly in the commit cycle and
// outputs 4..5 exactly one cycle later through ports 0 and 1, that wb_extra
// reports the extra cycle, and that disabled outputs are not written.
module tb_rfu_unit;
  import rfu_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  ci_cfg_t cfg;
  logic    start = 1'b0, commit = 1'b0, wb_extra;
  reg_t    rf_raddr [NUM_IN];
  word_t   rf_rdata [NUM_IN];
  logic    wp_en   [NUM_WP];
  reg_t    wp_addr [NUM_WP];
  word_t   wp_data [NUM_WP];
  word_t   rf [32];
  int      checks = 0, failures = 0, cyc = 0;

  rfu_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always_comb for (int i = 0; i < NUM_IN; i++) rf_rdata[i] = rf[rf_raddr[i]];

  function automatic src_t IN(int i); return src_t'(SRC_IN0 + i); endfunction
  function automatic src_t FU(int i); return src_t'(SRC_FU0 + i); endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one CI: operands from registers 10..17, six results
  task automatic run_ci(int lat, bit extras);
    word_t a [NUM_IN];
    word_t e [NUM_OUT];
    for (int i = 0; i < 32; i++) rf[i] = $urandom;
    for (int i = 0; i < NUM_IN; i++) a[i] = rf[10 + i];
    e[0] = a[0] + a[1];                 // FU0
    e[1] = a[2] << a[3][4:0];           // FU1
    e[2] = (a[4] ^ a[5]) - a[6];        // FU2 chain, C = MOVE
    e[3] = a[7] + e[0];                 // FU3, B = MOVE
    e[4] = e[2] & e[1];                 // FU5
    e[5] = (e[3] | a[0]) + e[2];        // FU6
    cfg.p3.out[4].en = extras;
    cfg.p3.out[5].en = extras;
    @(negedge clk);
    for (int i = 0; i < NUM_IN; i++) chk(rf_raddr[i] == reg_t'(10 + i), "read address");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i = 0; i < 32; i++) rf[i] = $urandom;   // operands must be held
    repeat (lat - 1) begin
      for (int w = 0; w < NUM_WP; w++) chk(!wp_en[w], "no write before commit");
      @(negedge clk);
    end
    commit = 1'b1;
    #1;
    chk(wb_extra == extras, "wb_extra");
    for (int w = 0; w < NUM_WP; w++) begin
      chk(wp_en[w] && wp_addr[w] == reg_t'(20 + w) && wp_data[w] == e[w], "commit-cycle write");
    end
    @(negedge clk);
    commit = 1'b0;
    #1;
    for (int w = 0; w < NUM_WP; w++) begin
      if (extras && w < 2)
        chk(wp_en[w] && wp_addr[w] == reg_t'(24 + w) && wp_data[w] == e[4 + w], $sformatf("extra write %0d en=%0d a=%0d d=%h e=%h", w, wp_en[w], wp_addr[w], wp_data[w], e[4+w]));
      else
        chk(!wp_en[w], "no write in extra cycle");
    end
    @(negedge clk);
    for (int w = 0; w < NUM_WP; w++) chk(!wp_en[w], "idle after CI");
  endtask

  initial begin
    cfg = '0;
    for (int i = 0; i < NUM_IN; i++) cfg.p2.in_reg[i] = reg_t'(10 + i);
    cfg.p1.fu0.op_a = OP_ADD; cfg.p1.fu0.src[0] = IN(0); cfg.p1.fu0.src[1] = IN(1);
    cfg.p1.fu1.op_a = OP_SLL; cfg.p1.fu1.src[0] = IN(2); cfg.p1.fu1.src[1] = IN(3);
    cfg.p1.fu2.op_a = OP_XOR; cfg.p1.fu2.op_b = OP_SUB; cfg.p1.fu2.op_c = OP_MOVE;
    cfg.p1.fu2.src[0] = IN(4); cfg.p1.fu2.src[1] = IN(5); cfg.p1.fu2.src[2] = IN(6);
    cfg.p1.fu3.op_a = OP_ADD; cfg.p1.fu3.op_b = OP_MOVE;
    cfg.p1.fu3.src[0] = IN(7); cfg.p1.fu3.src[1] = FU(0);
    cfg.p1.fu5.op_a = OP_AND; cfg.p1.fu5.src[0] = FU(2); cfg.p1.fu5.src[1] = FU(1);
    cfg.p1.fu6.op_a = OP_OR;  cfg.p1.fu6.op_b = OP_ADD;
    cfg.p1.fu6.src[0] = FU(3); cfg.p1.fu6.src[1] = IN(0); cfg.p1.fu6.src[2] = FU(2);
    cfg.p3.out[0].fu = 3'd0; cfg.p3.out[1].fu = 3'd1; cfg.p3.out[2].fu = 3'd2;
    cfg.p3.out[3].fu = 3'd3; cfg.p3.out[4].fu = 3'd5; cfg.p3.out[5].fu = 3'd6;
    for (int o = 0; o < NUM_OUT; o++) begin
      cfg.p3.out[o].en   = 1'b1;
      cfg.p3.out[o].dest = reg_t'(20 + o);
    end
    foreach (rf[i]) rf[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20; k++) run_ci(1 + (k % 4), (k % 3) != 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
