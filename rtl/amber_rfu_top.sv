// amber_rfu_top: the extension hardware of an adaptive dynamic extensible
// processor, to be attached to a 4-issue in-order MIPS core.
//
// Training mode (mode = 0): the profiler watches the core's committed PCs,
// counts the start addresses of basic blocks entered by taken branches and
// jumps, and reports the hot ones. Software then builds custom instructions
// (CIs) for the hot blocks and loads their configurations and start addresses
// through the load ports below.
// Normal mode (mode = 1): the scheduler compares the core's PC with the CI
// start addresses. On a match it halts the core, the configuration memory
// delivers the CI's configuration, the RFU reads its operands through the
// core's register-file read ports, computes for the stored number of cycles,
// writes up to six results through the core's four write ports (the last two
// one cycle later) and the scheduler moves the core's PC past the replaced
// instructions.
//
// The register-file ports are shared: while core_halt is high the RFU drives
// the read addresses and write ports of the register file, otherwise the core
// does. The core and its register file are outside this block.
//
// Structure (profiler, scheduler, RFU, shared ports, two modes) follows the
// design; the load ports, the port-sharing multiplexer placed here and the
// mode input are this implementation's.
module amber_rfu_top
  import rfu_pkg::*;
#(
  parameter int unsigned NUM_CI       = 128,
  parameter int unsigned PROF_ENTRIES = 16,
  parameter int unsigned PROF_CNT_W   = 16,
  localparam int unsigned CI_AW   = $clog2(NUM_CI),
  localparam int unsigned PROF_AW = $clog2(PROF_ENTRIES),
  localparam int unsigned CFG_AW  = $clog2(NUM_CI),
  localparam int unsigned ENTRY_W = 4 * CFG_AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  mode,            // 0 training, 1 normal
  // core PC stream and control
  input  logic                  core_pc_valid,
  input  logic [PC_W-1:0]       core_pc,
  output logic                  core_halt,
  output logic                  core_pc_set_valid,
  output logic [PC_W-1:0]       core_pc_set,
  // core side of the register-file ports
  input  reg_t                  core_raddr [NUM_IN],
  input  logic                  core_wp_en   [NUM_WP],
  input  reg_t                  core_wp_addr [NUM_WP],
  input  word_t                 core_wp_data [NUM_WP],
  // register-file side
  output reg_t                  rf_raddr [NUM_IN],
  input  word_t                 rf_rdata [NUM_IN],
  output logic                  rf_wp_en   [NUM_WP],
  output reg_t                  rf_wp_addr [NUM_WP],
  output word_t                 rf_wp_data [NUM_WP],
  // profiler
  input  logic                  prof_clear,
  input  logic [PROF_CNT_W-1:0] prof_threshold,
  output logic                  prof_taken,
  output logic                  prof_hot_new,
  output logic [PC_W-1:0]       prof_hot_addr,
  output logic                  prof_dropped,
  output logic                  prof_full,
  input  logic [PROF_AW-1:0]    prof_rd_idx,
  output logic                  prof_rd_valid,
  output logic [PC_W-1:0]       prof_rd_addr,
  output logic [PROF_CNT_W-1:0] prof_rd_count,
  output logic                  prof_rd_hot,
  // CI loading: scheduler table
  input  logic                  sch_we,
  input  logic [CI_AW-1:0]      sch_waddr,
  input  logic                  sch_wvalid,
  input  logic [PC_W-1:0]       sch_wpc,
  input  logic [7:0]            sch_wlen,
  input  logic [3:0]            sch_wcycles,
  // CI loading: configuration memory
  input  logic                  ci_we,
  input  logic [CI_AW-1:0]      ci_waddr,
  input  logic [ENTRY_W-1:0]    ci_wdata,
  input  logic                  p1_we,
  input  logic [CFG_AW-1:0]     p1_waddr,
  input  p1_t                   p1_wdata,
  input  logic                  p2_we,
  input  logic [CFG_AW-1:0]     p2_waddr,
  input  p2_t                   p2_wdata,
  input  logic                  p3_we,
  input  logic [CFG_AW-1:0]     p3_waddr,
  input  p3_t                   p3_wdata,
  input  logic                  p4_we,
  input  logic [CFG_AW-1:0]     p4_waddr,
  input  p4_t                   p4_wdata
);

  logic             cfg_rd_en, rfu_start, rfu_commit, rfu_wb_extra;
  logic [CI_AW-1:0] cfg_rd_ci;
  ci_cfg_t          cfg;

  reg_t  rfu_raddr   [NUM_IN];
  logic  rfu_wp_en   [NUM_WP];
  reg_t  rfu_wp_addr [NUM_WP];
  word_t rfu_wp_data [NUM_WP];

  profiler #(.ENTRIES(PROF_ENTRIES), .CNT_W(PROF_CNT_W)) u_profiler (
    .clk, .rst_n,
    .enable   (!mode),
    .clear    (prof_clear),
    .pc_valid (core_pc_valid),
    .pc       (core_pc),
    .threshold(prof_threshold),
    .taken    (prof_taken),
    .hot_new  (prof_hot_new),
    .hot_addr (prof_hot_addr),
    .dropped  (prof_dropped),
    .full     (prof_full),
    .rd_idx   (prof_rd_idx),
    .rd_valid (prof_rd_valid),
    .rd_addr  (prof_rd_addr),
    .rd_count (prof_rd_count),
    .rd_hot   (prof_rd_hot)
  );

  scheduler #(.NUM_CI(NUM_CI)) u_scheduler (
    .clk, .rst_n,
    .enable      (mode),
    .tab_we      (sch_we),
    .tab_waddr   (sch_waddr),
    .tab_wvalid  (sch_wvalid),
    .tab_wpc     (sch_wpc),
    .tab_wlen    (sch_wlen),
    .tab_wcycles (sch_wcycles),
    .pc_valid    (core_pc_valid),
    .pc          (core_pc),
    .halt        (core_halt),
    .pc_set_valid(core_pc_set_valid),
    .pc_set      (core_pc_set),
    .cfg_rd_en   (cfg_rd_en),
    .cfg_rd_ci   (cfg_rd_ci),
    .rfu_start   (rfu_start),
    .rfu_commit  (rfu_commit),
    .rfu_wb_extra(rfu_wb_extra)
  );

  rfu_config_mem #(
    .NUM_CI(NUM_CI), .P1_DEPTH(NUM_CI), .P2_DEPTH(NUM_CI),
    .P3_DEPTH(NUM_CI), .P4_DEPTH(NUM_CI)
  ) u_cfg_mem (
    .clk, .rst_n,
    .ci_we, .ci_waddr, .ci_wdata,
    .p1_we, .p1_waddr, .p1_wdata,
    .p2_we, .p2_waddr, .p2_wdata,
    .p3_we, .p3_waddr, .p3_wdata,
    .p4_we, .p4_waddr, .p4_wdata,
    .rd_en (cfg_rd_en),
    .rd_ci (cfg_rd_ci),
    .cfg   (cfg)
  );

  rfu_unit u_rfu (
    .clk, .rst_n,
    .cfg      (cfg),
    .start    (rfu_start),
    .commit   (rfu_commit),
    .rf_raddr (rfu_raddr),
    .rf_rdata (rf_rdata),
    .wb_extra (rfu_wb_extra),
    .wp_en    (rfu_wp_en),
    .wp_addr  (rfu_wp_addr),
    .wp_data  (rfu_wp_data)
  );

  // shared register-file ports: the RFU owns them while the core is halted
  always_comb begin
    for (int i = 0; i < NUM_IN; i++)
      rf_raddr[i] = core_halt ? rfu_raddr[i] : core_raddr[i];
    for (int w = 0; w < NUM_WP; w++) begin
      rf_wp_en[w]   = core_halt ? rfu_wp_en[w]   : core_wp_en[w];
      rf_wp_addr[w] = core_halt ? rfu_wp_addr[w] : core_wp_addr[w];
      rf_wp_data[w] = core_halt ? rfu_wp_data[w] : core_wp_data[w];
    end
  end

endmodule
