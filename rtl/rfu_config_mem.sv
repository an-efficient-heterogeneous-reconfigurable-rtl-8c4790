// rfu_config_mem: partitioned configuration memory of the RFU.
//
// A custom instruction's configuration is kept in four separately indexed
// tables instead of one word per CI:
//   P1  functions of the FUs and their connections
//   P2  register numbers of the eight inputs
//   P3  source FU and destination register of the six outputs
//   P4  the immediates
// A small CI table maps each CI number to one entry of each part. CIs whose
// functions and connections are equal, or whose graph is a subset of a larger
// one, point at the same P1 entry and differ only in P2..P4; equal P2, P3 or P4
// entries are shared the same way. This keeps the memory small and lets the
// RFU be partly reconfigured.
//
// Timing: rd_en with rd_ci in cycle t gives the full ci_cfg_t on cfg in cycle
// t+1; cfg then holds until the next read. Every table has its own write port
// (one word per cycle) for loading configurations after training.
//
// The four-part split and the sharing follow the design. The table depths are
// this implementation's: 128 CI numbers cover the largest CI count the design
// reports for one application (117), and each part is as deep as the CI table
// so that nothing has to be shared.
module rfu_config_mem
  import rfu_pkg::*;
#(
  parameter int unsigned NUM_CI   = 128,
  parameter int unsigned P1_DEPTH = 128,
  parameter int unsigned P2_DEPTH = 128,
  parameter int unsigned P3_DEPTH = 128,
  parameter int unsigned P4_DEPTH = 128,
  localparam int unsigned CI_AW = $clog2(NUM_CI),
  localparam int unsigned P1_AW = $clog2(P1_DEPTH),
  localparam int unsigned P2_AW = $clog2(P2_DEPTH),
  localparam int unsigned P3_AW = $clog2(P3_DEPTH),
  localparam int unsigned P4_AW = $clog2(P4_DEPTH),
  localparam int unsigned ENTRY_W = P1_AW + P2_AW + P3_AW + P4_AW
) (
  input  logic               clk,
  input  logic               rst_n,
  // CI table write: {p1 index, p2 index, p3 index, p4 index}
  input  logic               ci_we,
  input  logic [CI_AW-1:0]   ci_waddr,
  input  logic [ENTRY_W-1:0] ci_wdata,
  input  logic               p1_we,
  input  logic [P1_AW-1:0]   p1_waddr,
  input  p1_t                p1_wdata,
  input  logic               p2_we,
  input  logic [P2_AW-1:0]   p2_waddr,
  input  p2_t                p2_wdata,
  input  logic               p3_we,
  input  logic [P3_AW-1:0]   p3_waddr,
  input  p3_t                p3_wdata,
  input  logic               p4_we,
  input  logic [P4_AW-1:0]   p4_waddr,
  input  p4_t                p4_wdata,
  // read
  input  logic               rd_en,
  input  logic [CI_AW-1:0]   rd_ci,
  output ci_cfg_t            cfg
);

  typedef struct packed {
    logic [P1_AW-1:0] p1;
    logic [P2_AW-1:0] p2;
    logic [P3_AW-1:0] p3;
    logic [P4_AW-1:0] p4;
  } ci_entry_t;

  ci_entry_t ci_tab [NUM_CI];
  p1_t       p1_tab [P1_DEPTH];
  p2_t       p2_tab [P2_DEPTH];
  p3_t       p3_tab [P3_DEPTH];
  p4_t       p4_tab [P4_DEPTH];

  always_ff @(posedge clk) begin
    if (ci_we) ci_tab[ci_waddr] <= ci_entry_t'(ci_wdata);
    if (p1_we) p1_tab[p1_waddr] <= p1_wdata;
    if (p2_we) p2_tab[p2_waddr] <= p2_wdata;
    if (p3_we) p3_tab[p3_waddr] <= p3_wdata;
    if (p4_we) p4_tab[p4_waddr] <= p4_wdata;
  end

  ci_entry_t e;
  assign e = ci_tab[rd_ci];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (rd_en) begin
      cfg.p1 <= p1_tab[e.p1];
      cfg.p2 <= p2_tab[e.p2];
      cfg.p3 <= p3_tab[e.p3];
      cfg.p4 <= p4_tab[e.p4];
    end
  end

endmodule
