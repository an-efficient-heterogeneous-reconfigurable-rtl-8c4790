// scheduler: hands custom instructions from the core to the RFU.
//
// A table holds, per CI, the address of the first instruction the CI replaces,
// the number of instructions it replaces and the number of clock cycles it
// needs on the RFU. The table index is also the CI's number in the
// configuration memory. When enabled (normal mode) the scheduler compares the
// core's PC with every valid entry each cycle. On a match it
//   cycle 0      halts the core and reads the CI's configuration
//   cycle 1      starts the RFU: the operands are latched
//   cycles 2..   waits the stored number of cycles; the last is the commit
//                cycle in which outputs 0..3 are written back
//   (+1 cycle)   writes outputs 4 and 5 if the CI has them
// and in its last cycle sets the PC to start address + 4 * length, so the core
// resumes after the replaced instructions. halt is high from the matching
// cycle up to and including the cycle of pc_set_valid.
//
// The table contents and the halt / wait / set-PC behaviour follow the design;
// the configuration-read and operand-latch cycles, the field widths and a
// table as deep as the CI numbering are this implementation's.
module scheduler
  import rfu_pkg::*;
#(
  parameter int unsigned NUM_CI  = 128,
  parameter int unsigned LEN_W   = 8,   // replaced instructions per CI
  parameter int unsigned CYC_W   = 4,   // RFU cycles per CI (1..15)
  localparam int unsigned CI_AW  = $clog2(NUM_CI)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,        // normal mode
  // table write
  input  logic             tab_we,
  input  logic [CI_AW-1:0] tab_waddr,
  input  logic             tab_wvalid,
  input  logic [PC_W-1:0]  tab_wpc,
  input  logic [LEN_W-1:0] tab_wlen,
  input  logic [CYC_W-1:0] tab_wcycles,
  // core side
  input  logic             pc_valid,
  input  logic [PC_W-1:0]  pc,
  output logic             halt,
  output logic             pc_set_valid,
  output logic [PC_W-1:0]  pc_set,
  // configuration memory and RFU
  output logic             cfg_rd_en,
  output logic [CI_AW-1:0] cfg_rd_ci,
  output logic             rfu_start,
  output logic             rfu_commit,
  input  logic             rfu_wb_extra
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EXEC, S_WB2} state_e;

  typedef struct packed {
    logic             valid;
    logic [PC_W-1:0]  pc;
    logic [LEN_W-1:0] len;
    logic [CYC_W-1:0] cycles;
  } entry_t;

  entry_t tab [NUM_CI];

  state_e           state_q;
  logic [CYC_W-1:0] cnt_q;
  logic [PC_W-1:0]  next_pc_q;

  logic             hit;
  logic [CI_AW-1:0] hit_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < NUM_CI; i++) begin
      if (!hit && tab[i].valid && tab[i].pc == pc) begin
        hit     = 1'b1;
        hit_idx = CI_AW'(i);
      end
    end
  end

  logic take;
  assign take = (state_q == S_IDLE) && enable && pc_valid && hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CI; i++) tab[i] <= '0;
    end else if (tab_we) begin
      tab[tab_waddr] <= '{valid: tab_wvalid, pc: tab_wpc, len: tab_wlen, cycles: tab_wcycles};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      next_pc_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (take) begin
          state_q   <= S_LOAD;
          cnt_q     <= (tab[hit_idx].cycles == '0) ? CYC_W'(1) : tab[hit_idx].cycles;
          next_pc_q <= pc + (PC_W'(tab[hit_idx].len) << 2);
        end
        S_LOAD: state_q <= S_EXEC;
        S_EXEC: begin
          cnt_q <= cnt_q - 1'b1;
          if (cnt_q == CYC_W'(1)) state_q <= rfu_wb_extra ? S_WB2 : S_IDLE;
        end
        S_WB2:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign cfg_rd_en  = take;
  assign cfg_rd_ci  = hit_idx;
  assign rfu_start  = (state_q == S_LOAD);
  assign rfu_commit = (state_q == S_EXEC) && (cnt_q == CYC_W'(1));
  assign halt       = take || (state_q != S_IDLE);
  assign pc_set_valid = (rfu_commit && !rfu_wb_extra) || (state_q == S_WB2);
  assign pc_set     = next_pc_q;

  assert property (@(posedge clk) disable iff (!rst_n) pc_set_valid |-> halt);

endmodule
