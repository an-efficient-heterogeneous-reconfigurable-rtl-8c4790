// profiler: finds hot basic blocks (HBBs) while the core runs in training mode.
//
// Two registers hold the previous and the current PC of the committed
// instruction stream. Whenever a new PC arrives they shift, and in the next
// cycle a comparator checks whether current - previous equals the instruction
// length (4 bytes). If not, a branch or jump was taken and the current PC is
// the start of a basic block: if the table already holds that address its
// counter is incremented (saturating), otherwise the address is added with a
// count of one. An entry whose count has reached `threshold` is a hot basic
// block; hot_new pulses with the address when an entry first reaches it.
// When the table is full, new addresses are dropped and `dropped` pulses.
//
// Interface: pc_valid/pc, one committed instruction per cycle at most; a read
// port (rd_idx) shows any entry; clear empties the table.
//
// The PC registers, the comparator and the address/counter table follow the
// design. The table size, counter width, the drop-when-full policy and the
// read port are this implementation's choices.
module profiler
  import rfu_pkg::*;
#(
  parameter int unsigned ENTRIES   = 16,
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned INSTR_LEN = 4,
  localparam int unsigned IDX_W = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,     // training mode
  input  logic             clear,
  input  logic             pc_valid,
  input  logic [PC_W-1:0]  pc,
  input  logic [CNT_W-1:0] threshold,
  output logic             taken,      // a taken branch/jump was seen
  output logic             hot_new,
  output logic [PC_W-1:0]  hot_addr,
  output logic             dropped,
  output logic             full,
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_valid,
  output logic [PC_W-1:0]  rd_addr,
  output logic [CNT_W-1:0] rd_count,
  output logic             rd_hot
);

  logic [PC_W-1:0]  prev_pc_q, cur_pc_q;
  logic             prev_ok_q, cur_ok_q, fresh_q;

  logic             ent_valid [ENTRIES];
  logic [PC_W-1:0]  ent_addr  [ENTRIES];
  logic [CNT_W-1:0] ent_cnt   [ENTRIES];
  logic [IDX_W:0]   used_q;

  // comparator on the two PC registers
  assign taken = fresh_q && prev_ok_q && cur_ok_q &&
                 (cur_pc_q != prev_pc_q + PC_W'(INSTR_LEN));

  logic             hit;
  logic [IDX_W-1:0] hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!hit && ent_valid[i] && ent_addr[i] == cur_pc_q) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
    end
  end

  assign full = (used_q == (IDX_W+1)'(ENTRIES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_pc_q <= '0;
      cur_pc_q  <= '0;
      prev_ok_q <= 1'b0;
      cur_ok_q  <= 1'b0;
      fresh_q   <= 1'b0;
    end else if (clear) begin
      prev_ok_q <= 1'b0;
      cur_ok_q  <= 1'b0;
      fresh_q   <= 1'b0;
    end else begin
      fresh_q <= enable && pc_valid;
      if (enable && pc_valid) begin
        prev_pc_q <= cur_pc_q;
        prev_ok_q <= cur_ok_q;
        cur_pc_q  <= pc;
        cur_ok_q  <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q   <= '0;
      hot_new  <= 1'b0;
      hot_addr <= '0;
      dropped  <= 1'b0;
      for (int i = 0; i < ENTRIES; i++) begin
        ent_valid[i] <= 1'b0;
        ent_addr[i]  <= '0;
        ent_cnt[i]   <= '0;
      end
    end else if (clear) begin
      used_q  <= '0;
      hot_new <= 1'b0;
      dropped <= 1'b0;
      for (int i = 0; i < ENTRIES; i++) ent_valid[i] <= 1'b0;
    end else begin
      hot_new <= 1'b0;
      dropped <= 1'b0;
      if (taken) begin
        if (hit) begin
          if (ent_cnt[hit_idx] != '1) begin
            ent_cnt[hit_idx] <= ent_cnt[hit_idx] + 1'b1;
            if (ent_cnt[hit_idx] + 1'b1 == threshold) begin
              hot_new  <= 1'b1;
              hot_addr <= cur_pc_q;
            end
          end
        end else if (!full) begin
          ent_valid[used_q[IDX_W-1:0]] <= 1'b1;
          ent_addr[used_q[IDX_W-1:0]]  <= cur_pc_q;
          ent_cnt[used_q[IDX_W-1:0]]   <= CNT_W'(1);
          used_q <= used_q + 1'b1;
          if (threshold == CNT_W'(1)) begin
            hot_new  <= 1'b1;
            hot_addr <= cur_pc_q;
          end
        end else begin
          dropped <= 1'b1;
        end
      end
    end
  end

  assign rd_valid = ent_valid[rd_idx];
  assign rd_addr  = ent_addr[rd_idx];
  assign rd_count = ent_cnt[rd_idx];
  assign rd_hot   = ent_valid[rd_idx] && (ent_cnt[rd_idx] >= threshold);

endmodule
