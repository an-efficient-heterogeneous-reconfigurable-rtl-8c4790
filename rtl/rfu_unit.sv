// rfu_unit: the RFU as bound to the core's register file.
//
// The RFU shares the core's register-file ports: its eight inputs come from
// the eight read ports of the 4-issue core and its results leave through the
// core's four write ports. While the RFU runs a CI the core is halted, so no
// separate ports are needed.
//
// Operation (all driven by the scheduler):
//   start   operands on rf_rdata (read from the registers named by cfg.p2,
//           which rf_raddr shows) are latched; rfu_array then works from
//           these registers for as many cycles as the CI needs.
//   commit  last cycle of the CI: outputs 0..3 with their enables and
//           destinations appear on the four write ports in this cycle;
//           outputs 4 and 5 are caught in two extra registers.
//   next cycle after commit: the extra registers are written through write
//           ports 0 and 1 (wb_extra tells the scheduler this cycle is needed).
// cfg must stay stable from start to commit (rfu_config_mem holds it).
// rf_raddr is the configuration's P2 field brought out unchanged, and the
// addresses of write ports 2 and 3 are always P3 destinations, so those
// output bits follow the cfg input directly.
//
// Sharing the ports, the two extra output registers and writing them one cycle
// later follow the design. Which write ports the extra outputs use and the
// start/commit handshake are this implementation's choices.
module rfu_unit
  import rfu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ci_cfg_t cfg,
  input  logic    start,
  input  logic    commit,
  output reg_t    rf_raddr [NUM_IN],
  input  word_t   rf_rdata [NUM_IN],
  output logic    wb_extra,            // current CI writes outputs 4/5
  output logic    wp_en   [NUM_WP],
  output reg_t    wp_addr [NUM_WP],
  output word_t   wp_data [NUM_WP]
);

  localparam int unsigned NUM_EXTRA = NUM_OUT - NUM_WP;

  word_t opnd_q [NUM_IN];
  word_t res    [NUM_OUT];

  logic  ex_en_q   [NUM_EXTRA];
  reg_t  ex_addr_q [NUM_EXTRA];
  word_t ex_data_q [NUM_EXTRA];
  logic  ex_pend_q;

  always_comb begin
    for (int i = 0; i < NUM_IN; i++) rf_raddr[i] = cfg.p2.in_reg[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_IN; i++) opnd_q[i] <= '0;
    end else if (start) begin
      for (int i = 0; i < NUM_IN; i++) opnd_q[i] <= rf_rdata[i];
    end
  end

  rfu_array u_array (
    .p1      (cfg.p1),
    .out_cfg (cfg.p3),
    .imm     (cfg.p4),
    .in_data (opnd_q),
    .out_data(res)
  );

  always_comb begin
    wb_extra = 1'b0;
    for (int k = 0; k < NUM_EXTRA; k++) wb_extra |= cfg.p3.out[NUM_WP + k].en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_pend_q <= 1'b0;
      for (int k = 0; k < NUM_EXTRA; k++) begin
        ex_en_q[k]   <= 1'b0;
        ex_addr_q[k] <= '0;
        ex_data_q[k] <= '0;
      end
    end else begin
      ex_pend_q <= commit && wb_extra;
      if (commit) begin
        for (int k = 0; k < NUM_EXTRA; k++) begin
          ex_en_q[k]   <= cfg.p3.out[NUM_WP + k].en;
          ex_addr_q[k] <= cfg.p3.out[NUM_WP + k].dest;
          ex_data_q[k] <= res[NUM_WP + k];
        end
      end
    end
  end

  always_comb begin
    for (int w = 0; w < NUM_WP; w++) begin
      wp_en[w]   = 1'b0;
      wp_addr[w] = cfg.p3.out[w].dest;
      wp_data[w] = res[w];
      if (commit) begin
        wp_en[w] = cfg.p3.out[w].en;
      end else if (ex_pend_q && w < NUM_EXTRA) begin
        wp_en[w]   = ex_en_q[w];
        wp_addr[w] = ex_addr_q[w];
        wp_data[w] = ex_data_q[w];
      end
    end
  end

  // commit and the extra write-back cycle never overlap
  assert property (@(posedge clk) disable iff (!rst_n) !(commit && ex_pend_q));

endmodule
