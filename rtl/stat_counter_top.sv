// Statistics counter chip: N counters of M bits kept as small CW-bit counters in on-chip
// SRAM, backed by full-size counters in external DRAM, under the LR(T) counter management
// algorithm.
//
// Updates (one counter index per update, from the packet forwarding logic) go only to the
// SRAM counters. Every B updates the controller (lr_cma) evicts one SRAM counter: its value
// is added to the DRAM counter by the DRAM update engine and the SRAM counter is reset. The
// victim is the largest counter touched in the last B updates if it has reached T,
// otherwise any counter at or above T, located through the aggregated bitmap, otherwise
// again the largest recent one. With T = B no SRAM counter exceeds
// (2B-1) + log_d(N-1), d = B/(B-1): 309 for N = 2**20, B = 20, hence CW = 9.
//
// Byte counters: with upd_prob high an update of upd_bytes bytes adds 1 with probability
// upd_bytes / U (prob_incr); with upd_prob low it adds 1 (packet counters).
//
// Timing: after reset the SRAM and bitmap are cleared (init_done, N clocks). Then updates
// are accepted on upd_valid & upd_ready, B in every B+1 clocks; upd_ready drops for the
// eviction slot, and longer if the previous DRAM update or bitmap find is still running.
// A DRAM update is one read and one write on the DRAM command port (see dram_updater).
// The total of counter i is DRAM[i] + SRAM[i] (times U for probabilistic byte counts).
// evict_* report each eviction: counter, value moved to DRAM and which rule chose it.
// The structure (SRAM cache of small counters, DRAM of full ones, LR(T) with an aggregated
// bitmap, probabilistic byte updates) and the default sizes follow the published scheme;
// the port protocols, status outputs and clear-after-reset are choices of this design.
// The bitmap's test result and echoed index are left unused: the controller only needs
// the outcome of finds.
module stat_counter_top
  import stat_pkg::*;
#(
  parameter int unsigned N  = 1 << 20,  // number of counters
  parameter int unsigned B  = 20,       // updates per DRAM update
  parameter int unsigned T  = 20,       // LR threshold (T = B is the optimal choice)
  parameter int unsigned CW = 9,        // SRAM counter width
  parameter int unsigned M  = 64,       // DRAM counter width
  parameter int unsigned W  = 64,       // aggregated bitmap word width
  parameter int unsigned U  = 1500,     // largest byte increment
  parameter int unsigned XW = 11        // width of the byte amount
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 init_done,
  // counter updates
  input  logic                 upd_valid,
  output logic                 upd_ready,
  input  logic [$clog2(N)-1:0] upd_idx,
  input  logic                 upd_prob,
  input  logic [XW-1:0]        upd_bytes,
  // external DRAM
  output logic                 dram_cmd_valid,
  output logic                 dram_cmd_write,
  output logic [$clog2(N)-1:0] dram_cmd_addr,
  output logic [M-1:0]         dram_cmd_wdata,
  input  logic                 dram_cmd_ready,
  input  logic                 dram_rd_valid,
  input  logic [M-1:0]         dram_rd_data,
  // status
  output logic                 overflow,
  output logic                 evict_valid,
  output logic [$clog2(N)-1:0] evict_idx,
  output logic [CW-1:0]        evict_val,
  output evict_src_e           evict_src,
  output logic                 evict_wait_find,
  output logic                 evict_wait_dram
);
  localparam int unsigned LOG_N = $clog2(N);

  logic             sram_done, abm_done;
  logic             amt;
  logic             inc_en, inc_amt, rr_en;
  logic [LOG_N-1:0] inc_idx, rr_idx;
  logic [CW-1:0]    inc_new, rr_val;
  abm_op_e          abm_op, abm_res_op;
  logic [LOG_N-1:0] abm_idx, abm_res_idx, abm_res_find_idx;
  logic             abm_res_test, abm_res_found;
  logic             dreq_valid, dreq_ready;
  logic [LOG_N-1:0] dreq_idx;
  logic [CW-1:0]    dreq_val;

  assign init_done = sram_done && abm_done;

  prob_incr #(.U(U), .XW(XW)) u_prob (
    .clk, .rst_n,
    .step    (upd_valid && upd_ready),
    .prob_en (upd_prob),
    .x       (upd_bytes),
    .amt     (amt)
  );

  lr_cma #(.LOG_N(LOG_N), .CW(CW), .B(B), .T(T)) u_cma (
    .clk, .rst_n,
    .mem_ready (init_done),
    .upd_valid, .upd_ready, .upd_idx,
    .upd_amt   (amt),
    .inc_en, .inc_idx, .inc_amt, .inc_new,
    .rr_en, .rr_idx, .rr_val,
    .abm_op, .abm_idx, .abm_res_op, .abm_res_found, .abm_res_find_idx,
    .dreq_valid, .dreq_ready, .dreq_idx, .dreq_val,
    .evict_valid, .evict_src, .evict_wait_find, .evict_wait_dram
  );

  counter_sram #(.N(N), .CW(CW)) u_sram (
    .clk, .rst_n,
    .init_done (sram_done),
    .inc_en, .inc_idx, .inc_amt, .inc_new,
    .rr_en, .rr_idx, .rr_val,
    .overflow
  );

  agg_bitmap #(.N(N), .W(W)) u_abm (
    .clk, .rst_n,
    .init_done    (abm_done),
    .op           (abm_op),
    .op_idx       (abm_idx),
    .res_op       (abm_res_op),
    .res_idx      (abm_res_idx),
    .res_test     (abm_res_test),
    .res_found    (abm_res_found),
    .res_find_idx (abm_res_find_idx)
  );

  dram_updater #(.LOG_N(LOG_N), .CW(CW), .M(M)) u_dram (
    .clk, .rst_n,
    .req_valid (dreq_valid),
    .req_ready (dreq_ready),
    .req_idx   (dreq_idx),
    .req_val   (dreq_val),
    .cmd_valid (dram_cmd_valid),
    .cmd_write (dram_cmd_write),
    .cmd_addr  (dram_cmd_addr),
    .cmd_wdata (dram_cmd_wdata),
    .cmd_ready (dram_cmd_ready),
    .rd_valid  (dram_rd_valid),
    .rd_data   (dram_rd_data)
  );

  assign evict_idx = dreq_idx;
  assign evict_val = dreq_val;
endmodule
