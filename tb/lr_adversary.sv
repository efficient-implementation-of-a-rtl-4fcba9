// Adversarial traffic source for one stat_counter_top instance (testbench only).
//
// Drives the instance with the recursive arrival pattern used to show that LR(0) needs
// large counters: pattern(S) for a set S of n counters is
//   n = 2 : B/2 updates to each of the two counters (one full cycle of B updates)
//   n > 2 : x = pattern(S without its highest counter); y = pattern(S without x);
//           then B/2 updates to x and B/2 to y
// where each call returns the counter of its set left with the largest value. Under LR(0),
// which only evicts recently updated counters, the counter returned by pattern(all N)
// holds at least B/2 (N-1), and one more cycle of updates to it adds B. The recursion runs
// on an explicit stack. A reference model follows every update and eviction; the module
// reports the largest SRAM value reached and counts mismatches with the evicted values.
module lr_adversary #(
  parameter int unsigned N  = 16,
  parameter int unsigned B  = 4,
  parameter int unsigned T  = 4,
  parameter int unsigned CW = 6,
  parameter int unsigned W  = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   max_value,
  output int   mismatches,
  output int   n_updates,
  output logic overflow
);
  localparam int unsigned LOG_N = $clog2(N);

  logic             init_done, upd_valid, upd_ready, upd_prob;
  logic [LOG_N-1:0] upd_idx;
  logic [10:0]      upd_bytes;
  logic             dram_cmd_valid, dram_cmd_write, dram_cmd_ready, dram_rd_valid;
  logic [LOG_N-1:0] dram_cmd_addr;
  logic [63:0]      dram_cmd_wdata, dram_rd_data;
  logic             evict_valid, evict_wait_find, evict_wait_dram;
  logic [LOG_N-1:0] evict_idx;
  logic [CW-1:0]    evict_val;
  logic [1:0]       evict_src;

  stat_counter_top #(.N(N), .B(B), .T(T), .CW(CW), .W(W)) dut (.*);

  dram_model #(.LOG_N(LOG_N), .M(64), .MIN_LAT(1), .MAX_LAT(2), .READY_PCT(100)) u_dram (
    .clk, .cmd_valid(dram_cmd_valid), .cmd_write(dram_cmd_write), .cmd_addr(dram_cmd_addr),
    .cmd_wdata(dram_cmd_wdata), .cmd_ready(dram_cmd_ready), .rd_valid(dram_rd_valid),
    .rd_data(dram_rd_data));

  int val [N];
  int n_evict = 0;

  always @(posedge clk) begin
    if (rst_n && init_done) begin
      if (upd_valid && upd_ready) begin
        val[upd_idx] += 1;
        if (val[upd_idx] > max_value) max_value <= val[upd_idx];
      end
      if (evict_valid) begin
        if (int'(evict_val) != val[evict_idx]) mismatches <= mismatches + 1;
        val[evict_idx] = 0;
        n_evict++;
      end
    end
  end

  task automatic send(int i);
    @(negedge clk);
    upd_valid = 1'b1;
    upd_idx   = LOG_N'(i);
    @(posedge clk);
    while (!upd_ready) @(posedge clk);
    n_updates++;
    @(negedge clk);
    upd_valid = 1'b0;
  endtask

  // one cycle of B updates to a and b; returns the one left with the larger value
  task automatic pair(input int a, input int b, output int keep);
    automatic int ev = n_evict;
    for (int k = 0; k < B / 2; k++) send(a);
    for (int k = 0; k < B / 2; k++) send(b);
    while (n_evict == ev) @(posedge clk);
    @(negedge clk);
    keep = (val[a] >= val[b]) ? a : b;
  endtask

  function automatic int highest(longint unsigned m);
    for (int k = 63; k >= 0; k--) if (m[k]) return k;
    return -1;
  endfunction

  function automatic int lowest(longint unsigned m);
    for (int k = 0; k < 64; k++) if (m[k]) return k;
    return -1;
  endfunction

  longint unsigned st_mask  [N + 1];
  int              st_stage [N + 1];
  int              st_x     [N + 1];

  initial begin
    automatic int sp = 0, ret = -1;
    foreach (val[i]) val[i] = 0;
    done = 0; max_value = 0; mismatches = 0; n_updates = 0;
    upd_valid = 0; upd_idx = '0; upd_prob = 0; upd_bytes = '0;
    @(posedge rst_n);
    while (!init_done) @(posedge clk);
    st_mask[0] = (N == 64) ? '1 : ((64'd1 << N) - 1);
    st_stage[0] = 0;
    sp = 1;
    while (sp > 0) begin
      automatic int f = sp - 1;
      if ($countones(st_mask[f]) == 2) begin
        pair(highest(st_mask[f]), lowest(st_mask[f]), ret);
        sp--;
      end else if (st_stage[f] == 0) begin
        st_stage[f] = 1;
        st_mask[sp] = st_mask[f] & ~(64'd1 << highest(st_mask[f]));
        st_stage[sp] = 0;
        sp++;
      end else if (st_stage[f] == 1) begin
        st_x[f] = ret;
        st_stage[f] = 2;
        st_mask[sp] = st_mask[f] & ~(64'd1 << ret);
        st_stage[sp] = 0;
        sp++;
      end else begin
        pair(st_x[f], ret, ret);
        sp--;
      end
    end
    // one more cycle of updates to the counter left standing
    for (int k = 0; k < B; k++) send(ret);
    repeat (4) @(posedge clk);
    done = 1;
  end
endmodule
