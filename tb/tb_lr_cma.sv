// Self-checking testbench for lr_cma, with the counter SRAM, the aggregated bitmap and the
// DRAM engine replaced by simple testbench models (16 counters, B = 4, T = 4).
//
// The bitmap model keeps the set {counters >= T} as a reference and answers finds with its
// lowest member after a 7-clock latency, longer than an update cycle, so the eviction slot
// sometimes has to wait for the find; the DRAM engine model is randomly busy. The testbench
// follows every update and eviction and checks:
//   - exactly B updates between evictions, and upd_ready low during the eviction slot
//   - an eviction right after the B-th update whenever nothing makes it wait
//   - the victim against the LR(T) rule, computed from its own j*/C* and find result
//   - the value handed to DRAM, the reset of the SRAM counter, and that a bitmap add is
//     issued exactly when a counter reaches T, delete+find when the victim is >= T, else find
// and counts how often each eviction rule and each kind of wait occurred.
module tb_lr_cma;
  import stat_pkg::*;
  localparam int unsigned LOG_N = 4, N = 16, CW = 6, B = 4, T = 4, BM_LAT = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             mem_ready, upd_valid, upd_ready, upd_amt;
  logic [LOG_N-1:0] upd_idx;
  logic             inc_en, inc_amt, rr_en;
  logic [LOG_N-1:0] inc_idx, rr_idx;
  logic [CW-1:0]    inc_new, rr_val;
  abm_op_e          abm_op, abm_res_op;
  logic [LOG_N-1:0] abm_idx, abm_res_find_idx;
  logic             abm_res_found;
  logic             dreq_valid, dreq_ready;
  logic [LOG_N-1:0] dreq_idx;
  logic [CW-1:0]    dreq_val;
  logic             evict_valid, evict_wait_find, evict_wait_dram;
  logic [1:0]       evict_src;

  lr_cma #(.LOG_N(LOG_N), .CW(CW), .B(B), .T(T)) dut (.*);

  // ---------------- models ----------------
  int           cnt [N];
  logic [N-1:0] bm_set;
  typedef struct { abm_op_e op; logic found; logic [LOG_N-1:0] idx; int due; } res_t;
  res_t         resq[$];
  int           cyc = 0;

  assign inc_new = CW'(cnt[inc_idx] + int'(inc_amt));
  assign rr_val  = CW'(cnt[rr_idx]);

  // ---------------- reference of the algorithm ----------------
  int  n_upd_cycle = 0, ref_j = 0, ref_c = -1;
  bit  ref_found = 0;
  int  ref_found_idx = 0;
  bit  last_was_bth = 0;
  int  checks = 0, failures = 0;
  int  n_src [4];
  int  n_wait_find = 0, n_wait_dram = 0, n_evict = 0, n_add = 0, n_delfind = 0, n_find = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic int lowest(logic [N-1:0] s);
    for (int k = 0; k < N; k++) if (s[k]) return k;
    return -1;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    abm_res_op <= ABM_NOP;
    if (resq.size() > 0 && resq[0].due == cyc) begin
      automatic res_t r = resq.pop_front();
      abm_res_op       <= r.op;
      abm_res_found    <= r.found;
      abm_res_find_idx <= r.idx;
      ref_found        = r.found;
      ref_found_idx    = int'(r.idx);
    end
    if (rst_n && mem_ready) begin
      if (evict_wait_find) n_wait_find++;
      if (evict_wait_dram) n_wait_dram++;
      check(!(upd_ready && (evict_valid || evict_wait_find || evict_wait_dram)), "ready in eviction slot");
      if (upd_valid && upd_ready) begin
        automatic int nv = cnt[upd_idx] + int'(upd_amt);
        check(inc_en && inc_idx == upd_idx && inc_amt == upd_amt && !rr_en, "SRAM increment");
        check((abm_op == ABM_ADD) == (upd_amt && nv == T), "bitmap add on reaching T");
        if (abm_op == ABM_ADD) begin
          check(abm_idx == upd_idx, "add index");
          bm_set[upd_idx] = 1'b1;
          n_add++;
        end
        if (n_upd_cycle == 0 || nv > ref_c) begin
          ref_j = int'(upd_idx);
          ref_c = nv;
        end
        cnt[upd_idx] <= nv;
        n_upd_cycle++;
        check(n_upd_cycle <= B, "more than B updates in a cycle");
      end
      if (last_was_bth && !evict_wait_find && !evict_wait_dram)
        check(evict_valid, "eviction did not follow the B-th update");
      last_was_bth = (upd_valid && upd_ready && n_upd_cycle == B);
      if (evict_valid) begin
        automatic int exp_v = (ref_c >= T || !ref_found) ? ref_j : ref_found_idx;
        automatic int exp_src = (ref_c >= T) ? 1 : (ref_found ? 2 : 3);
        n_evict++;
        check(n_upd_cycle == B, "eviction before B updates");
        check(int'(rr_idx) == exp_v && rr_en && dreq_valid && dreq_idx == rr_idx,
              $sformatf("victim %0d, expected %0d", rr_idx, exp_v));
        check(int'(evict_src) == exp_src, "eviction rule");
        n_src[evict_src]++;
        check(int'(dreq_val) == cnt[exp_v], "value sent to DRAM");
        if (cnt[exp_v] >= T) begin
          check(abm_op == ABM_DELFIND && abm_idx == LOG_N'(exp_v), "delete+find");
          bm_set[exp_v] = 1'b0;
          n_delfind++;
        end else begin
          check(abm_op == ABM_FIND, "find");
          n_find++;
        end
        cnt[exp_v] <= 0;
        n_upd_cycle = 0;
        ref_found = 0;
        begin
          automatic res_t r;
          r.op = abm_op;
          r.found = (bm_set != '0);
          r.idx = LOG_N'(lowest(bm_set) < 0 ? 0 : lowest(bm_set));
          r.due = cyc + BM_LAT - 1;
          resq.push_back(r);
        end
      end
    end
  end

  // DRAM engine model: busy for a random time after each request
  int busy = 0;
  always @(posedge clk) begin
    if (dreq_valid && dreq_ready) busy <= $urandom_range(12, 1);
    else if (busy > 0) busy <= busy - 1;
  end
  assign dreq_ready = (busy == 0);

  // ---------------- stimulus ----------------
  initial begin
    foreach (cnt[i]) cnt[i] = 0;
    bm_set = '0;
    n_src = '{default: 0};
    mem_ready = 0; upd_valid = 0; upd_idx = '0; upd_amt = 0;
    abm_res_found = 0; abm_res_find_idx = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    check(!upd_ready, "ready before memories are cleared");
    mem_ready <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      upd_valid = ($urandom_range(9) != 0);
      // phases: spread traffic, hot counters, and bursts on one counter
      case ((n / 2000) % 3)
        0: upd_idx = LOG_N'($urandom);
        1: upd_idx = LOG_N'($urandom_range(3));
        default: upd_idx = LOG_N'((n / 7) % N);
      endcase
      upd_amt = ($urandom_range(9) != 0);
    end
    @(negedge clk);
    upd_valid = 0;
    repeat (30) @(posedge clk);
    $display("evictions %0d: j* high %0d, found %0d, j* low %0d; waits find %0d dram %0d; adds %0d",
             n_evict, n_src[1], n_src[2], n_src[3], n_wait_find, n_wait_dram, n_add);
    check(n_src[1] > 0 && n_src[2] > 0 && n_src[3] > 0, "every eviction rule used");
    check(n_wait_find > 0 && n_wait_dram > 0, "both eviction waits seen");
    check(n_delfind > 0 && n_find > 0, "both bitmap operations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
