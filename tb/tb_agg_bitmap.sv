// Self-checking testbench for agg_bitmap, at the 128-element, 16-bit-word size of the
// worked example (3 internal levels plus the leaf level).
//
// A random stream of add / delete / test / find / delete+find operations is issued, one
// per clock, against a plain bit-vector reference. Each result is checked when it comes
// out: test returns the reference bit, a find succeeds exactly when the reference set (after
// the operation's own delete) is non-empty and returns one of its members, and every result
// arrives exactly H+2 clocks after its operation.
module tb_agg_bitmap;
  import stat_pkg::*;
  localparam int unsigned N = 128, W = 16;
  localparam int unsigned LOG_N = $clog2(N);
  localparam int unsigned H = LOG_N - $clog2(W);
  localparam int unsigned LAT = H + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             init_done;
  abm_op_e          op, res_op;
  logic [LOG_N-1:0] op_idx, res_idx, res_find_idx;
  logic             res_test, res_found;

  agg_bitmap #(.N(N), .W(W)) dut (.*);

  typedef struct {
    abm_op_e          op;
    logic [LOG_N-1:0] idx;
    logic [N-1:0]     set_after;
    logic             test_bit;
    longint           cycle;
  } exp_t;

  exp_t         expq[$];
  logic [N-1:0] ref_set;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_found = 0, n_empty = 0, n_delfind = 0, n_shared = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // result checker
  always @(posedge clk) begin
    if (rst_n && res_op != ABM_NOP) begin
      exp_t e;
      if (expq.size() == 0) check(0, "unexpected result");
      else begin
        e = expq.pop_front();
        check(res_op == e.op && res_idx == e.idx, "result order");
        check(cyc - e.cycle == longint'(LAT), $sformatf("latency %0d", cyc - e.cycle));
        if (e.op == ABM_TEST) check(res_test == e.test_bit, "test bit");
        if (abm_is_find(e.op)) begin
          if (e.set_after == '0) begin
            check(!res_found, "find on empty set");
            n_empty++;
          end else begin
            check(res_found && e.set_after[res_find_idx], $sformatf("find returned %0d", res_find_idx));
            n_found++;
          end
        end
      end
    end
  end

  // pick a random member of the reference set, or -1
  function automatic int pick_member();
    int start = $urandom_range(N - 1);
    for (int k = 0; k < N; k++)
      if (ref_set[(start + k) % N]) return (start + k) % N;
    return -1;
  endfunction

  task automatic issue(abm_op_e o, int i);
    exp_t e;
    op     <= o;
    op_idx <= LOG_N'(i);
    e.op = o;
    e.idx = LOG_N'(i);
    e.test_bit = ref_set[i];
    if (o == ABM_ADD) ref_set[i] = 1'b1;
    if (abm_is_del(o)) ref_set[i] = 1'b0;
    e.set_after = ref_set;
    e.cycle = cyc + 1;   // sampled at the next edge
    if (o != ABM_NOP) expq.push_back(e);
    @(posedge clk);
  endtask

  initial begin
    op = ABM_NOP;
    op_idx = '0;
    ref_set = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (!init_done) @(posedge clk);
    // directed: find on empty, single element, delete+find of the only element
    issue(ABM_FIND, 0);
    issue(ABM_ADD, 77);
    issue(ABM_FIND, 0);
    issue(ABM_DELFIND, 77);
    n_delfind++;
    issue(ABM_TEST, 77);
    // two elements in the same leaf word: delete+find must return the other one
    issue(ABM_ADD, 33);
    issue(ABM_ADD, 34);
    issue(ABM_DELFIND, 33);
    n_shared++;
    issue(ABM_DELFIND, 34);
    // random traffic, sparse and dense phases
    for (int n = 0; n < 6000; n++) begin
      automatic int r = $urandom_range(99);
      automatic bit dense = ((n / 1500) % 2) == 1;
      automatic int m = pick_member();
      automatic int i = $urandom_range(N - 1);
      if (r < (dense ? 45 : 25)) begin
        if (!ref_set[i]) issue(ABM_ADD, i); else issue(ABM_TEST, i);
      end else if (r < 45 && m >= 0) begin
        issue(ABM_DEL, m);
      end else if (r < 60) begin
        issue(ABM_TEST, $urandom_range(N - 1));
      end else if (r < 75) begin
        issue(ABM_FIND, $urandom_range(N - 1));
      end else if (r < 95 && m >= 0) begin
        issue(ABM_DELFIND, m);
        n_delfind++;
      end else begin
        issue(ABM_NOP, 0);
      end
    end
    issue(ABM_NOP, 0);
    repeat (LAT + 2) @(posedge clk);
    check(expq.size() == 0, "results outstanding");
    check(n_found > 100 && n_empty > 2 && n_delfind > 100, "coverage of find outcomes");
    $display("finds: %0d found, %0d empty; %0d delete+find", n_found, n_empty, n_delfind);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
