// Workload testbench for the two counter-size bounds of the LR(T) algorithm.
//
// Two 16-counter instances with B = 4 (6-bit SRAM counters) receive the adaptive
// adversarial pattern of lr_adversary: one runs LR(0) (T = 0), the other LR(b) (T = B).
// Checks:
//   - LR(0) is driven to at least B/2 (N+1) = 34, the lower bound that makes it need wide
//     counters
//   - LR(b) never exceeds (2B-1) + log_d(N-1) = 16, d = B/(B-1), the bound that makes it
//     optimal, and its SRAM counters never saturate
//   - every evicted value matches the reference model in both instances
module tb_lr_bound;
  localparam int unsigned N = 16, B = 4, CW = 6, W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done0, doneb, ovf0, ovfb;
  int   max0, maxb, mis0, misb, upd0, updb;

  lr_adversary #(.N(N), .B(B), .T(0), .CW(CW), .W(W)) u_lr0 (
    .clk, .rst_n, .done(done0), .max_value(max0), .mismatches(mis0), .n_updates(upd0), .overflow(ovf0));
  lr_adversary #(.N(N), .B(B), .T(B), .CW(CW), .W(W)) u_lrb (
    .clk, .rst_n, .done(doneb), .max_value(maxb), .mismatches(misb), .n_updates(updb), .overflow(ovfb));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic int lower0 = B / 2 * (N + 1);
    automatic int upperb = int'($floor(2.0 * B - 1.0 + $ln(N - 1.0) / $ln(real'(B) / (B - 1.0))));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (!(done0 && doneb)) @(posedge clk);
    $display("LR(0): %0d updates, largest counter %0d (lower bound %0d)", upd0, max0, lower0);
    $display("LR(b): %0d updates, largest counter %0d (upper bound %0d)", updb, maxb, upperb);
    check(max0 >= lower0, "LR(0) did not reach its lower bound");
    check(maxb <= upperb, "LR(b) exceeded its upper bound");
    check(!ovf0 && !ovfb, "SRAM counter saturated");
    check(mis0 == 0 && misb == 0, "evicted value differs from the reference");
    check(upd0 > 1000 && updb > 1000, "pattern too short");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
