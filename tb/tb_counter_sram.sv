// Self-checking testbench for counter_sram (64 counters of 4 bits).
//
// Checks that the array is cleared after reset, that increments of 0 and 1 and
// read-and-reset operations match a reference array, including back-to-back operations on
// the same counter, that inc_new / rr_val are valid in the same clock, and that a counter
// at its maximum saturates and raises the sticky overflow flag.
module tb_counter_sram;
  localparam int unsigned N = 64, CW = 4, LOG_N = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             init_done, inc_en, inc_amt, rr_en, overflow;
  logic [LOG_N-1:0] inc_idx, rr_idx;
  logic [CW-1:0]    inc_new, rr_val;

  counter_sram #(.N(N), .CW(CW)) dut (.*);

  int ref_c [N];
  int checks = 0, failures = 0;
  int n_sat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    inc_en = 0; rr_en = 0; inc_amt = 0; inc_idx = '0; rr_idx = '0;
    foreach (ref_c[i]) ref_c[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!init_done, "init_done too early");
    while (!init_done) @(posedge clk);
    check(!overflow, "overflow after reset");
    for (int n = 0; n < 4000; n++) begin
      automatic int i = (n < 2000) ? $urandom_range(N - 1) : $urandom_range(3);
      automatic int r = $urandom_range(99);
      @(negedge clk);
      inc_en = 0; rr_en = 0;
      if (r < 80) begin
        inc_en = 1; inc_idx = LOG_N'(i); inc_amt = (r < 70);
        #1;
        if (ref_c[i] + int'(inc_amt) > 15) begin
          check(inc_new == 4'd15, "saturation value");
          n_sat++;
        end else begin
          ref_c[i] += int'(inc_amt);
          check(int'(inc_new) == ref_c[i], $sformatf("inc_new of %0d: %0d vs %0d", i, inc_new, ref_c[i]));
        end
      end else if (r < 95) begin
        rr_en = 1; rr_idx = LOG_N'(i);
        #1;
        check(int'(rr_val) == ref_c[i], $sformatf("rr_val of %0d", i));
        ref_c[i] = 0;
      end
    end
    @(negedge clk);
    inc_en = 0; rr_en = 0;
    check(n_sat > 0, "saturation never reached");
    check(overflow, "overflow flag not set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
