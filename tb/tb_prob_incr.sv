// Self-checking testbench for prob_incr (u = 1500).
//
// Packet mode must always add 1. In byte mode, x = 0 must never add, x = u must always add,
// and for several x the fraction of draws that add must be within 5 standard deviations of
// x/u; the sum of u * increments over a mixed stream must estimate the byte total within 3 %.
// The LFSR must only advance when step is high.
module tb_prob_incr;
  localparam int unsigned U = 1500, XW = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          step, prob_en, amt;
  logic [XW-1:0] x;

  prob_incr #(.U(U), .XW(XW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic draw(input bit p, input int xv, output bit a);
    @(negedge clk);
    prob_en = p; x = XW'(xv); step = 1;
    #1 a = amt;
    @(posedge clk);
    #1 step = 0;
  endtask

  initial begin
    bit a, a2;
    int hits;
    real total, est, mean, sd;
    step = 0; prob_en = 0; x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 200; k++) begin
      draw(0, $urandom_range(1500), a);
      check(a, "packet mode adds 1");
    end
    for (int k = 0; k < 500; k++) begin
      draw(1, 0, a);
      check(!a, "x = 0 never adds");
      draw(1, 1500, a);
      check(a, "x = u always adds");
    end
    for (int t = 0; t < 4; t++) begin
      automatic int xv = (t == 0) ? 40 : (t == 1) ? 300 : (t == 2) ? 750 : 1200;
      hits = 0;
      for (int k = 0; k < 20000; k++) begin
        draw(1, xv, a);
        hits += int'(a);
      end
      mean = 20000.0 * xv / U;
      sd = $sqrt(mean * (1.0 - real'(xv) / U));
      check(real'(hits) > mean - 5 * sd && real'(hits) < mean + 5 * sd,
            $sformatf("x=%0d: %0d hits, expected %f", xv, hits, mean));
    end
    total = 0; est = 0;
    for (int k = 0; k < 20000; k++) begin
      automatic int xv = $urandom_range(40, 1500);
      draw(1, xv, a);
      total += xv;
      est += a ? U : 0;
    end
    check(est > 0.97 * total && est < 1.03 * total, $sformatf("estimate %f of %f", est, total));
    // no step: the decision must not change
    @(negedge clk);
    prob_en = 1; x = 750; step = 0;
    #1 a = amt;
    for (int k = 0; k < 20; k++) begin
      @(posedge clk); #1;
      a2 = amt;
      check(a2 == a, "LFSR moved without step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
