// Self-checking testbench for lr_register.
//
// Feeds cycles of random (index, value) updates, clearing between cycles (sometimes with an
// update in the clearing clock), and checks j* / C* against the first maximum of the
// cycle computed in the testbench.
module tb_lr_register;
  localparam int unsigned LOG_N = 8, CW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             clear, upd_en, valid;
  logic [LOG_N-1:0] upd_idx, jstar;
  logic [CW-1:0]    upd_val, cstar;

  lr_register #(.LOG_N(LOG_N), .CW(CW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int best_i, best_v;
    bit have;
    clear = 0; upd_en = 0; upd_idx = '0; upd_val = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(!valid, "valid after reset");
    have = 0; best_i = 0; best_v = 0;
    for (int cyc = 0; cyc < 300; cyc++) begin
      automatic int len = $urandom_range(1, 12);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        clear = (k == 0) && (cyc > 0);
        upd_en = ($urandom_range(3) != 0) || (k == 0);
        upd_idx = LOG_N'($urandom);
        upd_val = CW'($urandom_range(cyc % 2 ? 63 : 7));
        if (clear) have = 0;
        if (upd_en && (!have || int'(upd_val) > best_v)) begin
          have = 1; best_i = int'(upd_idx); best_v = int'(upd_val);
        end
        @(posedge clk);
        #1;
        check(valid == have, "valid");
        if (have) check(int'(jstar) == best_i && int'(cstar) == best_v,
                        $sformatf("j*=%0d C*=%0d expected %0d %0d", jstar, cstar, best_i, best_v));
      end
    end
    @(negedge clk);
    clear = 1; upd_en = 0;
    @(posedge clk); #1;
    check(!valid, "clear without update");
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
