// Self-checking testbench for dram_updater, with the behavioural DRAM model.
//
// Sends random (counter, value) requests whenever the updater is ready, mirrors them in a
// reference array and at the end compares every DRAM counter with the reference. It also
// checks that each request causes exactly one read and one write, that req_ready is low
// while a request is in flight, and that the read of a counter follows the write of the
// previous update to it (repeated requests to one counter).
module tb_dram_updater;
  localparam int unsigned LOG_N = 5, CW = 9, M = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             req_valid, req_ready;
  logic [LOG_N-1:0] req_idx;
  logic [CW-1:0]    req_val;
  logic             cmd_valid, cmd_write, cmd_ready, rd_valid;
  logic [LOG_N-1:0] cmd_addr;
  logic [M-1:0]     cmd_wdata, rd_data;

  dram_updater #(.LOG_N(LOG_N), .CW(CW), .M(M)) dut (.*);
  dram_model #(.LOG_N(LOG_N), .M(M), .MIN_LAT(1), .MAX_LAT(8), .READY_PCT(60)) u_dram (
    .clk, .cmd_valid, .cmd_write, .cmd_addr, .cmd_wdata, .cmd_ready, .rd_valid, .rd_data);

  longint ref_d [1 << LOG_N];
  int checks = 0, failures = 0, n_req = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    req_valid = 0; req_idx = '0; req_val = '0;
    foreach (ref_d[i]) ref_d[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(req_ready, "ready after reset");
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      while (!req_ready) @(negedge clk);
      req_valid = 1;
      req_idx = (n % 3 == 0) ? LOG_N'(7) : LOG_N'($urandom);
      req_val = CW'($urandom_range(511));
      ref_d[req_idx] += longint'(req_val);
      n_req++;
      @(negedge clk);
      req_valid = 0;
      check(!req_ready, "busy after accept");
    end
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    foreach (ref_d[i]) check(u_dram.peek(LOG_N'(i)) == M'(ref_d[i]), $sformatf("counter %0d", i));
    check(u_dram.n_reads == n_req && u_dram.n_writes == n_req, "one read and one write per request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
