// Full-size testbench for stat_counter_top: every parameter at its default (2**20
// counters, B = T = 20, 9-bit SRAM counters, 64-bit bitmap words and DRAM counters).
//
// Same traffic phases (600 000 updates), reference model and checks as the reduced-size end-to-end
// testbench, run after the 2**20-clock clear of the counter SRAM. The DRAM model is made
// slow enough that evictions sometimes wait for it. At this size the bitmap answers a find
// in 16 clocks, well inside the 21-clock update cycle, so an eviction never waits for a
// find; that count is reported but not required.
module tb_stat_counter_full;
  import stat_pkg::*;
  localparam int unsigned N = 1 << 20, B = 20, T = 20, CW = 9, M = 64, W = 64, U = 1500, XW = 11;
  localparam int unsigned LOG_N = $clog2(N);
  localparam int unsigned NUPD = 600000;
  localparam int unsigned BYTE_BASE = N - 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             init_done, upd_valid, upd_ready, upd_prob;
  logic [LOG_N-1:0] upd_idx;
  logic [XW-1:0]    upd_bytes;
  logic             dram_cmd_valid, dram_cmd_write, dram_cmd_ready, dram_rd_valid;
  logic [LOG_N-1:0] dram_cmd_addr;
  logic [M-1:0]     dram_cmd_wdata, dram_rd_data;
  logic             overflow, evict_valid, evict_wait_find, evict_wait_dram;
  logic [LOG_N-1:0] evict_idx;
  logic [CW-1:0]    evict_val;
  logic [1:0]       evict_src;

  stat_counter_top dut (.*);

  dram_model #(.LOG_N(LOG_N), .M(M), .MIN_LAT(1), .MAX_LAT(24), .READY_PCT(50)) u_dram (
    .clk, .cmd_valid(dram_cmd_valid), .cmd_write(dram_cmd_write), .cmd_addr(dram_cmd_addr),
    .cmd_wdata(dram_cmd_wdata), .cmd_ready(dram_cmd_ready), .rd_valid(dram_rd_valid),
    .rd_data(dram_rd_data));

  // ---------------- reference ----------------
  int     sram [N];
  longint total [N];
  longint bytes_sent [N];
  int     n_above = 0;          // reference counters with value >= T
  int     n_in_cycle = 0, ref_j = 0, ref_c = 0;
  int     max_seen = 0;
  int     checks = 0, failures = 0;
  int     n_src [4];
  int     n_wait_find = 0, n_wait_dram = 0, n_slot_stall = 0, n_delfind = 0, n_find = 0;
  int     n_byte_inc = 0, n_byte_skip = 0, n_upd = 0;
  longint cyc = 0;
  int     n_bubble = 0;
  int     bound;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && init_done) begin
      if (evict_wait_find) n_wait_find++;
      if (evict_wait_dram) n_wait_dram++;
      if (upd_valid && !upd_ready) n_slot_stall++;
      // a waiting update is held back only by the eviction slot or one of its waits
      if (upd_valid && !upd_ready && !evict_valid && !evict_wait_find && !evict_wait_dram) n_bubble++;
      if (upd_valid && upd_ready) begin
        automatic int i = int'(upd_idx);
        automatic int a = int'(dut.amt);
        if (!upd_prob) check(a == 1, "packet update adds 1");
        else if (a == 1) n_byte_inc++;
        else n_byte_skip++;
        if (upd_prob) bytes_sent[i] += longint'(upd_bytes);
        if (sram[i] < T && sram[i] + a >= T) n_above++;
        if (n_in_cycle == 0 || sram[i] + a > ref_c) begin
          ref_j = i;
          ref_c = sram[i] + a;
        end
        sram[i] += a;
        total[i] += a;
        if (sram[i] > max_seen) max_seen = sram[i];
        n_in_cycle++;
        n_upd++;
      end
      if (evict_valid) begin
        automatic int v = int'(evict_idx);
        check(n_in_cycle == B, "eviction after B updates");
        check(int'(evict_val) == sram[v], $sformatf("evicted value of %0d: %0d vs %0d", v, evict_val, sram[v]));
        case (evict_src)
          2'd1: check(ref_c >= T && v == ref_j, "j* rule");
          2'd2: check(ref_c < T && sram[v] >= T, "found rule");
          2'd3: check(ref_c < T && n_above == 0 && v == ref_j, "j* fallback rule");
          default: check(0, "eviction source");
        endcase
        n_src[evict_src]++;
        if (sram[v] >= T) begin
          check(dut.abm_op == ABM_DELFIND, "delete+find issued");
          n_delfind++;
          n_above--;
        end else begin
          check(dut.abm_op == ABM_FIND, "find issued");
          n_find++;
        end
        sram[v] = 0;
        n_in_cycle = 0;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic send(int i, bit p, int x);
    upd_valid = 1'b1;
    upd_idx   = LOG_N'(i);
    upd_prob  = p;
    upd_bytes = XW'(x);
    @(posedge clk);
    while (!upd_ready) @(posedge clk);
    @(negedge clk);
    upd_valid = 1'b0;
  endtask

  initial begin
    real rb;
    foreach (sram[i]) begin sram[i] = 0; total[i] = 0; bytes_sent[i] = 0; end
    n_src = '{default: 0};
    bound = int'($floor(2.0 * B - 1.0 + $ln(N - 1.0) / $ln(real'(B) / (B - 1.0))));
    upd_valid = 0; upd_idx = '0; upd_prob = 0; upd_bytes = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(!upd_ready, "not ready during clear");
    while (!init_done) @(negedge clk);
    for (int n = 0; n < NUPD; n++) begin
      automatic int ph = (n / 3000) % 5;
      automatic int grp = (n / 15000) * 16;
      if ($urandom_range(19) == 0) @(negedge clk);   // occasional idle clock
      case (ph)
        0: send($urandom_range(BYTE_BASE - 1), 0, 0);
        1: send($urandom_range(5), 0, 0);
        2: send(64 + grp + (n % 16), 0, 0);               // lift a group past T
        3: send(128 + $urandom_range(63), 0, 0);          // ...then leave it
        default: send(BYTE_BASE + $urandom_range(31), 1, $urandom_range(40, 1500));
      endcase
    end
    // back-to-back stream to measure the accepted rate
    for (int n = 0; n < 400; n++) send($urandom_range(BYTE_BASE - 1), 0, 0);
    repeat (40) @(posedge clk);
    while (!dut.dreq_ready) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(int'(dut.u_sram.mem[i]) == sram[i], $sformatf("SRAM counter %0d", i));
      check(u_dram.peek(LOG_N'(i)) + M'(dut.u_sram.mem[i]) == M'(total[i]), $sformatf("total of counter %0d", i));
    end
    rb = 0;
    for (int i = BYTE_BASE; i < N; i++) rb += real'(bytes_sent[i]);
    begin
      automatic real est = 0;
      for (int i = BYTE_BASE; i < N; i++) est += real'(total[i]) * U;
      check(est > 0.9 * rb && est < 1.1 * rb, $sformatf("byte estimate %f of %f", est, rb));
    end
    check(max_seen <= bound, $sformatf("largest SRAM value %0d above bound %0d", max_seen, bound));
    check(!overflow, "overflow flag");
    check(n_bubble == 0, $sformatf("%0d clocks lost outside the eviction slot", n_bubble));
    check(n_src[1] + n_src[2] + n_src[3] == n_upd / int'(B), "one eviction per B updates");
    $display("updates %0d, largest SRAM value %0d (bound %0d)", n_upd, max_seen, bound);
    $display("evictions: j* high %0d, found %0d, j* low %0d; delete+find %0d, find %0d",
             n_src[1], n_src[2], n_src[3], n_delfind, n_find);
    $display("waits: find %0d, dram %0d, slot stalls %0d; byte updates +1 %0d, +0 %0d",
             n_wait_find, n_wait_dram, n_slot_stall, n_byte_inc, n_byte_skip);
    check(n_src[1] > 0, "j* eviction never happened");
    check(n_src[2] > 0, "bitmap-found eviction never happened");
    check(n_src[3] > 0, "fallback j* eviction never happened");
    check(n_delfind > 0 && n_find > 0, "delete+find or plain find never happened");
    check(n_wait_dram > 0, "wait for DRAM never happened");
    check(n_slot_stall > 0, "eviction slot stall never happened");
    check(n_byte_inc > 0 && n_byte_skip > 0, "byte increment outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
