// Behavioural model of the external DRAM holding the full-size counters (testbench only).
//
// Command port as seen by dram_updater: a command is accepted when cmd_valid and
// cmd_ready are both high; cmd_ready is high on a random READY_PCT percent of clocks.
// A read returns rd_data on rd_valid between MIN_LAT and MAX_LAT clocks later (one read in
// flight at a time, which is all the updater issues). Storage is sparse and reads as 0
// where never written. peek() gives the testbench direct access to a counter.
module dram_model #(
  parameter int unsigned LOG_N     = 20,
  parameter int unsigned M         = 64,
  parameter int unsigned MIN_LAT   = 2,
  parameter int unsigned MAX_LAT   = 6,
  parameter int unsigned READY_PCT = 80
) (
  input  logic             clk,
  input  logic             cmd_valid,
  input  logic             cmd_write,
  input  logic [LOG_N-1:0] cmd_addr,
  input  logic [M-1:0]     cmd_wdata,
  output logic             cmd_ready,
  output logic             rd_valid,
  output logic [M-1:0]     rd_data
);
  logic [M-1:0] store [logic [LOG_N-1:0]];
  int           rd_wait = -1;
  logic [M-1:0] rd_hold;
  int           n_reads = 0, n_writes = 0;

  function automatic logic [M-1:0] peek(input logic [LOG_N-1:0] a);
    return store.exists(a) ? store[a] : '0;
  endfunction

  initial begin
    cmd_ready = 1'b0;
    rd_valid  = 1'b0;
    rd_data   = '0;
  end

  always @(posedge clk) begin
    rd_valid <= 1'b0;
    if (rd_wait > 0) rd_wait <= rd_wait - 1;
    else if (rd_wait == 0) begin
      rd_valid <= 1'b1;
      rd_data  <= rd_hold;
      rd_wait  <= -1;
    end
    if (cmd_valid && cmd_ready) begin
      if (cmd_write) begin
        store[cmd_addr] = cmd_wdata;
        n_writes++;
      end else begin
        rd_hold = peek(cmd_addr);
        rd_wait <= int'($urandom_range(MAX_LAT - 1, MIN_LAT - 1));
        n_reads++;
      end
    end
    cmd_ready <= ($urandom_range(99) < READY_PCT);
  end
endmodule
