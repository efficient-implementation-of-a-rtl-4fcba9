// DRAM update engine: adds an evicted SRAM counter value to its full-size DRAM counter.
//
// Each request (req_idx, req_val) becomes two DRAM accesses: a read of the M-bit counter
// at address req_idx, then a write of the read value plus req_val. One request is in
// flight at a time; req_ready is high only while idle, so a new eviction waits until the
// previous DRAM update has finished. Because evictions come once per b+1 clocks, the DRAM
// read and write overlap the next cycle of SRAM updates.
//
// DRAM port: a command (cmd_valid, cmd_write, cmd_addr, cmd_wdata) is taken when
// cmd_ready is high; read data returns on rd_valid / rd_data any number of clocks later.
// The read-then-write overlapping the next update cycle follows the architecture; the
// command interface and the single outstanding update are choices of this design.
module dram_updater #(
  parameter int unsigned LOG_N = 20,
  parameter int unsigned CW    = 9,
  parameter int unsigned M     = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [LOG_N-1:0] req_idx,
  input  logic [CW-1:0]    req_val,
  output logic             cmd_valid,
  output logic             cmd_write,
  output logic [LOG_N-1:0] cmd_addr,
  output logic [M-1:0]     cmd_wdata,
  input  logic             cmd_ready,
  input  logic             rd_valid,
  input  logic [M-1:0]     rd_data
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_WRITE} state_e;
  state_e           state;
  logic [LOG_N-1:0] idx_q;
  logic [CW-1:0]    val_q;
  logic [M-1:0]     sum_q;

  assign req_ready = (state == S_IDLE);
  assign cmd_valid = (state == S_READ) || (state == S_WRITE);
  assign cmd_write = (state == S_WRITE);
  assign cmd_addr  = idx_q;
  assign cmd_wdata = sum_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx_q <= '0;
      val_q <= '0;
      sum_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (req_valid) begin
                   idx_q <= req_idx;
                   val_q <= req_val;
                   state <= S_READ;
                 end
        S_READ:  if (cmd_ready) state <= S_WAIT;
        S_WAIT:  if (rd_valid) begin
                   sum_q <= rd_data + M'(val_q);
                   state <= S_WRITE;
                 end
        S_WRITE: if (cmd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
