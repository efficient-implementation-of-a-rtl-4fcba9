// Counter SRAM: N small counters of CW bits each, one per statistic.
//
// Every packet update reads a counter, adds 0 or 1 and writes it back; every eviction
// reads a counter and writes it back as zero, its value going to the full-size counter
// in DRAM. The array is read combinationally and written at the clock edge, so each port
// operation is the pair of accesses (read, write) of one time slot and completes in one
// clock. At most one of inc_en / rr_en may be high in a clock.
//
//   inc_en, inc_idx, inc_amt : add inc_amt (0 or 1) to counter inc_idx;
//                              inc_new is the value after the add, in the same clock
//   rr_en, rr_idx            : read counter rr_idx (rr_val, same clock) and reset it to 0
//
// A counter at its maximum saturates instead of wrapping and sets the sticky overflow
// flag; with CW chosen from the LR(T) bound this must never happen. After reset the
// array is cleared one counter per clock; init_done rises after N clocks.
// The N x CW counters and their read-increment-write follow the architecture; the one-clock
// slot, saturation flag and clear sweep are choices of this design.
module counter_sram #(
  parameter int unsigned N  = 1 << 20,  // number of counters
  parameter int unsigned CW = 9         // SRAM counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 init_done,
  input  logic                 inc_en,
  input  logic [$clog2(N)-1:0] inc_idx,
  input  logic                 inc_amt,
  output logic [CW-1:0]        inc_new,
  input  logic                 rr_en,
  input  logic [$clog2(N)-1:0] rr_idx,
  output logic [CW-1:0]        rr_val,
  output logic                 overflow
);
  localparam int unsigned LOG_N = $clog2(N);

  logic [CW-1:0] mem [N];
  logic [LOG_N:0] clr_ptr;
  logic [CW-1:0]  inc_old;
  logic           sat;

  assign init_done = (clr_ptr == (LOG_N+1)'(N));
  assign inc_old   = mem[inc_idx];
  assign sat       = inc_amt && (inc_old == '1);
  assign inc_new   = sat ? inc_old : inc_old + CW'(inc_amt);
  assign rr_val    = mem[rr_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_ptr  <= '0;
      overflow <= 1'b0;
    end else if (!init_done) begin
      mem[clr_ptr[LOG_N-1:0]] <= '0;
      clr_ptr <= clr_ptr + 1'b1;
    end else if (inc_en) begin
      mem[inc_idx] <= inc_new;
      if (sat) overflow <= 1'b1;
    end else if (rr_en) begin
      mem[rr_idx] <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(inc_en && rr_en)) else $error("counter_sram: two operations in one slot");
      assert (!(init_done == 1'b0 && (inc_en || rr_en))) else $error("counter_sram: access during init");
    end
  end
endmodule
