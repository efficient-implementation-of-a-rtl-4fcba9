// Probabilistic increment for byte counters.
//
// A byte counter would need log2(u) more SRAM bits if each packet added its length
// (up to u bytes). Instead, an update of x bytes adds 1 to the counter with probability
// x/u and 0 otherwise, so the counter value times u estimates the byte total and every
// update still adds at most one.
//
// A 32-bit Galois LFSR (taps 0xA3000000, maximal length) supplies the random number. Its
// top 16 bits R are scaled to r = (R * u) >> 16, close to uniform on 0..u-1, and the
// increment is taken when r < x. Packet counters bypass the draw: with prob_en low the
// increment is always 1. The decision (amt) is combinational from the current LFSR state;
// the LFSR advances on every clock in which step is high (one draw per accepted update).
// Incrementing with probability x/u follows the published scheme; the LFSR, the scaling and
// the per-update mode bit are choices of this design.
module prob_incr #(
  parameter int unsigned U    = 1500,       // largest increment per update (bytes)
  parameter int unsigned XW   = 11,         // width of the update amount x
  parameter logic [31:0] SEED = 32'h1234_5679
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          prob_en,
  input  logic [XW-1:0] x,
  output logic          amt
);
  logic [31:0] lfsr;
  logic [31:0] scaled;
  logic [15:0] r;

  assign scaled = {16'd0, lfsr[31:16]} * U;
  assign r      = scaled[31:16];
  assign amt    = prob_en ? ({5'd0, r} < {{(16 - XW + 5){1'b0}}, x}) : 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr <= SEED;
    else if (step) lfsr <= lfsr[0] ? ((lfsr >> 1) ^ 32'hA300_0000) : (lfsr >> 1);
  end

  initial assert (U < 65536 && XW <= 16) else $fatal(1, "prob_incr: U or XW too large");
endmodule
