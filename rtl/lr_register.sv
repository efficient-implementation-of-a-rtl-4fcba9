// Largest-recent register: remembers, over the current cycle of b updates, the counter
// j* with the largest value C* reached after its update (ties keep the earlier one).
//
// upd_en / upd_idx / upd_val present a counter's value right after an update; the register
// takes it if it is the first of the cycle or larger than the value held. clear starts a
// new cycle; an update in the same clock as clear is the first one of the new cycle.
// jstar / cstar / valid are registered and reflect all updates up to the last clock edge.
// Keeping j*/C* in an on-chip register follows the LR(T) scheme; the tie rule is this
// design's choice (any tie rule is allowed).
module lr_register #(
  parameter int unsigned LOG_N = 20,
  parameter int unsigned CW    = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             upd_en,
  input  logic [LOG_N-1:0] upd_idx,
  input  logic [CW-1:0]    upd_val,
  output logic             valid,
  output logic [LOG_N-1:0] jstar,
  output logic [CW-1:0]    cstar
);
  logic take;
  assign take = upd_en && (clear || !valid || upd_val > cstar);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      jstar <= '0;
      cstar <= '0;
    end else begin
      if (clear && !upd_en) valid <= 1'b0;
      if (take) begin
        valid <= 1'b1;
        jstar <= upd_idx;
        cstar <= upd_val;
      end
    end
  end
endmodule
