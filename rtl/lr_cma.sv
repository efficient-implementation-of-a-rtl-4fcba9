// LR(T) counter management controller (Largest Recent with threshold T).
//
// Time is divided into cycles of B counter updates followed by one eviction slot. During
// the update slots the controller accepts one update per clock, increments the counter in
// SRAM, tracks the largest counter touched in this cycle (j*, C*) in an lr_register, and,
// when a counter reaches exactly T, adds it to the aggregated bitmap, which holds the set
// of counters whose value is at least T.
//
// In the eviction slot it picks the victim:
//   C* >= T                  -> j*                        (EV_JSTAR_HIGH)
//   C* <  T, bitmap non-empty -> the counter found there  (EV_FOUND)
//   C* <  T, bitmap empty     -> j*                        (EV_JSTAR_LOW)
// It reads and resets the victim's SRAM counter, hands (victim, value) to the DRAM update
// engine and sends the bitmap one operation: delete-and-find if the victim was in the set,
// otherwise a plain find. The find result is the candidate for the next eviction; it
// returns after the bitmap latency, normally long before the next eviction slot.
//
// Stalls: upd_ready is low in the eviction slot. The slot itself waits (evict_wait_find)
// while the previous find has not returned, and (evict_wait_dram) while the DRAM engine is
// still busy with the previous eviction. Without stalls the update rate is B per B+1 clocks.
//
// T = 0 gives LR(0): every counter is at least 0, so the victim is always j*. Increments
// are 0 or 1 (upd_amt), as the threshold test relies on counters crossing T one at a time.
// The SRAM increment address and amount, and the value sent to DRAM, are wired straight
// through from the update port and the SRAM read port: the controller only routes them.
// The victim rule, the bitmap operations and the B + 1 slot cycle follow LR(T); the waits,
// the handshake and adding a counter when it reaches exactly T are choices of this design.
module lr_cma
  import stat_pkg::*;
#(
  parameter int unsigned LOG_N = 20,
  parameter int unsigned CW    = 9,
  parameter int unsigned B     = 20,
  parameter int unsigned T     = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_ready,     // SRAM and bitmap cleared after reset
  // counter updates
  input  logic             upd_valid,
  output logic             upd_ready,
  input  logic [LOG_N-1:0] upd_idx,
  input  logic             upd_amt,
  // counter SRAM
  output logic             inc_en,
  output logic [LOG_N-1:0] inc_idx,
  output logic             inc_amt,
  input  logic [CW-1:0]    inc_new,
  output logic             rr_en,
  output logic [LOG_N-1:0] rr_idx,
  input  logic [CW-1:0]    rr_val,
  // aggregated bitmap
  output abm_op_e          abm_op,
  output logic [LOG_N-1:0] abm_idx,
  input  abm_op_e          abm_res_op,
  input  logic             abm_res_found,
  input  logic [LOG_N-1:0] abm_res_find_idx,
  // DRAM update engine
  output logic             dreq_valid,
  input  logic             dreq_ready,
  output logic [LOG_N-1:0] dreq_idx,
  output logic [CW-1:0]    dreq_val,
  // status
  output logic             evict_valid,
  output evict_src_e       evict_src,
  output logic             evict_wait_find,
  output logic             evict_wait_dram
);
  localparam int unsigned BW = $clog2(B + 1);

  typedef enum logic {PH_UPDATE, PH_EVICT} phase_e;

  phase_e           phase;
  logic [BW-1:0]    slot;          // updates accepted in this cycle
  logic             find_pending;
  logic             found_valid;
  logic [LOG_N-1:0] found_idx;

  logic             lr_valid;
  logic [LOG_N-1:0] jstar;
  logic [CW-1:0]    cstar;

  logic             upd_fire, evict_go;
  logic [LOG_N-1:0] victim;
  logic             cstar_high;

  assign upd_ready  = mem_ready && (phase == PH_UPDATE);
  assign upd_fire   = upd_valid && upd_ready;
  assign evict_wait_find = mem_ready && (phase == PH_EVICT) && find_pending;
  assign evict_wait_dram = mem_ready && (phase == PH_EVICT) && !find_pending && !dreq_ready;
  assign evict_go   = mem_ready && (phase == PH_EVICT) && !find_pending && dreq_ready;
  assign cstar_high = ({{32{1'b0}}, cstar} >= (32 + CW)'(T));
  assign victim     = (cstar_high || !found_valid) ? jstar : found_idx;

  always_comb begin
    inc_en   = upd_fire;
    inc_idx  = upd_idx;
    inc_amt  = upd_amt;
    rr_en    = evict_go;
    rr_idx   = victim;
    dreq_valid = evict_go;
    dreq_idx   = victim;
    dreq_val   = rr_val;
    abm_op   = ABM_NOP;
    abm_idx  = upd_idx;
    if (upd_fire && upd_amt && T != 0 && {{32{1'b0}}, inc_new} == (32 + CW)'(T)) begin
      abm_op = ABM_ADD;
    end else if (evict_go) begin
      abm_idx = victim;
      abm_op  = ({{32{1'b0}}, rr_val} >= (32 + CW)'(T) && T != 0) ? ABM_DELFIND : ABM_FIND;
    end
    evict_valid = evict_go;
    evict_src   = cstar_high ? EV_JSTAR_HIGH : (found_valid ? EV_FOUND : EV_JSTAR_LOW);
  end

  lr_register #(.LOG_N(LOG_N), .CW(CW)) u_lr (
    .clk, .rst_n,
    .clear   (evict_go),
    .upd_en  (upd_fire),
    .upd_idx (upd_idx),
    .upd_val (inc_new),
    .valid   (lr_valid),
    .jstar,
    .cstar
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase        <= PH_UPDATE;
      slot         <= '0;
      find_pending <= 1'b0;
      found_valid  <= 1'b0;
      found_idx    <= '0;
    end else begin
      if (abm_is_find(abm_res_op)) begin
        find_pending <= 1'b0;
        found_valid  <= abm_res_found;
        found_idx    <= abm_res_find_idx;
      end
      if (upd_fire) begin
        if (slot == BW'(B - 1)) begin
          slot  <= '0;
          phase <= PH_EVICT;
        end else begin
          slot <= slot + 1'b1;
        end
      end
      if (evict_go) begin
        phase        <= PH_UPDATE;
        find_pending <= 1'b1;
        found_valid  <= 1'b0;
      end
    end
  end

  // the eviction slot always follows B updates, so j* exists
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!evict_go || lr_valid) else $error("lr_cma: eviction without a recent counter");
      assert (!(evict_go && !cstar_high && found_valid) || {{32{1'b0}}, rr_val} >= (32 + CW)'(T))
        else $error("lr_cma: found counter below threshold");
    end
  end

  initial assert (B >= 1) else $fatal(1, "lr_cma: B must be at least 1");
endmodule
