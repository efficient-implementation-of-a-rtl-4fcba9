// Aggregated bitmap: a set of up to N elements with add, delete, test and find, built as a
// pipeline with one memory bank per tree level.
//
// The N-bit bitmap is cut into N/W words of W bits (the leaves). Above them sits a complete
// binary tree of H = log2(N/W) internal levels whose nodes count the elements present under
// their left child (lcount) and right child (rcount). Every operation walks the tree from
// the root down, one level per clock, so a new operation can start every clock:
//   add(i)      increments the count on i's side at every level, sets bit i
//   delete(i)   decrements them, clears bit i
//   test(i)     reports bit i
//   find        descends towards any non-zero count and returns one present element
//   delete+find does both in one pass: the find sees the delete's updates, so it never
//               returns the element just deleted
// Operations take effect in issue order; each one sees the result of all earlier ones.
//
// Interface: op_valid is implied by op != ABM_NOP. The operation is registered on entry,
// passes H internal levels and the leaf level, and its result appears on res_* exactly
// LATENCY = H + 2 clocks after it was issued. init_done rises once all banks are cleared
// (2**H clocks after reset); operations must not be issued before.
//
// Node counts are CW = log2(N/2)+1 bits wide, enough for a full half of the bitmap; with
// the default N = 2**20 and W = 64 a node (2 x 20 bits) fits one 64-bit word and the tree
// adds under one bit per element on top of the bitmap, as the structure intends.
//
// The tree of lcount/rcount nodes, the bank per level and the top-down operations follow the
// published aggregated bitmap. The way delete and find share one pass (a second read port
// per bank), the count width one bit above log2(N/2), the leftmost-first find and the entry
// register are choices of this design.
module agg_bitmap
  import stat_pkg::*;
#(
  parameter int unsigned N = 1 << 20,   // number of elements
  parameter int unsigned W = 64         // leaf word width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 init_done,
  input  abm_op_e              op,
  input  logic [$clog2(N)-1:0] op_idx,
  output abm_op_e              res_op,
  output logic [$clog2(N)-1:0] res_idx,
  output logic                 res_test,
  output logic                 res_found,
  output logic [$clog2(N)-1:0] res_find_idx
);
  localparam int unsigned LOG_N   = $clog2(N);
  localparam int unsigned LOG_W   = $clog2(W);
  localparam int unsigned H       = LOG_N - LOG_W;
  localparam int unsigned CW      = LOG_N;          // log2(N/2) + 1

  // stage s carries the operation into level s (s = H is the leaf)
  abm_op_e          st_op    [H+1];
  logic [LOG_N-1:0] st_idx   [H+1];
  logic [H-1:0]     st_fword [H+1];
  logic             st_fok   [H+1];
  logic [H:0]       lvl_done;

  // entry register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_op[0]    <= ABM_NOP;
      st_idx[0]   <= '0;
      st_fword[0] <= '0;
      st_fok[0]   <= 1'b0;
    end else begin
      st_op[0]    <= op;
      st_idx[0]   <= op_idx;
      st_fword[0] <= '0;
      st_fok[0]   <= 1'b1;
    end
  end

  for (genvar l = 0; l < H; l++) begin : g_level
    abm_level #(.LEVEL(l), .H(H), .LOG_N(LOG_N), .CW(CW)) u_level (
      .clk, .rst_n,
      .init_done (lvl_done[l]),
      .in_op     (st_op[l]),
      .in_idx    (st_idx[l]),
      .in_fword  (st_fword[l]),
      .in_fok    (st_fok[l]),
      .out_op    (st_op[l+1]),
      .out_idx   (st_idx[l+1]),
      .out_fword (st_fword[l+1]),
      .out_fok   (st_fok[l+1])
    );
  end

  abm_leaf #(.H(H), .LOG_N(LOG_N)) u_leaf (
    .clk, .rst_n,
    .init_done    (lvl_done[H]),
    .in_op        (st_op[H]),
    .in_idx       (st_idx[H]),
    .in_fword     (st_fword[H]),
    .in_fok       (st_fok[H]),
    .res_op, .res_idx, .res_test, .res_found, .res_find_idx
  );

  assign init_done = &lvl_done;

  initial begin
    assert (H >= 1) else $fatal(1, "agg_bitmap: N must be at least 2*W");
  end
endmodule
