// One internal level of the aggregated bitmap tree, held in its own memory bank.
//
// Level LEVEL has 2**LEVEL nodes. Each node holds two counts: lcount, the number of
// elements present under its left child, and rcount, the number under its right child.
// Children are not stored as pointers: the node on the path of leaf word w is w >> (H-LEVEL)
// and the branch taken is bit H-1-LEVEL of w.
//
// The stage takes one operation per clock from the stage above, reads the node on the
// operation's path combinationally, writes the updated node at the clock edge and passes
// the operation to the stage below through a register (one clock per level):
//   ADD      increments the count on the element's side
//   DEL      decrements it
//   DELFIND  decrements it and, in the same stage, also steers a find: the find path
//            follows the left child if its count (after this operation's own update) is
//            non-zero, else the right child, else the find has failed
//   FIND     steers the find only
//   TEST     passes through untouched
// The find path node is read through a second read port of the bank, so a combined
// delete and find costs one read and one write on the delete path plus one read on the
// find path. Because every operation visits the levels in order, one clock apart, each
// operation sees the bank exactly as all earlier operations left it.
//
// After reset the stage clears its bank, one node per clock; init_done rises when done
// and no operation may be sent before that.
// The count rules follow the published structure; the second read port and the clear sweep
// are choices of this design.
module abm_level
  import stat_pkg::*;
#(
  parameter int unsigned LEVEL = 0,   // depth of this level, 0 = root
  parameter int unsigned H     = 3,   // number of internal levels (N/W = 2**H leaf words)
  parameter int unsigned LOG_N = 7,   // element index width
  parameter int unsigned CW    = 7    // width of lcount / rcount
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  // operation from the stage above
  input  abm_op_e          in_op,
  input  logic [LOG_N-1:0] in_idx,    // element added / deleted / tested
  input  logic [H-1:0]     in_fword,  // find path: leaf-word bits decided so far (MSB first)
  input  logic             in_fok,    // find still has a non-empty subtree to follow
  // operation to the stage below (registered)
  output abm_op_e          out_op,
  output logic [LOG_N-1:0] out_idx,
  output logic [H-1:0]     out_fword,
  output logic             out_fok
);
  localparam int unsigned NODES = 1 << LEVEL;
  localparam int unsigned LOG_W = LOG_N - H;
  localparam int unsigned AW    = (LEVEL == 0) ? 1 : LEVEL;

  typedef struct packed {
    logic [CW-1:0] lcount;
    logic [CW-1:0] rcount;
  } node_t;

  node_t mem [NODES];

  // ---------------- initial clear ----------------
  logic [AW:0] clr_ptr;
  assign init_done = (clr_ptr == (AW+1)'(NODES));

  // ---------------- path of the incoming operation ----------------
  logic [H-1:0]  dword;
  logic [AW-1:0] dnode, fnode;
  logic          ddir;
  node_t         dcur, dnew, fcur;
  logic          dwrite;
  logic          fdir, fok_next;

  always_comb begin
    dword = in_idx[LOG_N-1:LOG_W];
    dnode = AW'(dword >> (H - LEVEL));
    ddir  = dword[H-1-LEVEL];
    fnode = AW'(in_fword >> (H - LEVEL));
    dcur  = mem[dnode];
    dnew  = dcur;
    dwrite = 1'b0;
    if (abm_is_add(in_op)) begin
      dwrite = 1'b1;
      if (ddir) dnew.rcount = dcur.rcount + 1'b1;
      else      dnew.lcount = dcur.lcount + 1'b1;
    end else if (abm_is_del(in_op)) begin
      dwrite = 1'b1;
      if (ddir) dnew.rcount = dcur.rcount - 1'b1;
      else      dnew.lcount = dcur.lcount - 1'b1;
    end
    // the find sees this operation's own update when both paths share the node
    fcur = (dwrite && fnode == dnode) ? dnew : mem[fnode];
    fdir     = (fcur.lcount == '0);
    fok_next = in_fok && ((fcur.lcount != '0) || (fcur.rcount != '0));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_ptr <= '0;
    end else if (!init_done) begin
      mem[clr_ptr[AW-1:0]] <= '0;
      clr_ptr <= clr_ptr + 1'b1;
    end else if (dwrite) begin
      mem[dnode] <= dnew;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_op    <= ABM_NOP;
      out_idx   <= '0;
      out_fword <= '0;
      out_fok   <= 1'b0;
    end else begin
      out_op    <= in_op;
      out_idx   <= in_idx;
      out_fword <= in_fword;
      out_fok   <= in_fok;
      if (abm_is_find(in_op)) begin
        out_fword[H-1-LEVEL] <= fdir;
        out_fok              <= fok_next;
      end
    end
  end

  // A delete must find a non-zero count on its path, an add must not wrap it.
  always_ff @(posedge clk) begin
    if (rst_n && init_done) begin
      assert (!(abm_is_del(in_op) && (ddir ? dcur.rcount : dcur.lcount) == '0))
        else $error("abm_level %0d: delete of an absent element", LEVEL);
      assert (!(abm_is_add(in_op) && (ddir ? dcur.rcount : dcur.lcount) == '1))
        else $error("abm_level %0d: count overflow", LEVEL);
    end
  end
endmodule
