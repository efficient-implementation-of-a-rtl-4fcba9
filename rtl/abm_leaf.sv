// Leaf level of the aggregated bitmap: the bitmap itself, 2**H words of W bits in one bank.
//
// Element i lives in word i / W, bit i % W. The stage takes one operation per clock from
// the last internal level:
//   ADD sets the element's bit, DEL and DELFIND clear it, TEST reports it,
//   FIND and DELFIND read the word the find path reached (after this operation's own
//   update if it is the same word) and return its lowest set bit.
// Results leave through a register one clock later: res_op names the finished operation,
// res_test is the tested bit, res_found / res_find_idx the outcome of a find.
// After reset the bank is cleared, one word per clock; init_done rises when done.
// Taking the lowest set bit of the word for a find is a choice of this design.
module abm_leaf
  import stat_pkg::*;
#(
  parameter int unsigned H     = 3,
  parameter int unsigned LOG_N = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  input  abm_op_e          in_op,
  input  logic [LOG_N-1:0] in_idx,
  input  logic [H-1:0]     in_fword,
  input  logic             in_fok,
  output abm_op_e          res_op,
  output logic [LOG_N-1:0] res_idx,
  output logic             res_test,
  output logic             res_found,
  output logic [LOG_N-1:0] res_find_idx
);
  localparam int unsigned LOG_W = LOG_N - H;
  localparam int unsigned W     = 1 << LOG_W;
  localparam int unsigned WORDS = 1 << H;

  logic [W-1:0] mem [WORDS];

  logic [H:0] clr_ptr;
  assign init_done = (clr_ptr == (H+1)'(WORDS));

  logic [H-1:0]     dword;
  logic [LOG_W-1:0] dbit;
  logic [W-1:0]     dcur, dnew, fcur;
  logic             dwrite;
  logic             ffound;
  logic [LOG_W-1:0] fbit;

  always_comb begin
    dword  = in_idx[LOG_N-1:LOG_W];
    dbit   = in_idx[LOG_W-1:0];
    dcur   = mem[dword];
    dnew   = dcur;
    dwrite = 1'b0;
    if (abm_is_add(in_op)) begin
      dwrite     = 1'b1;
      dnew[dbit] = 1'b1;
    end else if (abm_is_del(in_op)) begin
      dwrite     = 1'b1;
      dnew[dbit] = 1'b0;
    end
    fcur   = (dwrite && in_fword == dword) ? dnew : mem[in_fword];
    // lowest set bit of the find word
    ffound = 1'b0;
    fbit   = '0;
    for (int k = W - 1; k >= 0; k--) begin
      if (fcur[k]) begin
        ffound = 1'b1;
        fbit   = LOG_W'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_ptr <= '0;
    end else if (!init_done) begin
      mem[clr_ptr[H-1:0]] <= '0;
      clr_ptr <= clr_ptr + 1'b1;
    end else if (dwrite) begin
      mem[dword] <= dnew;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_op       <= ABM_NOP;
      res_idx      <= '0;
      res_test     <= 1'b0;
      res_found    <= 1'b0;
      res_find_idx <= '0;
    end else begin
      res_op       <= in_op;
      res_idx      <= in_idx;
      res_test     <= dcur[dbit];
      res_found    <= abm_is_find(in_op) && in_fok && ffound;
      res_find_idx <= {in_fword, fbit};
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && init_done) begin
      assert (!(abm_is_del(in_op) && !dcur[dbit]))
        else $error("abm_leaf: delete of an absent element %0d", in_idx);
      assert (!(abm_is_add(in_op) && dcur[dbit]))
        else $error("abm_leaf: add of a present element %0d", in_idx);
    end
  end
endmodule
