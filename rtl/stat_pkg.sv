// Shared types for the hybrid SRAM/DRAM statistics counter.
//
// abm_op_e encodes the operations of the aggregated bitmap (the set of counters whose
// value has reached the threshold T). ADD, DEL, TEST and FIND are the set-membership
// operations of the bitmap; DELFIND is the combined "delete the evicted counter and find
// the next candidate" operation that the counter manager issues once per eviction.
package stat_pkg;

  typedef enum logic [2:0] {
    ABM_NOP     = 3'd0,
    ABM_ADD     = 3'd1,
    ABM_DEL     = 3'd2,
    ABM_TEST    = 3'd3,
    ABM_FIND    = 3'd4,
    ABM_DELFIND = 3'd5
  } abm_op_e;

  // Which rule of LR(T) chose an evicted counter.
  typedef enum logic [1:0] {
    EV_NONE       = 2'd0,
    EV_JSTAR_HIGH = 2'd1,   // the largest recent counter, at or above T
    EV_FOUND      = 2'd2,   // a counter at or above T found in the bitmap
    EV_JSTAR_LOW  = 2'd3    // the largest recent counter, nothing at or above T
  } evict_src_e;

  // Operations that change the bitmap on their delete/add path.
  function automatic logic abm_is_add(abm_op_e op);
    return op == ABM_ADD;
  endfunction

  function automatic logic abm_is_del(abm_op_e op);
    return (op == ABM_DEL) || (op == ABM_DELFIND);
  endfunction

  function automatic logic abm_is_find(abm_op_e op);
    return (op == ABM_FIND) || (op == ABM_DELFIND);
  endfunction

endpackage
