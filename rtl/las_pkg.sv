// las_pkg: types shared by the loop-aware scheduler (LAS) blocks.
//
// The branch unit reports one result per executed instruction of a warp. The
// kind of the result tells the path table how the executed path moves on:
//   UPD_ALU    - every active thread continues at the next instruction (pc+1)
//   UPD_BRANCH - threads in the taken mask go to the target, the others to pc+1
//   UPD_EXIT   - every active thread has finished; the path is removed
// PCs count instructions, so the fall-through address is pc+1 (a choice of
// this design; byte-addressed PCs only change that increment).
// The select unit reports which policy picked the path: Min-PC (the default)
// or the majority policy used inside loops that have shown divergence.
// las_events_t bundles the event pulses a warp reports.
// lt_hash is the loop-table index function shared by the loop and path tables.
package las_pkg;

  typedef enum logic [1:0] {
    UPD_ALU    = 2'd0,
    UPD_BRANCH = 2'd1,
    UPD_EXIT   = 2'd2
  } upd_kind_e;

  typedef enum logic {
    POL_MINPC    = 1'b0,
    POL_MAJORITY = 1'b1
  } policy_e;

  // One-cycle event pulses of a warp's scheduler, for performance counters.
  typedef struct packed {
    logic lt_alloc;        // loop detected and entered in the loop table
    logic lt_update;       // backward branch of a known loop taken
    logic lt_evict;        // new loop replaced another in its direct-mapped slot
    logic lt_nested;       // new loop nested in, or around, a known loop
    logic lt_overlap_rm;   // partial overlap resolved by removing a known loop
    logic lt_overlap_drop; // partial overlap resolved by dropping the new loop
    logic lt_div;          // divergence seen inside a known loop
    logic pt_split;        // a path split in two on a divergent branch
    logic pt_merge;        // two paths met at one PC and merged
    logic pt_shift_merge;  // ... while in different iterations of one loop
    logic pt_exit;         // a path exited
  } las_events_t;

  // Loop-table index of a backward branch: the low 2*idx_w bits of its PC
  // XOR-folded into idx_w bits. Used by the loop table to place a loop and by
  // the path table to tag a path that takes a backward branch.
  function automatic int unsigned lt_hash(input logic [63:0] pc, input int unsigned idx_w);
    int unsigned lo, hi;
    lo = int'(pc) & ((1 << idx_w) - 1);
    hi = int'(pc >> idx_w) & ((1 << idx_w) - 1);
    return lo ^ hi;
  endfunction

endpackage
