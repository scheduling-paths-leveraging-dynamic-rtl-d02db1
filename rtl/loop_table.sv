// loop_table: per-warp table of loops detected from backward branches.
//
// A loop is taken to be the address range between a backward branch (upper PC)
// and its target (lower PC). When a backward branch is taken by at least one
// thread, the entry at hash(branch PC) is updated if it already holds that
// branch, otherwise the loop is allocated there, replacing whatever the
// direct-mapped slot held. A newly detected loop is compared with every other
// valid loop: a loop nested in another, or holding it, is kept beside it; a
// partial overlap is resolved by dropping the loop whose backward branch lies
// furthest back in program order (the lower upper PC), which may be the new one.
//
// Statistics per loop:
//   trip      - number of taken backward-branch outcomes, one per thread
//   div       - set once a forward branch inside the loop splits its path
//   first_pc  - the first forward branch executed inside the loop after
//               detection; taken/not_taken count its per-thread outcomes, so
//               the taken ratio is taken/(taken+not_taken)
// Forward branches are charged to the innermost loop holding them. Counters
// saturate. The hash XOR-folds the low PC bits into the index.
//
// The detection rule, the direct-mapped organisation, the valid bit, trip count,
// divergence flag and taken ratio follow the scheduler's description; the hash,
// the sizes, the choice of "first branch" and the reading of which entry is
// dropped on a partial overlap are this design's choices.
//
// Timing: one branch result per cycle (br_valid); the table changes on the next
// clock edge. clear (or reset) invalidates every entry in one cycle.
module loop_table #(
  parameter int unsigned LT_ENTRIES = 8,
  parameter int unsigned PC_W       = 32,
  parameter int unsigned WARP_SIZE  = 32,
  parameter int unsigned TRIP_W     = 16,
  parameter int unsigned CNT_W      = 16,
  localparam int unsigned IDX_W     = (LT_ENTRIES > 1) ? $clog2(LT_ENTRIES) : 1,
  localparam int unsigned POP_W     = $clog2(WARP_SIZE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  // branch result from the branch unit
  input  logic                  br_valid,
  input  logic [PC_W-1:0]       br_pc,
  input  logic [PC_W-1:0]       br_target,
  input  logic [WARP_SIZE-1:0]  br_mask,     // threads that executed the branch
  input  logic [WARP_SIZE-1:0]  br_taken,    // threads that took it
  // table contents
  output logic                  ent_valid     [LT_ENTRIES],
  output logic [PC_W-1:0]       ent_upper     [LT_ENTRIES],
  output logic [PC_W-1:0]       ent_lower     [LT_ENTRIES],
  output logic                  ent_div       [LT_ENTRIES],
  output logic [TRIP_W-1:0]     ent_trip      [LT_ENTRIES],
  output logic                  ent_first_vld [LT_ENTRIES],
  output logic [PC_W-1:0]       ent_first_pc  [LT_ENTRIES],
  output logic [CNT_W-1:0]      ent_taken     [LT_ENTRIES],
  output logic [CNT_W-1:0]      ent_not_taken [LT_ENTRIES],
  // one-cycle event pulses
  output logic                  ev_alloc,        // a loop was entered in the table
  output logic                  ev_update,       // a known loop's backward branch was taken
  output logic                  ev_evict,        // allocation replaced another loop in its slot
  output logic                  ev_nested,       // new loop nested in / around a known one
  output logic                  ev_overlap_rm,   // partial overlap: a known loop was removed
  output logic                  ev_overlap_drop, // partial overlap: the new loop was dropped
  output logic                  ev_div           // divergence seen inside a loop
);


  typedef struct packed {
    logic              valid;
    logic [PC_W-1:0]   upper;
    logic [PC_W-1:0]   lower;
    logic              div;
    logic [TRIP_W-1:0] trip;
    logic              first_vld;
    logic [PC_W-1:0]   first_pc;
    logic [CNT_W-1:0]  taken;
    logic [CNT_W-1:0]  not_taken;
  } loop_entry_t;

  loop_entry_t tbl_q [LT_ENTRIES];
  loop_entry_t tbl_d [LT_ENTRIES];

  function automatic logic [POP_W-1:0] popcount(input logic [WARP_SIZE-1:0] m);
    logic [POP_W-1:0] c;
    c = '0;
    for (int i = 0; i < WARP_SIZE; i++) c += POP_W'(m[i]);
    return c;
  endfunction

  function automatic logic [TRIP_W-1:0] sat_add_trip(input logic [TRIP_W-1:0] a,
                                                     input logic [POP_W-1:0]  b);
    logic [TRIP_W:0] s;
    s = {1'b0, a} + (TRIP_W+1)'(b);
    return s[TRIP_W] ? '1 : s[TRIP_W-1:0];
  endfunction

  function automatic logic [CNT_W-1:0] sat_add_cnt(input logic [CNT_W-1:0] a,
                                                   input logic [POP_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + (CNT_W+1)'(b);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  // innermost loop holding the branch, for forward-branch statistics
  logic              in_hit;
  logic [IDX_W-1:0]  in_idx;
  logic              cur_valid [LT_ENTRIES];
  logic [PC_W-1:0]   cur_lower [LT_ENTRIES];
  logic [PC_W-1:0]   cur_upper [LT_ENTRIES];

  always_comb
    for (int i = 0; i < LT_ENTRIES; i++) begin
      cur_valid[i] = tbl_q[i].valid;
      cur_lower[i] = tbl_q[i].lower;
      cur_upper[i] = tbl_q[i].upper;
    end

  loop_lookup #(.LT_ENTRIES(LT_ENTRIES), .PC_W(PC_W)) u_lookup (
    .ent_valid (cur_valid),
    .ent_lower (cur_lower),
    .ent_upper (cur_upper),
    .pc        (br_pc),
    .hit       (in_hit),
    .idx       (in_idx)
  );

  logic [WARP_SIZE-1:0] taken_act, not_taken_act;
  logic                 backward;
  logic [IDX_W-1:0]     slot;

  assign taken_act     = br_taken & br_mask;
  assign not_taken_act = br_mask & ~br_taken;
  assign backward      = (br_target <= br_pc);
  assign slot          = IDX_W'(las_pkg::lt_hash(64'(br_pc), IDX_W));

  always_comb begin
    logic same_loop, drop_new, any_rm, any_nest;
    logic partial [LT_ENTRIES];
    tbl_d           = tbl_q;
    ev_alloc        = 1'b0;
    ev_update       = 1'b0;
    ev_evict        = 1'b0;
    ev_nested       = 1'b0;
    ev_overlap_rm   = 1'b0;
    ev_overlap_drop = 1'b0;
    ev_div          = 1'b0;
    drop_new        = 1'b0;
    any_rm          = 1'b0;
    any_nest        = 1'b0;
    same_loop       = tbl_q[slot].valid && tbl_q[slot].upper == br_pc;

    for (int i = 0; i < LT_ENTRIES; i++) begin
      logic overlap, nested;
      overlap    = tbl_q[i].valid && br_target <= tbl_q[i].upper && tbl_q[i].lower <= br_pc;
      nested     = (br_target <= tbl_q[i].lower && tbl_q[i].upper <= br_pc) ||
                   (tbl_q[i].lower <= br_target && br_pc <= tbl_q[i].upper);
      partial[i] = overlap && !nested && IDX_W'(i) != slot;
      if (overlap && nested && IDX_W'(i) != slot) any_nest = 1'b1;
      if (partial[i] && tbl_q[i].upper > br_pc) drop_new = 1'b1;
    end

    if (br_valid && backward && taken_act != '0) begin
      if (same_loop) begin
        tbl_d[slot].trip = sat_add_trip(tbl_q[slot].trip, popcount(taken_act));
        ev_update        = 1'b1;
      end else if (drop_new) begin
        ev_overlap_drop = 1'b1;
      end else begin
        for (int i = 0; i < LT_ENTRIES; i++)
          if (partial[i]) begin
            tbl_d[i].valid = 1'b0;
            any_rm         = 1'b1;
          end
        ev_overlap_rm = any_rm;
        ev_nested     = any_nest;
        ev_evict      = tbl_q[slot].valid;
        ev_alloc      = 1'b1;
        tbl_d[slot]   = '{valid: 1'b1, upper: br_pc, lower: br_target, div: 1'b0,
                          trip: sat_add_trip('0, popcount(taken_act)),
                          first_vld: 1'b0, first_pc: '0, taken: '0, not_taken: '0};
      end
    end else if (br_valid && !backward && in_hit) begin
      if (taken_act != '0 && not_taken_act != '0) begin
        tbl_d[in_idx].div = 1'b1;
        ev_div            = 1'b1;
      end
      if (!tbl_q[in_idx].first_vld || tbl_q[in_idx].first_pc == br_pc) begin
        tbl_d[in_idx].first_vld = 1'b1;
        tbl_d[in_idx].first_pc  = br_pc;
        tbl_d[in_idx].taken     = sat_add_cnt(tbl_q[in_idx].taken, popcount(taken_act));
        tbl_d[in_idx].not_taken = sat_add_cnt(tbl_q[in_idx].not_taken, popcount(not_taken_act));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LT_ENTRIES; i++) tbl_q[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < LT_ENTRIES; i++) tbl_q[i] <= '0;
    end else begin
      tbl_q <= tbl_d;
    end
  end

  always_comb
    for (int i = 0; i < LT_ENTRIES; i++) begin
      ent_valid[i]     = tbl_q[i].valid;
      ent_upper[i]     = tbl_q[i].upper;
      ent_lower[i]     = tbl_q[i].lower;
      ent_div[i]       = tbl_q[i].div;
      ent_trip[i]      = tbl_q[i].trip;
      ent_first_vld[i] = tbl_q[i].first_vld;
      ent_first_pc[i]  = tbl_q[i].first_pc;
      ent_taken[i]     = tbl_q[i].taken;
      ent_not_taken[i] = tbl_q[i].not_taken;
    end

endmodule
