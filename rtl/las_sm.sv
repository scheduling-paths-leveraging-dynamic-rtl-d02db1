// las_sm: the loop-aware scheduler of one SIMT core, for all its warps.
//
// Every resident warp has its own scheduler state (las_warp: loop table, path
// table and the select logic). The core-level parts are the shared buses:
//   * launch bus  - starts a kernel on warp launch_warp at launch_pc with the
//                   threads of launch_mask.
//   * update bus  - the branch unit's result for the instruction executed for
//                   path upd_idx of warp upd_warp (ALU, branch with taken mask
//                   and target, or exit), decoded to that warp.
//   * fetch_*     - per warp, the path to fetch next and the policy that chose
//                   it, toward the instruction buffer. Which warp issues is
//                   left to the core's warp scheduler.
//   * stat_*      - the loop table of warp stat_warp (range, trip count,
//                   divergence flag, taken/not-taken counts of the first
//                   branch), read combinationally.
//   * events      - per warp, one-cycle pulses for performance counters.
// The instruction buffer, issue stage and ALU/branch unit of the core are not
// part of this block: they connect to the fetch outputs and the update bus.
//
// The per-warp organisation follows the scheduler's structure. NUM_WARPS = 48
// is the warp count of the evaluated GPU's core; the bus form of launch and
// update is this design's choice.
//
// Timing: one launch and one update per cycle for the whole core, applied at
// the next clock edge; fetch outputs are combinational from the warp state.
module las_sm #(
  parameter int unsigned NUM_WARPS      = 48,
  parameter int unsigned WARP_SIZE      = 32,
  parameter int unsigned PC_W           = 32,
  parameter int unsigned LT_ENTRIES     = 8,
  parameter int unsigned ITER_W         = 8,
  parameter int unsigned ITER_SHIFT_MAX = 2,
  parameter int unsigned TRIP_W         = 16,
  parameter int unsigned CNT_W          = 16,
  localparam int unsigned P_IDX_W       = (WARP_SIZE > 1) ? $clog2(WARP_SIZE) : 1,
  localparam int unsigned W_IDX_W       = (NUM_WARPS > 1) ? $clog2(NUM_WARPS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // launch bus
  input  logic                   launch_valid,
  input  logic [W_IDX_W-1:0]     launch_warp,
  input  logic [PC_W-1:0]        launch_pc,
  input  logic [WARP_SIZE-1:0]   launch_mask,
  // update bus from the branch unit
  input  logic                   upd_valid,
  input  logic [W_IDX_W-1:0]     upd_warp,
  input  logic [P_IDX_W-1:0]     upd_idx,
  input  las_pkg::upd_kind_e     upd_kind,
  input  logic [PC_W-1:0]        upd_target,
  input  logic [WARP_SIZE-1:0]   upd_taken,
  // per-warp fetch requests
  output logic                   fetch_valid  [NUM_WARPS],
  output logic [P_IDX_W-1:0]     fetch_idx    [NUM_WARPS],
  output logic [PC_W-1:0]        fetch_pc     [NUM_WARPS],
  output logic [WARP_SIZE-1:0]   fetch_mask   [NUM_WARPS],
  output las_pkg::policy_e       fetch_policy [NUM_WARPS],
  output logic                   warp_busy    [NUM_WARPS],
  output las_pkg::las_events_t   events       [NUM_WARPS],
  // loop-table readout of one warp
  input  logic [W_IDX_W-1:0]     stat_warp,
  output logic                   stat_valid     [LT_ENTRIES],
  output logic [PC_W-1:0]        stat_upper     [LT_ENTRIES],
  output logic [PC_W-1:0]        stat_lower     [LT_ENTRIES],
  output logic                   stat_div       [LT_ENTRIES],
  output logic [TRIP_W-1:0]      stat_trip      [LT_ENTRIES],
  output logic [CNT_W-1:0]       stat_taken     [LT_ENTRIES],
  output logic [CNT_W-1:0]       stat_not_taken [LT_ENTRIES],
  output logic                   stat_first_vld [LT_ENTRIES],
  output logic [PC_W-1:0]        stat_first_pc  [LT_ENTRIES]
);

  logic              w_valid     [NUM_WARPS][LT_ENTRIES];
  logic [PC_W-1:0]   w_upper     [NUM_WARPS][LT_ENTRIES];
  logic [PC_W-1:0]   w_lower     [NUM_WARPS][LT_ENTRIES];
  logic              w_div       [NUM_WARPS][LT_ENTRIES];
  logic [TRIP_W-1:0] w_trip      [NUM_WARPS][LT_ENTRIES];
  logic [CNT_W-1:0]  w_taken     [NUM_WARPS][LT_ENTRIES];
  logic [CNT_W-1:0]  w_not_taken [NUM_WARPS][LT_ENTRIES];
  logic              w_first_vld [NUM_WARPS][LT_ENTRIES];
  logic [PC_W-1:0]   w_first_pc  [NUM_WARPS][LT_ENTRIES];

  for (genvar w = 0; w < NUM_WARPS; w++) begin : g_warp
    las_warp #(
      .WARP_SIZE (WARP_SIZE), .PC_W (PC_W), .LT_ENTRIES (LT_ENTRIES), .ITER_W (ITER_W),
      .ITER_SHIFT_MAX (ITER_SHIFT_MAX), .TRIP_W (TRIP_W), .CNT_W (CNT_W)
    ) u_warp (
      .clk          (clk),
      .rst_n        (rst_n),
      .launch_valid (launch_valid && launch_warp == W_IDX_W'(w)),
      .launch_pc    (launch_pc),
      .launch_mask  (launch_mask),
      .upd_valid    (upd_valid && upd_warp == W_IDX_W'(w)),
      .upd_idx      (upd_idx),
      .upd_kind     (upd_kind),
      .upd_target   (upd_target),
      .upd_taken    (upd_taken),
      .fetch_valid  (fetch_valid[w]),
      .fetch_idx    (fetch_idx[w]),
      .fetch_pc     (fetch_pc[w]),
      .fetch_mask   (fetch_mask[w]),
      .fetch_policy (fetch_policy[w]),
      .busy         (warp_busy[w]),
      .events       (events[w]),
      .lt_valid     (w_valid[w]),
      .lt_upper     (w_upper[w]),
      .lt_lower     (w_lower[w]),
      .lt_div       (w_div[w]),
      .lt_trip      (w_trip[w]),
      .lt_taken     (w_taken[w]),
      .lt_not_taken (w_not_taken[w]),
      .lt_first_vld (w_first_vld[w]),
      .lt_first_pc  (w_first_pc[w])
    );
  end

  always_comb begin
    stat_valid     = w_valid[stat_warp];
    stat_upper     = w_upper[stat_warp];
    stat_lower     = w_lower[stat_warp];
    stat_div       = w_div[stat_warp];
    stat_trip      = w_trip[stat_warp];
    stat_taken     = w_taken[stat_warp];
    stat_not_taken = w_not_taken[stat_warp];
    stat_first_vld = w_first_vld[stat_warp];
    stat_first_pc  = w_first_pc[stat_warp];
  end

endmodule
