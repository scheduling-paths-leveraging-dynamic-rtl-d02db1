// las_warp: the loop-aware scheduler (LAS) state and logic of one warp.
//
// It holds the warp's loop table and path table and the select logic between
// them (the "per warp data" and the fetch-side select of the scheduler):
//   * fetch_*  is the path the warp should fetch now, chosen by path_select
//     (Min-PC, or majority inside a loop that has diverged).
//   * upd_*    is the branch unit's result for the instruction executed for
//     path upd_idx. It moves that path in the path table and, for a branch,
//     updates the loop table (loop detection on taken backward branches,
//     trip count, divergence flag, taken ratio of the loop's first branch).
//   * launch_* starts a kernel on the warp: one path with all its threads,
//     and an empty loop table.
// The warp runs one instruction at a time: the fetch outputs are only
// meaningful again after the result of the previous fetch has been applied
// (the whole warp waits on each instruction, as in the evaluated core). The
// tables change at the clock edge after an update; fetch_* follows
// combinationally. The loop table is read as it stands before the update, so a
// loop detected by a branch tags paths from the next instruction on.
//
// Wiring and the one-instruction-at-a-time use follow the scheduler's
// structure; clearing the loop table at each launch is this design's choice.
module las_warp #(
  parameter int unsigned WARP_SIZE      = 32,
  parameter int unsigned PC_W           = 32,
  parameter int unsigned LT_ENTRIES     = 8,
  parameter int unsigned ITER_W         = 8,
  parameter int unsigned ITER_SHIFT_MAX = 2,
  parameter int unsigned TRIP_W         = 16,
  parameter int unsigned CNT_W          = 16,
  localparam int unsigned P_IDX_W       = (WARP_SIZE > 1) ? $clog2(WARP_SIZE) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   launch_valid,
  input  logic [PC_W-1:0]        launch_pc,
  input  logic [WARP_SIZE-1:0]   launch_mask,
  input  logic                   upd_valid,
  input  logic [P_IDX_W-1:0]     upd_idx,
  input  las_pkg::upd_kind_e     upd_kind,
  input  logic [PC_W-1:0]        upd_target,
  input  logic [WARP_SIZE-1:0]   upd_taken,
  output logic                   fetch_valid,
  output logic [P_IDX_W-1:0]     fetch_idx,
  output logic [PC_W-1:0]        fetch_pc,
  output logic [WARP_SIZE-1:0]   fetch_mask,
  output las_pkg::policy_e       fetch_policy,
  output logic                   busy,
  output las_pkg::las_events_t   events,
  // loop table, for statistics readout
  output logic                   lt_valid     [LT_ENTRIES],
  output logic [PC_W-1:0]        lt_upper     [LT_ENTRIES],
  output logic [PC_W-1:0]        lt_lower     [LT_ENTRIES],
  output logic                   lt_div       [LT_ENTRIES],
  output logic [TRIP_W-1:0]      lt_trip      [LT_ENTRIES],
  output logic [CNT_W-1:0]       lt_taken     [LT_ENTRIES],
  output logic [CNT_W-1:0]       lt_not_taken [LT_ENTRIES],
  output logic                   lt_first_vld [LT_ENTRIES],
  output logic [PC_W-1:0]        lt_first_pc  [LT_ENTRIES]
);

  import las_pkg::*;

  localparam int unsigned L_IDX_W = (LT_ENTRIES > 1) ? $clog2(LT_ENTRIES) : 1;

  logic                  p_valid    [WARP_SIZE];
  logic [PC_W-1:0]       p_pc       [WARP_SIZE];
  logic [WARP_SIZE-1:0]  p_mask     [WARP_SIZE];
  logic                  p_loop_vld [WARP_SIZE];
  logic [L_IDX_W-1:0]    p_loop     [WARP_SIZE];
  logic [ITER_W-1:0]     p_iter     [WARP_SIZE];
  logic                  upd_go, br_go;

  assign upd_go = upd_valid && !launch_valid;
  assign br_go  = upd_go && upd_kind == UPD_BRANCH;

  loop_table #(
    .LT_ENTRIES (LT_ENTRIES), .PC_W (PC_W), .WARP_SIZE (WARP_SIZE),
    .TRIP_W (TRIP_W), .CNT_W (CNT_W)
  ) u_loop_table (
    .clk             (clk),
    .rst_n           (rst_n),
    .clear           (launch_valid),
    .br_valid        (br_go),
    .br_pc           (p_pc[upd_idx]),
    .br_target       (upd_target),
    .br_mask         (p_mask[upd_idx]),
    .br_taken        (upd_taken),
    .ent_valid       (lt_valid),
    .ent_upper       (lt_upper),
    .ent_lower       (lt_lower),
    .ent_div         (lt_div),
    .ent_trip        (lt_trip),
    .ent_first_vld   (lt_first_vld),
    .ent_first_pc    (lt_first_pc),
    .ent_taken       (lt_taken),
    .ent_not_taken   (lt_not_taken),
    .ev_alloc        (events.lt_alloc),
    .ev_update       (events.lt_update),
    .ev_evict        (events.lt_evict),
    .ev_nested       (events.lt_nested),
    .ev_overlap_rm   (events.lt_overlap_rm),
    .ev_overlap_drop (events.lt_overlap_drop),
    .ev_div          (events.lt_div)
  );

  path_table #(
    .WARP_SIZE (WARP_SIZE), .PC_W (PC_W), .LT_ENTRIES (LT_ENTRIES), .ITER_W (ITER_W)
  ) u_path_table (
    .clk            (clk),
    .rst_n          (rst_n),
    .launch_valid   (launch_valid),
    .launch_pc      (launch_pc),
    .launch_mask    (launch_mask),
    .upd_valid      (upd_go),
    .upd_idx        (upd_idx),
    .upd_kind       (upd_kind),
    .upd_target     (upd_target),
    .upd_taken      (upd_taken),
    .lt_valid       (lt_valid),
    .lt_lower       (lt_lower),
    .lt_upper       (lt_upper),
    .p_valid        (p_valid),
    .p_pc           (p_pc),
    .p_mask         (p_mask),
    .p_loop_vld     (p_loop_vld),
    .p_loop         (p_loop),
    .p_iter         (p_iter),
    .busy           (busy),
    .ev_split       (events.pt_split),
    .ev_merge       (events.pt_merge),
    .ev_shift_merge (events.pt_shift_merge),
    .ev_exit        (events.pt_exit)
  );

  path_select #(
    .WARP_SIZE (WARP_SIZE), .PC_W (PC_W), .LT_ENTRIES (LT_ENTRIES),
    .ITER_W (ITER_W), .ITER_SHIFT_MAX (ITER_SHIFT_MAX)
  ) u_select (
    .p_valid    (p_valid),
    .p_pc       (p_pc),
    .p_mask     (p_mask),
    .p_loop_vld (p_loop_vld),
    .p_loop     (p_loop),
    .p_iter     (p_iter),
    .lt_valid   (lt_valid),
    .lt_div     (lt_div),
    .lt_lower   (lt_lower),
    .lt_upper   (lt_upper),
    .sel_valid  (fetch_valid),
    .sel_idx    (fetch_idx),
    .sel_pc     (fetch_pc),
    .sel_mask   (fetch_mask),
    .sel_policy (fetch_policy)
  );

endmodule
