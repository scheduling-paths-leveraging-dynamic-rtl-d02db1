// path_select: the priority function that picks the path a warp fetches next.
//
// Default policy, Min-PC: run the valid path with the lowest PC. Without
// compiler reconvergence points this keeps the warp close to post-dominator
// reconvergence, because the lagging paths run first.
//
// Loop policy: if the Min-PC path is tagged with a loop that is still in the
// loop table, still holds the path's PC, and has shown divergence, the choice
// is made again among the paths of that same loop with the majority policy:
// the most populated path (most threads in its mask) wins, ties to the lower
// PC. The majority is biased by iteration counts: a path more than
// ITER_SHIFT_MAX iterations ahead of the slowest path of the loop is not a
// candidate, so no group of threads runs away from the others. Loops without
// divergence keep Min-PC, so they run as under the baseline policy.
//
// Both policies and the switch between them on loop statistics follow the
// scheduler's description; the exact form of the iteration bias (a window of
// ITER_SHIFT_MAX iterations) and its size are this design's choices.
//
// Timing: purely combinational, from the path and loop tables to the fetch
// stage. sel_policy tells which policy made the choice.
module path_select #(
  parameter int unsigned WARP_SIZE      = 32,
  parameter int unsigned PC_W           = 32,
  parameter int unsigned LT_ENTRIES     = 8,
  parameter int unsigned ITER_W         = 8,
  parameter int unsigned ITER_SHIFT_MAX = 2,
  localparam int unsigned NUM_PATHS     = WARP_SIZE,
  localparam int unsigned P_IDX_W       = (NUM_PATHS > 1) ? $clog2(NUM_PATHS) : 1,
  localparam int unsigned L_IDX_W       = (LT_ENTRIES > 1) ? $clog2(LT_ENTRIES) : 1,
  localparam int unsigned POP_W         = $clog2(WARP_SIZE + 1)
) (
  input  logic                  p_valid    [NUM_PATHS],
  input  logic [PC_W-1:0]       p_pc       [NUM_PATHS],
  input  logic [WARP_SIZE-1:0]  p_mask     [NUM_PATHS],
  input  logic                  p_loop_vld [NUM_PATHS],
  input  logic [L_IDX_W-1:0]    p_loop     [NUM_PATHS],
  input  logic [ITER_W-1:0]     p_iter     [NUM_PATHS],
  input  logic                  lt_valid   [LT_ENTRIES],
  input  logic                  lt_div     [LT_ENTRIES],
  input  logic [PC_W-1:0]       lt_lower   [LT_ENTRIES],
  input  logic [PC_W-1:0]       lt_upper   [LT_ENTRIES],
  output logic                  sel_valid,
  output logic [P_IDX_W-1:0]    sel_idx,
  output logic [PC_W-1:0]       sel_pc,
  output logic [WARP_SIZE-1:0]  sel_mask,
  output las_pkg::policy_e      sel_policy
);

  import las_pkg::*;

  logic                 min_found;
  logic [P_IDX_W-1:0]   min_idx;
  logic [L_IDX_W-1:0]   min_loop;
  logic                 use_loop;
  logic                 member [NUM_PATHS];
  logic [ITER_W:0]      iter_limit;
  logic                 maj_found;
  logic [P_IDX_W-1:0]   maj_idx;
  logic [POP_W-1:0]     pop [NUM_PATHS];

  // Min-PC choice
  always_comb begin
    min_found = 1'b0;
    min_idx   = '0;
    for (int i = 0; i < NUM_PATHS; i++)
      if (p_valid[i] && (!min_found || p_pc[i] < p_pc[min_idx])) begin
        min_found = 1'b1;
        min_idx   = P_IDX_W'(i);
      end
  end

  // does the Min-PC path run in a divergent loop?
  assign min_loop = p_loop[min_idx];
  assign use_loop = min_found && p_loop_vld[min_idx] && lt_valid[min_loop] && lt_div[min_loop] &&
                    lt_lower[min_loop] <= p_pc[min_idx] && p_pc[min_idx] <= lt_upper[min_loop];

  // paths of the same loop, and the iteration window they must fall in
  always_comb begin
    logic [ITER_W-1:0] min_iter;
    min_iter = '1;
    for (int i = 0; i < NUM_PATHS; i++) begin
      member[i] = p_valid[i] && p_loop_vld[i] && p_loop[i] == min_loop &&
                  lt_lower[min_loop] <= p_pc[i] && p_pc[i] <= lt_upper[min_loop];
      if (member[i] && p_iter[i] < min_iter) min_iter = p_iter[i];
      pop[i] = '0;
      for (int t = 0; t < WARP_SIZE; t++) pop[i] += POP_W'(p_mask[i][t]);
    end
    iter_limit = {1'b0, min_iter} + (ITER_W+1)'(ITER_SHIFT_MAX);
  end

  // majority choice among the eligible paths of the loop
  always_comb begin
    maj_found = 1'b0;
    maj_idx   = '0;
    for (int i = 0; i < NUM_PATHS; i++)
      if (member[i] && {1'b0, p_iter[i]} <= iter_limit) begin
        if (!maj_found || pop[i] > pop[maj_idx] ||
            (pop[i] == pop[maj_idx] && p_pc[i] < p_pc[maj_idx])) begin
          maj_found = 1'b1;
          maj_idx   = P_IDX_W'(i);
        end
      end
  end

  always_comb begin
    sel_valid  = min_found;
    sel_idx    = (use_loop && maj_found) ? maj_idx : min_idx;
    sel_policy = (use_loop && maj_found) ? POL_MAJORITY : POL_MINPC;
    sel_pc     = p_pc[sel_idx];
    sel_mask   = p_mask[sel_idx];
  end

endmodule
