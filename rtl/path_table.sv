// path_table: the list of paths of one warp.
//
// A path is a PC with the execution mask of the threads that are at it, the
// loop it runs in (a loop-table index) and an iteration count. The threads of
// a warp are spread over at most WARP_SIZE paths with disjoint masks; no two
// valid paths share a PC.
//
// For every instruction the branch unit executes for a path, the path moves on:
//   ALU    - the path continues at pc+1.
//   BRANCH - threads in the taken mask go to the target, the rest to pc+1.
//            If both groups are non-empty the path splits in two: one side
//            keeps the entry, the other takes a free entry.
//   EXIT   - the path is removed.
// A moving group that lands on the PC of another path merges into it (OR of
// masks). Merging ignores iteration numbers, which is what lets threads of
// different iterations of a loop run in lockstep (iteration shifting).
//
// Loop and iteration tags: a group taking a backward branch is tagged with the
// loop slot of that branch; its count is incremented when it already ran in
// that loop and set to 1 otherwise. Any other group is tagged with the
// innermost known loop holding its new PC, keeping its count if that is the
// loop it already ran in and starting at 0 otherwise (or untagged, count 0,
// outside every loop). A merged path keeps the lower of the two counts when
// both run in the same loop.
//
// The split, the path list and the per-path loop and iteration columns follow
// the scheduler's description. The merge-on-equal-PC rule, the tag-update rule
// and the min-count merge are this design's choices.
//
// Timing: launch loads one path at launch_pc with launch_mask and empties the
// rest in one cycle; an update (upd_valid) takes effect at the next clock edge.
module path_table #(
  parameter int unsigned WARP_SIZE  = 32,
  parameter int unsigned PC_W       = 32,
  parameter int unsigned LT_ENTRIES = 8,
  parameter int unsigned ITER_W     = 8,
  localparam int unsigned NUM_PATHS = WARP_SIZE,
  localparam int unsigned P_IDX_W   = (NUM_PATHS > 1) ? $clog2(NUM_PATHS) : 1,
  localparam int unsigned L_IDX_W   = (LT_ENTRIES > 1) ? $clog2(LT_ENTRIES) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // kernel launch on this warp
  input  logic                  launch_valid,
  input  logic [PC_W-1:0]       launch_pc,
  input  logic [WARP_SIZE-1:0]  launch_mask,
  // result of the instruction executed for path upd_idx
  input  logic                  upd_valid,
  input  logic [P_IDX_W-1:0]    upd_idx,
  input  las_pkg::upd_kind_e    upd_kind,
  input  logic [PC_W-1:0]       upd_target,
  input  logic [WARP_SIZE-1:0]  upd_taken,
  // loop ranges, for tagging paths with their loop
  input  logic                  lt_valid [LT_ENTRIES],
  input  logic [PC_W-1:0]       lt_lower [LT_ENTRIES],
  input  logic [PC_W-1:0]       lt_upper [LT_ENTRIES],
  // table contents
  output logic                  p_valid    [NUM_PATHS],
  output logic [PC_W-1:0]       p_pc       [NUM_PATHS],
  output logic [WARP_SIZE-1:0]  p_mask     [NUM_PATHS],
  output logic                  p_loop_vld [NUM_PATHS],
  output logic [L_IDX_W-1:0]    p_loop     [NUM_PATHS],
  output logic [ITER_W-1:0]     p_iter     [NUM_PATHS],
  output logic                  busy,          // some thread has not exited
  // one-cycle event pulses
  output logic                  ev_split,      // a path split in two
  output logic                  ev_merge,      // a group joined another path
  output logic                  ev_shift_merge,// ... which ran another iteration of the same loop
  output logic                  ev_exit        // a path exited
);

  import las_pkg::*;

  typedef struct packed {
    logic                 valid;
    logic [PC_W-1:0]      pc;
    logic [WARP_SIZE-1:0] mask;
    logic                 loop_vld;
    logic [L_IDX_W-1:0]   loop;
    logic [ITER_W-1:0]    iter;
  } path_t;

  path_t tbl_q [NUM_PATHS];
  path_t tbl_d [NUM_PATHS];
  path_t cur;
  path_t item [2];

  logic [PC_W-1:0]       fall_pc;
  logic [WARP_SIZE-1:0]  t_mask, n_mask;
  logic                  look_hit [2];
  logic [L_IDX_W-1:0]    look_idx [2];
  logic [L_IDX_W-1:0]    back_slot;

  assign cur       = tbl_q[upd_idx];
  assign fall_pc   = cur.pc + PC_W'(1);
  assign t_mask    = upd_taken & cur.mask;
  assign n_mask    = cur.mask & ~upd_taken;
  assign back_slot = L_IDX_W'(lt_hash(64'(cur.pc), L_IDX_W));

  loop_lookup #(.LT_ENTRIES(LT_ENTRIES), .PC_W(PC_W)) u_look_target (
    .ent_valid (lt_valid), .ent_lower (lt_lower), .ent_upper (lt_upper),
    .pc (upd_target), .hit (look_hit[0]), .idx (look_idx[0]));

  loop_lookup #(.LT_ENTRIES(LT_ENTRIES), .PC_W(PC_W)) u_look_fall (
    .ent_valid (lt_valid), .ent_lower (lt_lower), .ent_upper (lt_upper),
    .pc (fall_pc), .hit (look_hit[1]), .idx (look_idx[1]));

  // loop tag of a group leaving the current path for a non-backward PC
  function automatic path_t tag_forward(input logic [PC_W-1:0] pc, input logic [WARP_SIZE-1:0] m,
                                        input logic hit, input logic [L_IDX_W-1:0] li);
    path_t r;
    r.valid    = 1'b1;
    r.pc       = pc;
    r.mask     = m;
    r.loop_vld = hit;
    r.loop     = hit ? li : '0;
    r.iter     = (hit && cur.loop_vld && cur.loop == li) ? cur.iter : '0;
    return r;
  endfunction

  // the groups that leave the executed path: item[0] (target or pc+1), item[1] (pc+1)
  always_comb begin
    item[0] = '0;
    item[1] = '0;
    if (upd_valid && cur.valid) begin
      unique case (upd_kind)
        UPD_ALU: item[0] = tag_forward(fall_pc, cur.mask, look_hit[1], look_idx[1]);
        UPD_BRANCH: begin
          if (upd_target == fall_pc || n_mask == '0) begin
            item[0] = tag_forward(upd_target, cur.mask, look_hit[0], look_idx[0]);
          end else if (t_mask == '0) begin
            item[0] = tag_forward(fall_pc, cur.mask, look_hit[1], look_idx[1]);
          end else begin
            item[0] = tag_forward(upd_target, t_mask, look_hit[0], look_idx[0]);
            item[1] = tag_forward(fall_pc, n_mask, look_hit[1], look_idx[1]);
          end
          // a taken backward branch starts the next iteration of its loop
          if (upd_target <= cur.pc && item[0].valid && (t_mask != '0)) begin
            item[0].loop_vld = 1'b1;
            item[0].loop     = back_slot;
            item[0].iter     = (cur.loop_vld && cur.loop == back_slot)
                               ? ((cur.iter == '1) ? cur.iter : cur.iter + ITER_W'(1))
                               : ITER_W'(1);
          end
        end
        default: ;  // UPD_EXIT: nothing leaves
      endcase
    end
  end

  always_comb begin
    logic                 self_used;
    logic                 found;
    logic [P_IDX_W-1:0]   mj;
    found          = 1'b0;
    mj             = '0;
    tbl_d          = tbl_q;
    self_used      = 1'b0;
    ev_split       = 1'b0;
    ev_merge       = 1'b0;
    ev_shift_merge = 1'b0;
    ev_exit        = 1'b0;
    if (upd_valid && cur.valid) begin
      ev_split = item[1].valid;
      ev_exit  = (upd_kind == UPD_EXIT);
      for (int k = 0; k < 2; k++) begin
        if (item[k].valid) begin
          found = 1'b0;
          mj    = '0;
          for (int j = 0; j < NUM_PATHS; j++)
            if (!found && tbl_q[j].valid && P_IDX_W'(j) != upd_idx && tbl_q[j].pc == item[k].pc) begin
              found = 1'b1;
              mj    = P_IDX_W'(j);
            end
          if (found) begin
            ev_merge        = 1'b1;
            tbl_d[mj].mask  = tbl_q[mj].mask | item[k].mask;
            tbl_d[mj].loop_vld = item[k].loop_vld;
            tbl_d[mj].loop  = item[k].loop;
            if (item[k].loop_vld && tbl_q[mj].loop_vld && tbl_q[mj].loop == item[k].loop) begin
              tbl_d[mj].iter = (tbl_q[mj].iter < item[k].iter) ? tbl_q[mj].iter : item[k].iter;
              if (tbl_q[mj].iter != item[k].iter) ev_shift_merge = 1'b1;
            end else begin
              tbl_d[mj].iter = item[k].iter;
            end
          end else if (!self_used) begin
            tbl_d[upd_idx] = item[k];
            self_used      = 1'b1;
          end else begin
            found = 1'b0;
            for (int j = 0; j < NUM_PATHS; j++)
              if (!found && !tbl_q[j].valid && P_IDX_W'(j) != upd_idx) begin
                found        = 1'b1;
                tbl_d[j]     = item[k];
              end
          end
        end
      end
      if (!self_used) tbl_d[upd_idx] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PATHS; i++) tbl_q[i] <= '0;
    end else if (launch_valid) begin
      for (int i = 0; i < NUM_PATHS; i++) tbl_q[i] <= '0;
      tbl_q[0] <= '{valid: launch_mask != '0, pc: launch_pc, mask: launch_mask,
                    loop_vld: 1'b0, loop: '0, iter: '0};
    end else begin
      tbl_q <= tbl_d;
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < NUM_PATHS; i++) begin
      p_valid[i]    = tbl_q[i].valid;
      p_pc[i]       = tbl_q[i].pc;
      p_mask[i]     = tbl_q[i].mask;
      p_loop_vld[i] = tbl_q[i].loop_vld;
      p_loop[i]     = tbl_q[i].loop;
      p_iter[i]     = tbl_q[i].iter;
      busy          = busy | tbl_q[i].valid;
    end
  end

`ifndef SYNTHESIS
  // the branch unit only reports results for paths that exist
  a_upd_valid_path: assert property (@(posedge clk) disable iff (!rst_n)
    upd_valid && !launch_valid |-> cur.valid);
  // a taken mask never names a thread the path does not hold
  a_taken_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    upd_valid && upd_kind == UPD_BRANCH |-> (upd_taken & ~cur.mask) == '0);
`endif

endmodule
