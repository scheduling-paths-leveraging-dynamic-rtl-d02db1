// tb_loop_table: directed test of loop detection and loop statistics.
//
// Sequence: detect a loop from a taken backward branch, update its trip count,
// gather divergence and taken/not-taken counts of its first branch, detect a
// nested loop (both kept, inner one charged for its own branches), detect a
// partially overlapping loop (the known loop with the lower backward-branch PC
// is removed), offer a partially overlapping loop that loses (it is dropped),
// replace a loop in its direct-mapped slot, ignore a backward branch nobody
// takes, and clear the table. Expected values are worked out by hand from the
// rules, with the slot of a branch at PC p being p[2:0] ^ p[5:3].
module tb_loop_table;
  localparam int LT = 8;
  localparam int WS = 32;

  logic clk = 0, rst_n = 0, clear = 0;
  logic br_valid = 0;
  logic [31:0] br_pc = 0, br_target = 0;
  logic [WS-1:0] br_mask = 0, br_taken = 0;
  logic        ent_valid [LT];
  logic [31:0] ent_upper [LT], ent_lower [LT], ent_first_pc [LT];
  logic        ent_div [LT], ent_first_vld [LT];
  logic [15:0] ent_trip [LT], ent_taken [LT], ent_not_taken [LT];
  logic ev_alloc, ev_update, ev_evict, ev_nested, ev_overlap_rm, ev_overlap_drop, ev_div;

  loop_table dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event pulses seen during the branch
  bit e_alloc, e_update, e_evict, e_nested, e_rm, e_drop, e_div;

  task automatic branch(int pc, int tgt, logic [WS-1:0] m, logic [WS-1:0] t);
    @(negedge clk);
    br_valid = 1; br_pc = pc; br_target = tgt; br_mask = m; br_taken = t;
    #1;
    e_alloc = ev_alloc; e_update = ev_update; e_evict = ev_evict; e_nested = ev_nested;
    e_rm = ev_overlap_rm; e_drop = ev_overlap_drop; e_div = ev_div;
    @(negedge clk);
    br_valid = 0;
  endtask

  function automatic int slot(int pc);
    return (pc & 7) ^ ((pc >> 3) & 7);
  endfunction

  int nvalid;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < LT; i++) check(!ent_valid[i], "empty after reset");

    // loop [1,6] detected, 4 threads take the backward branch
    branch(6, 1, 32'hFF, 32'h0F);
    check(e_alloc && !e_update && !e_evict, "allocation event");
    check(ent_valid[6] && ent_upper[6] == 6 && ent_lower[6] == 1, "loop [1,6] in slot 6");
    check(ent_trip[6] == 4 && !ent_div[6] && !ent_first_vld[6], "trip 4 after detection");

    branch(6, 1, 32'hFF, 32'h03);
    check(e_update && !e_alloc, "update event");
    check(ent_trip[6] == 6, "trip count adds per-thread outcomes");

    // first branch inside the loop, divergent
    branch(2, 4, 32'hFF, 32'h0F);
    check(e_div && ent_div[6], "divergence detected");
    check(ent_first_vld[6] && ent_first_pc[6] == 2, "first branch recorded");
    check(ent_taken[6] == 4 && ent_not_taken[6] == 4, "taken ratio counts 4/4");

    // another branch inside the loop is not the first one
    branch(3, 5, 32'hFF, 32'hFF);
    check(!e_div && ent_taken[6] == 4 && ent_not_taken[6] == 4, "second branch ignored by ratio");

    branch(2, 4, 32'hF0, 32'h10);
    check(ent_taken[6] == 5 && ent_not_taken[6] == 7, "taken ratio counts 5/7");

    // branch outside any loop changes nothing
    branch(20, 30, 32'h3, 32'h1);
    check(!e_div && ent_taken[6] == 5, "branch outside loops ignored");

    // nested loop [3,4] inside [1,6]
    branch(4, 3, 32'hFF, 32'hFF);
    check(e_alloc && e_nested && !e_rm, "nested loop kept");
    check(ent_valid[4] && ent_valid[6] && ent_lower[4] == 3, "both nested loops valid");
    branch(3, 5, 32'h0F, 32'h01);
    check(ent_first_vld[4] && ent_first_pc[4] == 3 && ent_taken[4] == 1 && ent_not_taken[4] == 3,
          "branch charged to the innermost loop");
    check(ent_div[4] && ent_taken[6] == 5, "outer loop untouched by inner branch");

    // partial overlap: [5,9] against [1,6] -> [1,6] (lower backward PC) removed
    branch(9, 5, 32'hFF, 32'h01);
    check(e_alloc && e_rm && !e_drop, "overlap removes older loop");
    check(!ent_valid[6] && ent_valid[0] && ent_upper[0] == 9 && ent_valid[4], "table after overlap");

    // partial overlap: [2,7] against [5,9] -> the new loop loses
    branch(7, 2, 32'hFF, 32'h01);
    check(e_drop && !e_alloc, "overlapping new loop dropped");
    check(!ent_valid[7] && ent_valid[0] && ent_valid[4], "table after drop");

    // slot conflict: branch at 13 maps to slot 4
    check(slot(13) == 4, "slot arithmetic");
    branch(13, 12, 32'hFF, 32'h80);
    check(e_alloc && e_evict, "direct-mapped replacement");
    check(ent_valid[4] && ent_upper[4] == 13 && ent_lower[4] == 12 && ent_trip[4] == 1 && !ent_div[4],
          "new loop replaces old one in slot 4");

    // backward branch that nobody takes
    branch(30, 25, 32'hFF, 32'h00);
    check(!e_alloc && !e_update && !ent_valid[slot(30)], "untaken backward branch ignored");

    nvalid = 0;
    for (int i = 0; i < LT; i++) nvalid += int'(ent_valid[i]);
    check(nvalid == 2, "two loops left");

    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    nvalid = 0;
    for (int i = 0; i < LT; i++) nvalid += int'(ent_valid[i]);
    check(nvalid == 0, "clear empties the table");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
