// tb_path_table: path splitting, merging, exit and loop/iteration tags.
//
// Part 1 (directed) walks the scheduler's example loop [1,6] with a fixed loop
// table and checks the loop tag and iteration count of each path, the split
// and merge events, and a merge of two groups in different iterations, which
// must keep the lower count.
// Part 2 (random) applies a few thousand random ALU / branch / exit results to
// random paths and compares the table with a per-thread model of where every
// thread is: each valid path must hold exactly the live threads at its PC, no
// two paths may share a PC, and the split/merge/exit events must match what
// the model predicts.
module tb_path_table;
  import las_pkg::*;

  localparam int WS = 32;
  localparam int LT = 8;

  logic clk = 0, rst_n = 0;
  logic launch_valid = 0;
  logic [31:0] launch_pc = 0;
  logic [WS-1:0] launch_mask = 0;
  logic upd_valid = 0;
  logic [4:0] upd_idx = 0;
  upd_kind_e upd_kind = UPD_ALU;
  logic [31:0] upd_target = 0;
  logic [WS-1:0] upd_taken = 0;
  logic        lt_valid [LT];
  logic [31:0] lt_lower [LT], lt_upper [LT];
  logic        p_valid [WS], p_loop_vld [WS];
  logic [31:0] p_pc [WS];
  logic [WS-1:0] p_mask [WS];
  logic [2:0]  p_loop [WS];
  logic [7:0]  p_iter [WS];
  logic busy, ev_split, ev_merge, ev_shift_merge, ev_exit;

  path_table dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // index of the valid path at pc, -1 if none
  function automatic int find(int pc);
    for (int i = 0; i < WS; i++) if (p_valid[i] && int'(p_pc[i]) == pc) return i;
    return -1;
  endfunction

  bit s_split, s_merge, s_shift, s_exit;
  task automatic upd(int pc, upd_kind_e k, int tgt = 0, logic [WS-1:0] t = '0);
    int i;
    i = find(pc);
    @(negedge clk);
    upd_valid = 1; upd_idx = 5'(i); upd_kind = k; upd_target = tgt; upd_taken = t & p_mask[i];
    #1;
    s_split = ev_split; s_merge = ev_merge; s_shift = ev_shift_merge; s_exit = ev_exit;
    @(negedge clk);
    upd_valid = 0;
  endtask

  task automatic expect_path(int pc, logic [WS-1:0] m, int it, string what);
    int i;
    i = find(pc);
    check(i >= 0 && p_mask[i] == m && p_loop_vld[i] && p_loop[i] == 6 && int'(p_iter[i]) == it,
          $sformatf("%s: path at %0d mask %h iter %0d", what, pc, i >= 0 ? p_mask[i] : '0,
                    i >= 0 ? p_iter[i] : 0));
  endtask

  int      tpc [WS];
  bit      tlive [WS];

  initial begin
    for (int i = 0; i < LT; i++) begin lt_valid[i] = 0; lt_lower[i] = 0; lt_upper[i] = 0; end
    lt_valid[6] = 1; lt_lower[6] = 1; lt_upper[6] = 6;   // loop [1,6], slot of PC 6
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- part 1: directed ----------------
    @(negedge clk); launch_valid = 1; launch_pc = 0; launch_mask = 32'hFFFF_FFFF;
    @(negedge clk); launch_valid = 0;
    check(find(0) == 0 && p_mask[0] == '1 && !p_loop_vld[0], "launch");
    upd(0, UPD_ALU);
    expect_path(1, '1, 0, "entering loop");
    upd(1, UPD_BRANCH, 4, 32'h0000_FFFF);
    check(s_split && !s_merge, "split event");
    expect_path(4, 32'h0000_FFFF, 0, "taken side");
    expect_path(2, 32'hFFFF_0000, 0, "fall-through side");
    upd(2, UPD_ALU); upd(3, UPD_BRANCH, 5, '1);
    upd(4, UPD_ALU);
    check(s_merge && !s_shift, "reconvergence at 5");
    expect_path(5, '1, 0, "merged");
    upd(5, UPD_ALU);
    upd(6, UPD_BRANCH, 1, '1);
    expect_path(1, '1, 1, "second iteration");
    upd(1, UPD_BRANCH, 4, 32'h0000_00FF);           // X = FFFFFF00 to 2, Y = FF to 4
    upd(2, UPD_ALU); upd(3, UPD_ALU);               // X reaches Y at 4
    check(s_merge && !s_shift, "same-iteration merge at 4");
    upd(4, UPD_ALU); upd(5, UPD_ALU);
    upd(6, UPD_BRANCH, 1, '1);
    expect_path(1, '1, 2, "third iteration");
    upd(1, UPD_BRANCH, 4, 32'h0000_00FF);           // Y (FF) to 4, X to 2, iter 2
    upd(2, UPD_ALU); upd(3, UPD_BRANCH, 5, '1);     // X at 5, Y at 4
    upd(5, UPD_ALU);
    upd(6, UPD_BRANCH, 1, 32'hFFFF_FF00);           // X to iteration 3
    expect_path(1, 32'hFFFF_FF00, 3, "X ahead");
    expect_path(4, 32'h0000_00FF, 2, "Y behind");
    upd(1, UPD_BRANCH, 4, '0);                      // X runs one more iteration
    upd(2, UPD_ALU); upd(3, UPD_BRANCH, 5, '1);
    upd(5, UPD_ALU);
    upd(6, UPD_BRANCH, 1, '1);
    expect_path(1, 32'hFFFF_FF00, 4, "X two iterations ahead");
    upd(4, UPD_ALU); upd(5, UPD_ALU);
    upd(6, UPD_BRANCH, 1, 32'h0000_00FF);
    check(s_merge && s_shift, "iteration-shifted merge");
    expect_path(1, '1, 3, "merged path keeps the lower count");
    upd(1, UPD_BRANCH, 7, '1);
    check(find(7) >= 0 && !p_loop_vld[find(7)] && p_iter[find(7)] == 0, "leaving the loop clears tags");
    upd(7, UPD_EXIT);
    check(s_exit && !busy, "exit empties the table");

    // ---------------- part 2: random ----------------
    for (int round = 0; round < 4; round++) begin
      logic [WS-1:0] lm;
      lm = $urandom();
      if (lm == 0) lm = 1;
      @(negedge clk); launch_valid = 1; launch_pc = 0; launch_mask = lm;
      @(negedge clk); launch_valid = 0;
      for (int t = 0; t < WS; t++) begin tpc[t] = 0; tlive[t] = lm[t]; end
      for (int step = 0; step < 1500 && busy; step++) begin
        int cand [$];
        int i, pc, tgt, r;
        logic [WS-1:0] m, tk;
        bit exp_split, exp_merge, ok;
        upd_kind_e k;
        cand.delete();
        for (int j = 0; j < WS; j++) if (p_valid[j]) cand.push_back(j);
        i = cand[$urandom_range(cand.size() - 1)];
        pc = int'(p_pc[i]); m = p_mask[i];
        r = $urandom_range(99);
        tgt = $urandom_range(15);
        tk = $urandom() & m;
        k = (r < 55) ? UPD_ALU : (r < 97) ? UPD_BRANCH : UPD_EXIT;
        if (pc > 40) k = UPD_EXIT;
        exp_split = (k == UPD_BRANCH) && tk != 0 && tk != m && tgt != pc + 1;
        exp_merge = 0;
        for (int t = 0; t < WS; t++) if (m[t] && tlive[t]) begin
          if (k == UPD_EXIT) tlive[t] = 0;
          else if (k == UPD_BRANCH && tk[t]) tpc[t] = tgt;
          else tpc[t] = pc + 1;
        end
        for (int t = 0; t < WS; t++)
          if (tlive[t] && !m[t] && (tpc[t] == pc + 1 && k != UPD_EXIT && (k == UPD_ALU || (tk != m)) ||
                                    (k == UPD_BRANCH && tk != 0 && tpc[t] == tgt)))
            exp_merge = 1;
        upd(pc, k, tgt, tk);
        check(s_split == exp_split && s_merge == exp_merge && s_exit == (k == UPD_EXIT),
              $sformatf("events at step %0d (split %0d/%0d merge %0d/%0d)", step, s_split, exp_split, s_merge, exp_merge));
        ok = 1;
        for (int a = 0; a < WS; a++) if (p_valid[a]) begin
          if (p_mask[a] == 0) ok = 0;
          for (int b = a + 1; b < WS; b++) if (p_valid[b] && p_pc[b] == p_pc[a]) ok = 0;
          for (int t = 0; t < WS; t++) if (p_mask[a][t] != (tlive[t] && tpc[t] == int'(p_pc[a]))) ok = 0;
        end
        for (int t = 0; t < WS; t++) if (tlive[t] && find(tpc[t]) < 0) ok = 0;
        check(ok, $sformatf("table matches thread model at step %0d", step));
      end
      // drain: exit every remaining path
      while (busy) begin
        int i;
        i = -1;
        for (int j = 0; j < WS; j++) if (p_valid[j] && i < 0) i = j;
        upd(int'(p_pc[i]), UPD_EXIT);
      end
      check(!busy, "drained");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
