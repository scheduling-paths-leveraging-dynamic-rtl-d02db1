// tb_las_sm: end-to-end run of the core's loop-aware scheduler, all warps.
//
// The testbench acts as the rest of the SIMT core: the warp scheduler (round
// robin over warps with a path to fetch, one instruction per cycle for the
// core), the instruction memory and the ALU/branch unit (the kernel model).
// Every warp gets a kernel, warp w running kernel w % 6 with its own data.
// Checked:
//   * every issued mask holds exactly the live threads of that warp at the PC,
//   * all warps finish, and every thread's registers equal the result of
//     running it alone,
//   * the loop table of each if/else warp: range, trip count, divergence flag,
//     and taken/not-taken counts of the first branch after detection,
//   * each scheduler mechanism happened at least once: loop detection, loop
//     update, nested loops kept, partial overlap resolved by removing and by
//     dropping, slot replacement, divergence inside a loop, path split, merge,
//     merge across iterations, exit, Min-PC and majority selections, and
//     issues that mix threads of different iterations.
// It runs with the core's default parameters, and stops issuing after 100
// failures so that a broken design ends quickly.
module tb_las_sm;
  import las_pkg::*;
  import simt_kernel_pkg::*;

  localparam int NW = 48;
  localparam int WS = 32;
  localparam int LT = 8;

  logic clk = 0, rst_n = 0;
  logic launch_valid = 0;
  logic [5:0] launch_warp = 0;
  logic [31:0] launch_pc = 0;
  logic [WS-1:0] launch_mask = 0;
  logic upd_valid = 0;
  logic [5:0] upd_warp = 0;
  logic [4:0] upd_idx = 0;
  upd_kind_e upd_kind = UPD_ALU;
  logic [31:0] upd_target = 0;
  logic [WS-1:0] upd_taken = 0;
  logic        fetch_valid [NW];
  logic [4:0]  fetch_idx [NW];
  logic [31:0] fetch_pc [NW];
  logic [WS-1:0] fetch_mask [NW];
  policy_e     fetch_policy [NW];
  logic        warp_busy [NW];
  las_events_t events [NW];
  logic [5:0]  stat_warp = 0;
  logic        stat_valid [LT], stat_div [LT], stat_first_vld [LT];
  logic [31:0] stat_upper [LT], stat_lower [LT], stat_first_pc [LT];
  logic [15:0] stat_trip [LT], stat_taken [LT], stat_not_taken [LT];

  las_sm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int { M_ALLOC, M_UPDATE, M_EVICT, M_NESTED, M_OV_RM, M_OV_DROP, M_DIV,
                     M_SPLIT, M_MERGE, M_SHIFT_MERGE, M_EXIT, M_MINPC, M_MAJORITY,
                     M_SHIFT_ISSUE, M_NUM } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"loop detected", "loop updated", "slot replaced", "nested loop kept",
                              "overlap removed", "overlap dropped", "loop divergence", "path split",
                              "path merge", "cross-iteration merge", "path exit", "Min-PC pick",
                              "majority pick", "iteration-shifted issue"};

  always @(posedge clk) if (rst_n)
    for (int w = 0; w < NW; w++) begin
      mech[M_ALLOC]       += int'(events[w].lt_alloc);
      mech[M_UPDATE]      += int'(events[w].lt_update);
      mech[M_EVICT]       += int'(events[w].lt_evict);
      mech[M_NESTED]      += int'(events[w].lt_nested);
      mech[M_OV_RM]       += int'(events[w].lt_overlap_rm);
      mech[M_OV_DROP]     += int'(events[w].lt_overlap_drop);
      mech[M_DIV]         += int'(events[w].lt_div);
      mech[M_SPLIT]       += int'(events[w].pt_split);
      mech[M_MERGE]       += int'(events[w].pt_merge);
      mech[M_SHIFT_MERGE] += int'(events[w].pt_shift_merge);
      mech[M_EXIT]        += int'(events[w].pt_exit);
    end

  tstate_t st [NW][WS];
  int      tpc [NW][WS];
  bit      tdone [NW][WS];
  int      kern [NW];
  bit      detected [NW];
  int      ref_taken [NW], ref_not_taken [NW], ref_trip [NW];

  function automatic bit any_busy();
    for (int w = 0; w < NW; w++) if (warp_busy[w]) return 1;
    return 0;
  endfunction

  initial begin
    int rr, issues, cyc;
    foreach (mech[m]) mech[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int w = 0; w < NW; w++) begin
      kern[w] = w % 6;
      detected[w] = 0; ref_taken[w] = 0; ref_not_taken[w] = 0; ref_trip[w] = 0;
      for (int t = 0; t < WS; t++) begin
        foreach (st[w][t].regs[r]) st[w][t].regs[r] = 0;
        tpc[w][t] = 0; tdone[w][t] = 0;
      end
      @(negedge clk);
      launch_valid = 1; launch_warp = 6'(w); launch_pc = 0; launch_mask = '1;
    end
    @(negedge clk);
    launch_valid = 0;

    rr = 0; issues = 0; cyc = 0;
    while (any_busy() && cyc < 150000 && failures < 100) begin
      int w, npc, it0, k;
      bit tk, dn, ok, mixed;
      logic [WS-1:0] tmask;
      cyc++;
      w = -1;
      for (int n = 0; n < NW; n++)
        if (w < 0 && fetch_valid[(rr + n) % NW]) w = (rr + n) % NW;
      rr = (w + 1) % NW;
      k = kern[w];
      ok = 1;
      for (int t = 0; t < WS; t++)
        if (fetch_mask[w][t] != (!tdone[w][t] && tpc[w][t] == int'(fetch_pc[w]))) ok = 0;
      check(ok, $sformatf("warp %0d: mask %h does not match threads at pc %0d", w, fetch_mask[w], fetch_pc[w]));
      issues++;
      if (fetch_policy[w] == POL_MAJORITY) mech[M_MAJORITY]++; else mech[M_MINPC]++;
      upd_kind = is_branch(k, int'(fetch_pc[w])) ? UPD_BRANCH : UPD_ALU;
      upd_target = fetch_pc[w] + 1;
      tmask = '0; mixed = 0; it0 = -1;
      for (int t = 0; t < WS; t++) if (fetch_mask[w][t]) begin
        if (it0 < 0) it0 = st[w][t].regs[0]; else if (st[w][t].regs[0] != it0) mixed = 1;
        exec(k, w, t, int'(fetch_pc[w]), st[w][t], npc, tk, dn);
        if (dn) begin tdone[w][t] = 1; upd_kind = UPD_EXIT; end
        if (tk) begin tmask[t] = 1; upd_target = 32'(npc); end
        tpc[w][t] = npc;
        if (k == K_IFELSE && fetch_pc[w] == 1 && detected[w]) begin
          if (tk) ref_taken[w]++; else ref_not_taken[w]++;
        end
        if (k == K_IFELSE && fetch_pc[w] == 6 && tk) ref_trip[w]++;
      end
      if (k == K_IFELSE && fetch_pc[w] == 6 && tmask != '0) detected[w] = 1;
      if (mixed && upd_kind != UPD_EXIT) mech[M_SHIFT_ISSUE]++;
      upd_valid = 1; upd_warp = 6'(w); upd_idx = fetch_idx[w]; upd_taken = tmask;
      @(negedge clk);
      upd_valid = 0;
    end
    $display("%0d instructions issued in %0d cycles", issues, cyc);

    check(!any_busy(), "all warps finished");
    for (int w = 0; w < NW; w++) begin
      bit same;
      same = 1;
      for (int t = 0; t < WS; t++) begin
        tstate_t r;
        r = run_thread(kern[w], w, t);
        if (!(tdone[w][t] && r.regs == st[w][t].regs)) same = 0;
      end
      check(same, $sformatf("warp %0d (kernel %0d) results differ from reference", w, kern[w]));
      if (kern[w] == K_IFELSE) begin
        int s;
        s = int'(lt_hash(64'd6, 3));
        stat_warp = 6'(w);
        #1;
        check(stat_valid[s] && stat_upper[s] == 6 && stat_lower[s] == 1 && stat_div[s]
              && int'(stat_trip[s]) == ref_trip[w] && ref_trip[w] == WS * 5
              && stat_first_vld[s] && stat_first_pc[s] == 1
              && int'(stat_taken[s]) == ref_taken[w] && int'(stat_not_taken[s]) == ref_not_taken[w],
              $sformatf("warp %0d loop statistics", w));
      end
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("  %-24s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
