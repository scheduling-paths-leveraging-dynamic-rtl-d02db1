// tb_las_warp: runs whole kernels on one warp's scheduler.
//
// The testbench plays the SIMT pipeline: each cycle it takes the path the
// scheduler selects, executes the instruction for every thread of the mask
// with the kernel model, and returns the outcome on the update port. It checks
//   * every selected mask holds exactly the live threads at the selected PC,
//   * each kernel ends with every thread's registers equal to running that
//     thread alone,
//   * the if/else loop kernel's loop-table entry: range, trip count (one per
//     taken backward-branch outcome), divergence flag, and taken/not-taken
//     counts of the loop's first branch after detection,
//   * that the majority policy was used and threads of different iterations
//     were issued together (iteration shifting), and that the uniform loop
//     never left Min-PC,
//   * the 4-thread, 6-iteration version of the if/else loop (the scheduler's
//     running example) finishes with fewer issues than threads run alone.
module tb_las_warp;
  import las_pkg::*;
  import simt_kernel_pkg::*;

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
  logic fetch_valid;
  logic [4:0] fetch_idx;
  logic [31:0] fetch_pc;
  logic [WS-1:0] fetch_mask;
  policy_e fetch_policy;
  logic busy;
  las_events_t events;
  logic        lt_valid [LT];
  logic [31:0] lt_upper [LT], lt_lower [LT], lt_first_pc [LT];
  logic        lt_div [LT], lt_first_vld [LT];
  logic [15:0] lt_trip [LT], lt_taken [LT], lt_not_taken [LT];

  las_warp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tstate_t st [WS];
  int      tpc [WS];
  bit      tdone [WS];
  int      n_major, n_shift_issue, n_issue;

  // run kernel k to completion; returns per-kernel statistics through globals
  int ref_taken, ref_not_taken, ref_trip;
  task automatic run_kernel(int k, int salt, logic [WS-1:0] lmask = '1);
    bit detected;
    int guard;
    ref_taken = 0; ref_not_taken = 0; ref_trip = 0; detected = 0;
    n_major = 0; n_shift_issue = 0; n_issue = 0;
    for (int t = 0; t < WS; t++) begin
      foreach (st[t].regs[r]) st[t].regs[r] = 0;
      tpc[t] = 0; tdone[t] = !lmask[t];
    end
    @(negedge clk);
    launch_valid = 1; launch_pc = 0; launch_mask = lmask;
    @(negedge clk);
    launch_valid = 0;
    guard = 0;
    while (busy && guard < 20000) begin
      int npc; bit tk, dn; bit ok; int it0; bit mixed;
      logic [WS-1:0] tmask;
      guard++;
      ok = fetch_valid;
      mixed = 0; it0 = -1; tmask = '0;
      for (int t = 0; t < WS; t++) begin
        bit at_pc;
        at_pc = !tdone[t] && tpc[t] == int'(fetch_pc);
        if (fetch_mask[t] != at_pc) ok = 0;
      end
      check(ok, $sformatf("kernel %0d: mask %h does not match threads at pc %0d", k, fetch_mask, fetch_pc));
      n_issue++;
      if (fetch_policy == POL_MAJORITY) n_major++;
      upd_kind = is_branch(k, int'(fetch_pc)) ? UPD_BRANCH : UPD_ALU;
      upd_target = 0;
      for (int t = 0; t < WS; t++) if (fetch_mask[t]) begin
        if (it0 < 0) it0 = st[t].regs[0]; else if (st[t].regs[0] != it0) mixed = 1;
        exec(k, salt, t, int'(fetch_pc), st[t], npc, tk, dn);
        if (dn) begin tdone[t] = 1; upd_kind = UPD_EXIT; end
        if (tk) begin tmask[t] = 1; upd_target = 32'(npc); end
        tpc[t] = npc;
        if (k == K_IFELSE && fetch_pc == 1 && detected) begin
          if (tk) ref_taken++; else ref_not_taken++;
        end
        if (k == K_IFELSE && fetch_pc == 6 && tk) ref_trip++;
      end
      if (k == K_IFELSE && fetch_pc == 6 && tmask != '0) detected = 1;
      if (upd_kind == UPD_BRANCH && tmask == '0) upd_target = fetch_pc + 1;
      if (mixed) n_shift_issue++;
      upd_valid = 1; upd_idx = fetch_idx; upd_taken = tmask;
      @(negedge clk);
      upd_valid = 0;
    end
    check(!busy, $sformatf("kernel %0d did not finish", k));
    for (int t = 0; t < WS; t++) begin
      tstate_t r;
      r = run_thread(k, salt, t);
      if (!lmask[t]) continue;
      check(tdone[t] && r.regs == st[t].regs,
            $sformatf("kernel %0d thread %0d registers differ from reference", k, t));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // the if/else loop of the scheduler's example
    run_kernel(K_IFELSE, 1);
    begin
      int s;
      s = int'(lt_hash(64'd6, 3));
      check(lt_valid[s] && lt_upper[s] == 6 && lt_lower[s] == 1, "if/else loop range");
      check(int'(lt_trip[s]) == ref_trip && ref_trip == WS * 5, $sformatf("trip count %0d vs %0d", lt_trip[s], ref_trip));
      check(lt_div[s] == 1'b1, "divergence flag of if/else loop");
      check(lt_first_vld[s] && lt_first_pc[s] == 1, "first branch of the loop");
      check(int'(lt_taken[s]) == ref_taken && int'(lt_not_taken[s]) == ref_not_taken,
            $sformatf("taken ratio counts %0d/%0d vs %0d/%0d", lt_taken[s], lt_not_taken[s], ref_taken, ref_not_taken));
      check(n_major > 0, "majority policy used in divergent loop");
      check(n_shift_issue > 0, "threads of different iterations issued together");
      $display("if/else kernel: %0d issues, %0d by majority, %0d iteration-shifted", n_issue, n_major, n_shift_issue);
    end

    run_kernel(K_UNIFORM, 2);
    check(n_major == 0, "uniform loop stays on Min-PC");
    check(n_issue == 1 + 5 * 3 + 1, $sformatf("uniform loop issue count %0d", n_issue));

    run_kernel(K_NESTED, 3);
    run_kernel(K_OVERLAP, 4);
    run_kernel(K_TERM, 5);
    run_kernel(K_CONFLICT, 6);
    run_kernel(K_IFELSE, 7);

    // the 4-thread, 6-iteration example loop
    run_kernel(K_IFELSE, 8, 32'h0000_000F);
    begin
      int s;
      s = int'(lt_hash(64'd6, 3));
      check(int'(lt_trip[s]) == 4 * 5 && int'(lt_taken[s]) == ref_taken && int'(lt_not_taken[s]) == ref_not_taken,
            "4-thread example loop statistics");
      $display("4-thread example: %0d issues (%0d without any reconvergence), %0d by majority",
               n_issue, 4 * (2 + 6 * 5), n_major);
      check(n_issue < 4 * (2 + 6 * 5), "4-thread example packs threads into shared issues");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
