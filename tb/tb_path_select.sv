// tb_path_select: the path priority function.
//
// Directed cases: Min-PC outside loops; Min-PC inside a loop without
// divergence; the two-path snapshot of the scheduler's example (two paths of
// equal population in a divergent loop: tie to the lower PC); majority
// choosing a more populated path at a higher PC; the iteration window
// excluding a populated path that is too far ahead; a path whose loop entry
// no longer holds its PC.
// Random cases: thousands of random path and loop tables, compared with a
// reference selection written here from the policy rules.
module tb_path_select;
  import las_pkg::*;

  localparam int WS = 32;
  localparam int LT = 8;
  localparam int SHIFT = 2;

  logic        p_valid [WS], p_loop_vld [WS];
  logic [31:0] p_pc [WS];
  logic [WS-1:0] p_mask [WS];
  logic [2:0]  p_loop [WS];
  logic [7:0]  p_iter [WS];
  logic        lt_valid [LT], lt_div [LT];
  logic [31:0] lt_lower [LT], lt_upper [LT];
  logic        sel_valid;
  logic [4:0]  sel_idx;
  logic [31:0] sel_pc;
  logic [WS-1:0] sel_mask;
  policy_e     sel_policy;

  path_select dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_all();
    for (int i = 0; i < WS; i++) begin
      p_valid[i] = 0; p_loop_vld[i] = 0; p_pc[i] = 0; p_mask[i] = 0; p_loop[i] = 0; p_iter[i] = 0;
    end
    for (int i = 0; i < LT; i++) begin
      lt_valid[i] = 0; lt_div[i] = 0; lt_lower[i] = 0; lt_upper[i] = 0;
    end
  endtask

  task automatic path(int i, int pc, logic [WS-1:0] m, bit lv = 0, int l = 0, int it = 0);
    p_valid[i] = 1; p_pc[i] = pc; p_mask[i] = m; p_loop_vld[i] = lv; p_loop[i] = 3'(l); p_iter[i] = 8'(it);
  endtask

  function automatic int popc(logic [WS-1:0] m);
    int c = 0;
    for (int t = 0; t < WS; t++) c += int'(m[t]);
    return c;
  endfunction

  // reference selection: returns index, and policy through p
  function automatic int ref_select(output bit any, output bit maj);
    int mi, best, l, mn;
    bit inl;
    any = 0; maj = 0; mi = 0;
    for (int i = 0; i < WS; i++)
      if (p_valid[i] && (!any || p_pc[i] < p_pc[mi])) begin any = 1; mi = i; end
    if (!any) return 0;
    l = int'(p_loop[mi]);
    inl = p_loop_vld[mi] && lt_valid[l] && lt_div[l] && lt_lower[l] <= p_pc[mi] && p_pc[mi] <= lt_upper[l];
    if (!inl) return mi;
    mn = 1000;
    for (int i = 0; i < WS; i++)
      if (p_valid[i] && p_loop_vld[i] && int'(p_loop[i]) == l && lt_lower[l] <= p_pc[i] && p_pc[i] <= lt_upper[l])
        if (int'(p_iter[i]) < mn) mn = int'(p_iter[i]);
    best = -1;
    for (int i = 0; i < WS; i++)
      if (p_valid[i] && p_loop_vld[i] && int'(p_loop[i]) == l && lt_lower[l] <= p_pc[i] && p_pc[i] <= lt_upper[l]
          && int'(p_iter[i]) <= mn + SHIFT)
        if (best < 0 || popc(p_mask[i]) > popc(p_mask[best]) ||
            (popc(p_mask[i]) == popc(p_mask[best]) && p_pc[i] < p_pc[best])) best = i;
    maj = 1;
    return best;
  endfunction

  initial begin
    int n_maj = 0;
    clear_all();
    #1;
    check(!sel_valid, "no path, no fetch");

    // Min-PC outside loops
    path(3, 20, 32'h0000_00FF); path(7, 12, 32'h0000_0F00); path(9, 30, 32'hFFFF_0000);
    #1;
    check(sel_valid && sel_idx == 7 && sel_pc == 12 && sel_mask == 32'h0000_0F00 && sel_policy == POL_MINPC,
          "Min-PC outside loops");

    // loop [1,6] in slot 6, no divergence yet: Min-PC
    clear_all();
    lt_valid[6] = 1; lt_lower[6] = 1; lt_upper[6] = 6;
    path(0, 2, 32'h0000_0001, 1, 6, 1); path(1, 4, 32'hFFFF_FFFE, 1, 6, 1);
    #1;
    check(sel_idx == 0 && sel_policy == POL_MINPC, "loop without divergence keeps Min-PC");

    // the example snapshot: A (0110) and B (1001), both in the loop, iteration 1
    lt_div[6] = 1;
    clear_all();
    lt_valid[6] = 1; lt_lower[6] = 1; lt_upper[6] = 6; lt_div[6] = 1;
    path(0, 2, 32'h6, 1, 6, 1); path(1, 4, 32'h9, 1, 6, 1);
    #1;
    check(sel_idx == 0 && sel_policy == POL_MAJORITY, "equal populations: lower PC wins");

    // majority picks the bigger path even at a higher PC
    path(1, 4, 32'hF9, 1, 6, 1);
    #1;
    check(sel_idx == 1 && sel_policy == POL_MAJORITY, "majority policy");

    // ...unless it is more than SHIFT iterations ahead of the slowest path
    path(1, 4, 32'hF9, 1, 6, 1 + SHIFT + 1);
    #1;
    check(sel_idx == 0, "iteration window holds back the leading path");
    path(1, 4, 32'hF9, 1, 6, 1 + SHIFT);
    #1;
    check(sel_idx == 1, "leading path inside the window is eligible");

    // Min-PC path tagged with a loop whose entry no longer holds it
    lt_lower[6] = 3;
    #1;
    check(sel_idx == 0 && sel_policy == POL_MINPC, "stale loop tag falls back to Min-PC");

    // random tables
    for (int n = 0; n < 3000; n++) begin
      int np, r;
      bit any, maj;
      clear_all();
      for (int l = 0; l < LT; l++) begin
        int a, b;
        a = $urandom_range(40); b = $urandom_range(40);
        lt_valid[l] = $urandom_range(3) != 0;
        lt_div[l] = $urandom_range(1);
        lt_lower[l] = (a < b) ? a : b; lt_upper[l] = (a < b) ? b : a;
      end
      np = $urandom_range(1, WS);
      for (int i = 0; i < np; i++) begin
        int pc;
        bit dup;
        do begin
          pc = $urandom_range(40);
          dup = 0;
          for (int j = 0; j < i; j++) if (int'(p_pc[j]) == pc) dup = 1;
        end while (dup);
        path(i, pc, '0, $urandom_range(3) != 0, $urandom_range(LT - 1), $urandom_range(6));
      end
      for (int t = 0; t < WS; t++) begin
        int k;
        k = $urandom_range(np - 1);
        p_mask[k][t] = 1;
      end
      for (int i = 0; i < np; i++) if (p_mask[i] == 0) p_valid[i] = 0;
      // scatter paths over the table
      for (int i = 0; i < WS; i++) begin
        int j;
        j = $urandom_range(WS - 1);
        {p_valid[i], p_valid[j]} = {p_valid[j], p_valid[i]};
        {p_pc[i], p_pc[j]} = {p_pc[j], p_pc[i]};
        {p_mask[i], p_mask[j]} = {p_mask[j], p_mask[i]};
        {p_loop_vld[i], p_loop_vld[j]} = {p_loop_vld[j], p_loop_vld[i]};
        {p_loop[i], p_loop[j]} = {p_loop[j], p_loop[i]};
        {p_iter[i], p_iter[j]} = {p_iter[j], p_iter[i]};
      end
      #1;
      r = ref_select(any, maj);
      if (maj) n_maj++;
      check(sel_valid == any && (!any || (int'(sel_idx) == r && sel_policy == (maj ? POL_MAJORITY : POL_MINPC)
                                          && sel_pc == p_pc[r] && sel_mask == p_mask[r])),
            $sformatf("random case %0d: got %0d/%0d expected %0d/%0d", n, sel_idx, sel_policy, r, maj));
    end
    check(n_maj > 100, "random cases exercised the majority policy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
