// tb_fsa_top: end-to-end test of the fault-tolerant systolic array.
//
// An 8 x 8 array with 4 RUs multiplies random signed 8-bit tiles under a
// series of fault scenarios, and every result is compared with a product
// computed here in the testbench. Scenarios: no fault (RCM power-gated), a
// few faults with every RU healthy (no stall, some RUs idle), faults with
// faulty RUs that must be bypassed, many faults that need several rounds and
// stall the drain, every PE faulty, and a PE reported twice. For each run
// the cycle count from start to done is checked against the latency model
// max(4N-1, R*N + m + N + 2), R rounds of N steps plus the m-cycle shift-out
// of the last round, and the number of corrections written into the array
// must equal the number of faulty PEs. Each mechanism is counted and a
// mechanism that never happened counts as a failure. The WS and IS dataflows
// are run too, with and without faulty PEs: there a faulty PE must add zero
// (no recomputation in those dataflows) and a run takes 4N cycles.
module tb_fsa_top;
  import fsa_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned N_RU = 4;
  localparam int unsigned MAXF = N * N;
  localparam int unsigned AW   = $clog2(MAXF);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bist_clear = 0, bist_we = 0, bist_done = 0;
  fault_loc_t bist_loc = '0;
  logic [N_RU-1:0] ru_faulty = '0;
  logic [AW:0] fault_count;
  logic buf_clear = 0, act_push = 0, wgt_push = 0, act_full, wgt_full;
  act_t [N-1:0] act_push_data = '0;
  wgt_t [N-1:0] wgt_push_data = '0;
  dataflow_t dataflow = DF_OS;
  logic start = 0, ready, busy, done, stall, rcm_busy, rcm_pwr_en;
  logic [$clog2(N)-1:0] out_rd_row = '0, out_rd_col = '0;
  psum_t out_rd_data;
  logic [N_RU-1:0] ru_pwr_en;

  fsa_top #(.N(N), .N_RU(N_RU)) dut (.*);

  int checks = 0, failures = 0;
  int n_fault_runs = 0, n_corr = 0, n_stall_cycles = 0, n_stall_runs = 0,
      n_bypass_runs = 0, n_gated_rcm = 0, n_gated_ru = 0, n_multiround = 0,
      n_dup = 0, n_multicast = 0, n_ws = 0, n_is = 0, n_df_switch = 0;
  dataflow_t last_df = DF_OS;

  logic signed [7:0] A [N][N];
  logic signed [7:0] W [N][N];
  logic [N-1:0][N-1:0] fmap;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (dut.corr.valid) n_corr++;
  always @(posedge clk) if (stall) n_stall_cycles++;
  always @(posedge clk) if (rcm_busy && ru_pwr_en != '1 && rcm_pwr_en) n_gated_ru++;

  task automatic set_faults(input int unsigned k, input bit all_pes, input bit dup);
    fmap = '0;
    @(posedge clk); bist_clear <= 1; @(posedge clk); bist_clear <= 0;
    if (all_pes) begin
      for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) fmap[x][y] = 1'b1;
    end else begin
      int placed = 0;
      while (placed < k) begin
        int x = $urandom_range(N-1), y = $urandom_range(N-1);
        if (!fmap[x][y]) begin fmap[x][y] = 1'b1; placed++; end
      end
    end
    for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) if (fmap[x][y]) begin
      bist_we <= 1; bist_loc <= '{x: 16'(x), y: 16'(y)}; @(posedge clk);
      if (dup) begin @(posedge clk); dup = 0; n_dup++; end   // same PE reported twice
    end
    bist_we <= 0;
    @(posedge clk); bist_done <= 1; @(posedge clk); bist_done <= 0;
    @(posedge clk);
    check(fault_count == (AW+1)'($countones(fmap)), "fault table count");
  endtask

  task automatic load_tile();
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      A[i][j] = 8'($urandom);
      W[i][j] = 8'($urandom);
    end
    @(posedge clk); buf_clear <= 1; @(posedge clk); buf_clear <= 0;
    for (int k = 0; k < N; k++) begin
      for (int f = 0; f < N; f++) begin
        act_push_data[f] <= (dataflow == DF_WS) ? A[k][f] : A[f][k];
        wgt_push_data[f] <= (dataflow == DF_IS) ? W[f][k] : W[k][f];
      end
      act_push <= 1; wgt_push <= 1;
      @(posedge clk);
    end
    act_push <= 0; wgt_push <= 0;
    @(posedge clk);
    check(act_full && wgt_full, "input buffers full after N pushes");
  endtask

  task automatic run_and_check(input string name);
    int cyc, k, h, r, m, expect_cyc, corr0;
    logic signed [23:0] gold;
    k = $countones(fmap);
    h = N_RU - $countones(ru_faulty);
    if (dataflow != last_df) n_df_switch++;
    last_df = dataflow;
    if (dataflow == DF_WS) n_ws++;
    if (dataflow == DF_IS) n_is++;
    if (dataflow != DF_OS) begin
      expect_cyc = 4 * N;
      k = 0;   // no recomputation outside OS
    end else if (k == 0) expect_cyc = 4 * N - 1;
    else begin
      r = (k + h - 1) / h;
      m = (k % h == 0) ? h : k % h;
      expect_cyc = (r * N + m + N + 2 > 4 * N - 1) ? r * N + m + N + 2 : 4 * N - 1;
      if (r > 1) n_multiround++;
      n_fault_runs++;
    end
    if ($countones(fmap) == 0) begin
      check(!rcm_pwr_en, "RCM gated with no faults");
      if (!rcm_pwr_en) n_gated_rcm++;
    end
    if (ru_faulty != '0 && k > 0) n_bypass_runs++;
    if (dataflow == DF_OS && expect_cyc > 4 * N - 1) n_stall_runs++;
    while (!ready) @(posedge clk);
    corr0 = n_corr;
    start <= 1; @(posedge clk); start <= 0;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    check(cyc == expect_cyc, $sformatf("%s: %0d cycles start->done, expected %0d", name, cyc, expect_cyc));
    check(n_corr - corr0 == k, $sformatf("%s: %0d corrections for %0d faults", name, n_corr - corr0, k));
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      out_rd_row <= i[$clog2(N)-1:0]; out_rd_col <= j[$clog2(N)-1:0];
      @(posedge clk); #1;
      gold = 0;
      for (int q = 0; q < N; q++)
        // WS: PE(q,j) holds W[q][j]; IS: PE(q,i) holds A[i][q]
        if (!((dataflow == DF_WS && fmap[q][j]) || (dataflow == DF_IS && fmap[q][i])))
          gold += 24'(A[i][q] * W[q][j]);
      check(out_rd_data == gold, $sformatf("%s: C[%0d][%0d]=%0d expected %0d (faulty=%0d)",
                                           name, i, j, out_rd_data, gold, fmap[i][j]));
    end
  endtask

  // two faulty PEs in the same column share the weight FIFO (multicast)
  logic [N_RU-1:0] ru_act;
  logic [15:0]     ru_col [N_RU];
  for (genvar g = 0; g < N_RU; g++) begin : g_peek
    assign ru_act[g] = dut.u_rcm.u_rus.g_ru[g].u_ru.tgt_valid;
    assign ru_col[g] = dut.u_rcm.u_rus.g_ru[g].loc.y;
  end
  always @(posedge clk) begin
    if (dut.u_rcm.u_ctrl.step_en && dut.u_rcm.u_ctrl.first) begin
      for (int a = 0; a < N_RU; a++) for (int b = a + 1; b < N_RU; b++)
        if (ru_act[a] && ru_act[b] && ru_col[a] == ru_col[b]) n_multicast++;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    set_faults(0, 0, 0);  load_tile(); run_and_check("no faults");
    // the example of a 4-fault array with 2 RUs, here on more RUs
    set_faults(3, 0, 0);  load_tile(); run_and_check("3 faults, 4 RUs");
    set_faults(4, 0, 1);  load_tile(); run_and_check("4 faults, one reported twice");
    ru_faulty = 4'b0101;
    set_faults(4, 0, 0);  load_tile(); run_and_check("4 faults, RUs 0 and 2 bypassed");
    ru_faulty = 4'b1000;
    set_faults(12, 0, 0); load_tile(); run_and_check("12 faults, RU 3 bypassed");
    ru_faulty = '0;
    set_faults(20, 0, 0); load_tile(); run_and_check("20 faults, stall");
    set_faults(0, 1, 0);  load_tile(); run_and_check("every PE faulty");
    // same faults, new data: the first round is dispatched again after a run
    load_tile(); run_and_check("every PE faulty, second tile");
    set_faults(8, 0, 0);  load_tile(); run_and_check("8 faults, exact rounds");
    dataflow = DF_WS;
    set_faults(0, 0, 0);  load_tile(); run_and_check("WS, no faults");
    set_faults(5, 0, 0);  load_tile(); run_and_check("WS, faulty PEs add zero");
    dataflow = DF_IS;
    set_faults(0, 0, 0);  load_tile(); run_and_check("IS, no faults");
    set_faults(5, 0, 0);  load_tile(); run_and_check("IS, faulty PEs add zero");
    dataflow = DF_OS;
    set_faults(6, 0, 0);  load_tile(); run_and_check("back to OS");

    $display("mechanisms: fault_runs=%0d corrections=%0d stall_runs=%0d stall_cycles=%0d bypass_runs=%0d rcm_gated=%0d ru_gated_cycles=%0d multiround=%0d duplicate=%0d multicast=%0d ws=%0d is=%0d df_switch=%0d",
             n_fault_runs, n_corr, n_stall_runs, n_stall_cycles, n_bypass_runs, n_gated_rcm,
             n_gated_ru, n_multiround, n_dup, n_multicast, n_ws, n_is, n_df_switch);
    check(n_fault_runs > 0, "faulty PEs occurred");
    check(n_corr > 0, "corrections occurred");
    check(n_stall_cycles > 0 && n_stall_runs > 0, "stall occurred");
    check(n_bypass_runs > 0, "RU bypass occurred");
    check(n_gated_rcm > 0, "RCM power gating occurred");
    check(n_gated_ru > 0, "RU power gating occurred");
    check(n_multiround > 0, "multi-round recomputation occurred");
    check(n_dup > 0, "duplicate report occurred");
    check(n_multicast > 0, "multicast operand occurred");
    check(n_ws > 0 && n_is > 0 && n_df_switch > 0, "WS, IS and dataflow switches occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
