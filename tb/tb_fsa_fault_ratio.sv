// tb_fsa_fault_ratio: the fault-ratio sweep of the evaluation, on a scaled
// array. Two accelerators of N = 16 run side by side on the same tiles and
// the same random faulty PEs: one with N RUs (as the 256-RU configuration
// has one RU per array column) and one with N/4 RUs (as the 64-RU one).
// For faulty-PE ratios of 5 % to 30 % each run must produce exact results,
// and its run time must match the latency model
// max(4N-1, N*ceil(K/n) + m + N + 2). The normalised run time (cycles over
// the fault-free 4N-1) is printed for each ratio and configuration.
module tb_fsa_fault_ratio;
  import fsa_pkg::*;

  localparam int unsigned N    = 16;
  localparam int unsigned NRU0 = N;
  localparam int unsigned NRU1 = N / 4;
  localparam int unsigned AW   = $clog2(N * N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bist_clear = 0, bist_we = 0, bist_done = 0;
  fault_loc_t bist_loc = '0;
  logic buf_clear = 0, act_push = 0, wgt_push = 0;
  act_t [N-1:0] act_push_data = '0;
  wgt_t [N-1:0] wgt_push_data = '0;
  logic start = 0;
  logic [$clog2(N)-1:0] out_rd_row = '0, out_rd_col = '0;

  logic [1:0] ready, done;
  psum_t      rd [2];
  logic [AW:0] fcount [2];

  fsa_top #(.N(N), .N_RU(NRU0)) dut0 (
    .clk, .rst_n, .bist_clear, .bist_we, .bist_loc, .bist_done, .ru_faulty('0),
    .fault_count(fcount[0]), .buf_clear, .act_push, .act_push_data, .wgt_push, .wgt_push_data,
    .act_full(), .wgt_full(), .dataflow(DF_OS), .start, .ready(ready[0]), .busy(), .done(done[0]),
    .stall(), .rcm_busy(), .out_rd_row, .out_rd_col, .out_rd_data(rd[0]), .rcm_pwr_en(), .ru_pwr_en());
  fsa_top #(.N(N), .N_RU(NRU1)) dut1 (
    .clk, .rst_n, .bist_clear, .bist_we, .bist_loc, .bist_done, .ru_faulty('0),
    .fault_count(fcount[1]), .buf_clear, .act_push, .act_push_data, .wgt_push, .wgt_push_data,
    .act_full(), .wgt_full(), .dataflow(DF_OS), .start, .ready(ready[1]), .busy(), .done(done[1]),
    .stall(), .rcm_busy(), .out_rd_row, .out_rd_col, .out_rd_data(rd[1]), .rcm_pwr_en(), .ru_pwr_en());

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] A [N][N], W [N][N];
  logic [N-1:0][N-1:0] fmap;

  function automatic int model(input int k, input int n);
    int r, m, t;
    if (k == 0) return 4 * N - 1;
    r = (k + n - 1) / n;
    m = (k % n == 0) ? n : k % n;
    t = r * N + m + N + 2;
    return (t > 4 * N - 1) ? t : 4 * N - 1;
  endfunction

  initial begin
    int cyc [2];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pct = 0; pct <= 30; pct += 5) begin
      int k;
      k = (N * N * pct + 50) / 100;
      // faults
      fmap = '0;
      for (int placed = 0; placed < k; ) begin
        int x, y;
        x = $urandom_range(N-1); y = $urandom_range(N-1);
        if (!fmap[x][y]) begin fmap[x][y] = 1'b1; placed++; end
      end
      @(posedge clk); bist_clear <= 1; @(posedge clk); bist_clear <= 0;
      for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) if (fmap[x][y]) begin
        bist_we <= 1; bist_loc <= '{x: 16'(x), y: 16'(y)}; @(posedge clk);
      end
      bist_we <= 0; @(posedge clk); bist_done <= 1; @(posedge clk); bist_done <= 0;
      // data
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        A[i][j] = 8'($urandom); W[i][j] = 8'($urandom);
      end
      @(posedge clk); buf_clear <= 1; @(posedge clk); buf_clear <= 0;
      for (int q = 0; q < N; q++) begin
        for (int f = 0; f < N; f++) begin act_push_data[f] <= A[f][q]; wgt_push_data[f] <= W[q][f]; end
        act_push <= 1; wgt_push <= 1; @(posedge clk);
      end
      act_push <= 0; wgt_push <= 0;
      while (ready != 2'b11) @(posedge clk);
      check(fcount[0] == (AW+1)'(k) && fcount[1] == (AW+1)'(k), "fault count");
      start <= 1; @(posedge clk); start <= 0;
      cyc[0] = 0; cyc[1] = 0;
      begin
        logic [1:0] fin;
        fin = '0;
        while (fin != 2'b11) begin
          @(posedge clk); #1;
          for (int d = 0; d < 2; d++) if (!fin[d]) begin cyc[d]++; if (done[d]) fin[d] = 1'b1; end
        end
      end
      check(cyc[0] == model(k, NRU0), $sformatf("%0d%%: %0d RUs took %0d cycles, model %0d", pct, NRU0, cyc[0], model(k, NRU0)));
      check(cyc[1] == model(k, NRU1), $sformatf("%0d%%: %0d RUs took %0d cycles, model %0d", pct, NRU1, cyc[1], model(k, NRU1)));
      $display("faulty PEs %2d%% (K=%0d): normalised run time %0d RUs = %0d.%02d, %0d RUs = %0d.%02d", pct, k,
               NRU0, cyc[0] * 100 / (4 * N - 1) / 100, cyc[0] * 100 / (4 * N - 1) % 100,
               NRU1, cyc[1] * 100 / (4 * N - 1) / 100, cyc[1] * 100 / (4 * N - 1) % 100);
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        psum_t gold;
        out_rd_row <= i[$clog2(N)-1:0]; out_rd_col <= j[$clog2(N)-1:0];
        @(posedge clk); #1;
        gold = 0;
        for (int q = 0; q < N; q++) gold += 24'(A[i][q] * W[q][j]);
        check(rd[0] == gold && rd[1] == gold, $sformatf("%0d%%: C[%0d][%0d]", pct, i, j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
