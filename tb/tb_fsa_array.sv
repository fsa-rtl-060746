// tb_fsa_array: unit test of a 6 x 6 computing array. The testbench feeds
// skewed rows of A and columns of W, then drains; the array must deliver
// C = A x W with zeros in place of faulty PEs, accumulation must finish
// within 3N-1 cycles, a correction written to a faulty PE must come out in
// its place, and results leave the bottom row first, one row per cycle.
// A weight-stationary pass then preloads W, streams skewed rows of A and
// expects column j to deliver result r in compute cycle r + N + j + 1, with
// the products of faulty PEs missing.
module tb_fsa_array;
  import fsa_pkg::*;
  localparam int unsigned N = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0][N-1:0] fault_map = '0;
  logic stationary = 0, preload = 0, clear = 0, drain = 0;
  act_t [N-1:0] a_left = '0;
  wgt_t [N-1:0] w_top = '0;
  corr_t corr = '0;
  psum_t [N-1:0] psum_bot;

  fsa_array #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] A [N][N], W [N][N];
  psum_t C [N][N];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        A[i][j] = 8'($urandom); W[i][j] = 8'($urandom);
      end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < N; k++) C[i][j] += 24'(A[i][k] * W[k][j]);
      end
      fault_map = '0;
      for (int f = 0; f < rep * 3; f++) fault_map[$urandom_range(N-1)][$urandom_range(N-1)] = 1'b1;
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      // exactly 3N-1 feed cycles
      for (int t = 0; t < 3 * N - 1; t++) begin
        for (int f = 0; f < N; f++) begin
          a_left[f] <= (t - f >= 0 && t - f < N) ? A[f][t-f] : '0;
          w_top[f]  <= (t - f >= 0 && t - f < N) ? W[t-f][f] : '0;
        end
        @(posedge clk);
      end
      a_left <= '0; w_top <= '0;
      // in the last repetition, repair one faulty PE through the correction port
      if (rep == 2) begin
        for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
          if (fault_map[i][j] && !corr.valid) begin
            corr.valid = 1; corr.x = 16'(i); corr.y = 16'(j); corr.value = C[i][j];
          end
        @(posedge clk);
        if (corr.valid) fault_map[corr.x][corr.y] = 1'b0;
        corr <= '0;
      end
      drain <= 1;
      for (int d = 0; d < N; d++) begin
        #1;
        for (int j = 0; j < N; j++)
          check(psum_bot[j] == (fault_map[N-1-d][j] ? psum_t'(0) : C[N-1-d][j]),
                $sformatf("rep %0d C[%0d][%0d]=%0d exp %0d faulty %0d", rep, N-1-d, j,
                          psum_bot[j], C[N-1-d][j], fault_map[N-1-d][j]));
        @(posedge clk);
      end
      drain <= 0;
    end
    // weight stationary
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      A[i][j] = 8'($urandom); W[i][j] = 8'($urandom);
    end
    fault_map = '0;
    for (int f = 0; f < 4; f++) fault_map[$urandom_range(N-1)][$urandom_range(N-1)] = 1'b1;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < N; k++) if (!fault_map[k][j]) C[i][j] += 24'(A[i][k] * W[k][j]);
    end
    stationary <= 1;
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
    preload <= 1;
    for (int t = 0; t < N; t++) begin
      for (int f = 0; f < N; f++) w_top[f] <= W[N-1-t][f];
      @(posedge clk);
    end
    preload <= 0; w_top <= '0;
    for (int c = 0; c < 3 * N; c++) begin
      for (int f = 0; f < N; f++) a_left[f] <= (c - f >= 0 && c - f < N) ? A[c-f][f] : '0;
      #1;
      for (int j = 0; j < N; j++) begin
        int r;
        r = c - N - j - 1;
        if (r >= 0 && r < N)
          check(psum_bot[j] == C[r][j], $sformatf("WS O[%0d][%0d]=%0d exp %0d", r, j, psum_bot[j], C[r][j]));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
