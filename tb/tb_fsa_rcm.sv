// tb_fsa_rcm: test of the re-computing module on the 4 x 4 example with two
// RUs: faulty PEs (1,1), (2,1), (0,2) and (0,3), so that the first two share
// the weights of column 1. The testbench plays the fault table and the input
// FIFOs. Every correction must carry the right coordinates and dot product,
// the RUs must cover the PEs in table order, and the run must take
// N*ceil(K/n) + m + 1 cycles from start to done (m: corrections in the last
// round). Further runs use 3 faults (K not a multiple of n), no faults (the
// module is gated and reports done right after start) and a faulty RU.
module tb_fsa_rcm;
  import fsa_pkg::*;
  localparam int unsigned N = 4, N_RU = 2, MAXF = N * N, AW = $clog2(MAXF);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prep = 0, start = 0, ready, busy, done, rcm_pwr_en, rcm_en;
  logic [N_RU-1:0] ru_faulty = '0, ru_pwr_en;
  logic [AW:0] fault_count = '0;
  logic [AW-1:0] ft_rd_addr;
  fault_loc_t ft_rd_loc;
  logic [$clog2(N)-1:0] rcm_step;
  act_t [N-1:0] act_vec;
  wgt_t [N-1:0] wgt_vec;
  corr_t corr;

  fsa_rcm #(.N(N), .N_RU(N_RU)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] A [N][N], W [N][N];
  fault_loc_t tbl [MAXF];
  assign ft_rd_loc = tbl[ft_rd_addr];
  always_comb for (int f = 0; f < N; f++) begin
    act_vec[f] = rcm_en ? A[f][rcm_step] : '0;
    wgt_vec[f] = rcm_en ? W[rcm_step][f] : '0;
  end

  task automatic run(input int k, input logic [N_RU-1:0] bad, input string name);
    int cyc, seen, h, r, m;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      A[i][j] = 8'($urandom); W[i][j] = 8'($urandom);
    end
    fault_count <= (AW+1)'(k); ru_faulty <= bad;
    @(posedge clk); prep <= 1; @(posedge clk); prep <= 0;
    while (!ready) @(posedge clk);
    #1;
    check(rcm_pwr_en == (k != 0), "RCM power enable");
    h = N_RU - $countones(bad);
    r = (k + h - 1) / h;
    m = (k % h == 0) ? h : k % h;
    start <= 1; @(posedge clk); start <= 0;
    cyc = 0; seen = 0;
    #1;
    while (!done) begin
      if (corr.valid) begin
        psum_t s = 0;
        for (int t = 0; t < N; t++) s += 24'(A[tbl[seen].x][t] * W[t][tbl[seen].y]);
        check(seen < k && corr.x == tbl[seen].x && corr.y == tbl[seen].y && corr.value == s,
              $sformatf("%s: correction %0d (%0d,%0d)=%0d exp %0d", name, seen, corr.x, corr.y, corr.value, s));
        seen++;
      end
      @(posedge clk); #1; cyc++;
    end
    check(seen == k, $sformatf("%s: %0d corrections for %0d faults", name, seen, k));
    if (k == 0) check(cyc == 0, $sformatf("%s: finished in %0d cycles", name, cyc));
    else check(cyc == r * N + m + 1, $sformatf("%s: %0d cycles, expected %0d", name, cyc, r * N + m + 1));
  endtask

  initial begin
    tbl[0] = '{x: 16'd1, y: 16'd1};
    tbl[1] = '{x: 16'd2, y: 16'd1};
    tbl[2] = '{x: 16'd0, y: 16'd2};
    tbl[3] = '{x: 16'd0, y: 16'd3};
    for (int i = 4; i < MAXF; i++) tbl[i] = '{x: 16'(i % N), y: 16'(i / N)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(4, 2'b00, "K=4 n=2");
    run(3, 2'b00, "K=3 n=2");
    run(0, 2'b00, "K=0");
    run(3, 2'b01, "K=3, RU0 faulty");
    run(16, 2'b00, "K=16");
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
