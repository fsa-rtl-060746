// tb_fsa_rcm_ctrl: unit test of the RCM buffer controller with 3 RUs and
// N = 5. The testbench plays the fault table and the RU chain's busy flag.
// It checks that every round hands the table entries, in order, to the
// healthy RUs only, that each round has N steps numbered 0..N-1 with first
// and last marked, that the number of rounds is ceil(K/n), and that done
// follows the moment the chain becomes empty.
module tb_fsa_rcm_ctrl;
  import fsa_pkg::*;
  localparam int unsigned N = 5, N_RU = 3, MAXF = N * N, AW = $clog2(MAXF);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prep = 0, start = 0, ready, busy, done, rcm_pwr_en;
  logic [AW:0] fault_count = '0;
  logic [AW-1:0] ft_rd_addr;
  fault_loc_t ft_rd_loc;
  logic [N_RU-1:0] ru_faulty = '0;
  logic disp_we, disp_valid, load_tgt, step_en, first, last;
  logic [$clog2(N_RU+1)-1:0] disp_idx;
  fault_loc_t disp_loc;
  logic [$clog2(N)-1:0] rcm_step;
  logic any_valid = 0;

  fsa_rcm_ctrl #(.N(N), .N_RU(N_RU)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  fault_loc_t tbl [MAXF];
  assign ft_rd_loc = tbl[ft_rd_addr];

  // dispatch log: which table entry each RU received in each round
  int disp_log [$];
  always @(posedge clk) if (disp_we && disp_valid) disp_log.push_back(int'(disp_idx) * 1000 + int'(disp_loc.x));

  task automatic run(input int k, input logic [N_RU-1:0] bad);
    int h, r, steps, rounds, cyc, exp_step, rdy;
    int exp_log [$];
    h = N_RU - $countones(bad);
    r = (k + h - 1) / h;
    fault_count <= (AW+1)'(k); ru_faulty <= bad;
    repeat (N_RU + 2) @(posedge clk);
    disp_log = {};
    prep <= 1; @(posedge clk); prep <= 0;
    rdy = 0;
    while (!ready) begin @(posedge clk); rdy++; end
    // expected: entries in order, to healthy RUs, round after round
    begin
      int e = 0;
      while (e < k) for (int u = 0; u < N_RU; u++) if (!bad[u] && e < k) begin
        exp_log.push_back(u * 1000 + e); e++;
      end
    end
    start <= 1; @(posedge clk); start <= 0;
    steps = 0; rounds = 0; exp_step = 0; cyc = 0;
    while (busy || cyc == 0) begin
      #1;
      if (step_en) begin
        check(int'(rcm_step) == exp_step && first == (exp_step == 0) && last == (exp_step == N - 1), "step numbering");
        steps++;
        if (last) begin rounds++; exp_step = 0; end else exp_step++;
      end
      // model of the RU chain: results take h cycles to leave after the last round
      any_valid <= (rounds == r) && !step_en && (cyc < r * N + h + 1);
      @(posedge clk); cyc++;
      if (cyc > 200) break;
    end
    check(rounds == r && steps == r * N, $sformatf("K=%0d: %0d rounds %0d steps, expected %0d rounds", k, rounds, steps, r));
    check(disp_log.size() >= exp_log.size(), "dispatch count");
    foreach (exp_log[i]) check(i < disp_log.size() && disp_log[i] == exp_log[i],
                               $sformatf("dispatch %0d: got %0d exp %0d", i, (i < disp_log.size()) ? disp_log[i] : -1, exp_log[i]));
    any_valid <= 0;
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < MAXF; i++) tbl[i] = '{x: 16'(i), y: 16'(i % N)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(7, 3'b000);
    run(4, 3'b010);
    run(3, 3'b000);
    run(9, 3'b100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
