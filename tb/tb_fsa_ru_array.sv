// tb_fsa_ru_array: unit test of an array of 3 RUs on a 4-wide buffer. Each
// RU is given a faulty PE, the operand vectors of N steps are applied, and
// the corrections must leave RU 0 on consecutive cycles in RU order with
// the right dot products. Repeated with the middle RU faulty, which must be
// skipped by the chain.
module tb_fsa_ru_array;
  import fsa_pkg::*;
  localparam int unsigned N = 4, N_RU = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N_RU-1:0] ru_faulty = '0, pwr_en;
  logic disp_we = 0, disp_valid = 0, load_tgt = 0, step_en = 0, first = 0, last = 0, any_valid;
  logic [$clog2(N_RU+1)-1:0] disp_idx = '0;
  fault_loc_t disp_loc = '0;
  act_t [N-1:0] act_vec = '0;
  wgt_t [N-1:0] wgt_vec = '0;
  corr_t corr;

  fsa_ru_array #(.N(N), .N_RU(N_RU)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic signed [7:0] A [N][N], W [N][N];

  task automatic run(input logic [N_RU-1:0] bad);
    fault_loc_t tg [N_RU];
    psum_t exp_v [$];
    fault_loc_t exp_l [$];
    ru_faulty <= bad;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      A[i][j] = 8'($urandom); W[i][j] = 8'($urandom);
    end
    for (int k = 0; k < N_RU; k++) begin
      tg[k].x = 16'($urandom_range(N-1)); tg[k].y = 16'($urandom_range(N-1));
      disp_we <= 1; disp_idx <= ($clog2(N_RU+1))'(k); disp_valid <= 1; disp_loc <= tg[k];
      @(posedge clk);
      if (!bad[k]) begin
        psum_t s = 0;
        for (int t = 0; t < N; t++) s += 24'(A[tg[k].x][t] * W[t][tg[k].y]);
        exp_v.push_back(s); exp_l.push_back(tg[k]);
      end
    end
    disp_we <= 0; load_tgt <= 1; @(posedge clk); load_tgt <= 0;
    for (int t = 0; t < N; t++) begin
      for (int f = 0; f < N; f++) begin act_vec[f] <= A[f][t]; wgt_vec[f] <= W[t][f]; end
      step_en <= 1; first <= (t == 0); last <= (t == N - 1);
      @(posedge clk);
    end
    step_en <= 0; first <= 0; last <= 0;
    foreach (exp_v[i]) begin
      #1;
      check(corr.valid && corr.value == exp_v[i] && corr.x == exp_l[i].x && corr.y == exp_l[i].y,
            $sformatf("correction %0d: got %0d exp %0d", i, corr.value, exp_v[i]));
      @(posedge clk);
    end
    #1;
    check(!corr.valid && !any_valid, "chain empty after shift-out");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run('0);
    run(3'b010);
    run(3'b001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
