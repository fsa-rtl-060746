// tb_fsa_ru: unit test of one re-computing unit. A target is dispatched and
// loaded, N = 6 random operand pairs are accumulated, and the finished sum
// must appear, tagged with the target coordinates, on the downstream link
// right after the last step, then make way for upstream data. A second round
// checks that the MAC restarts from zero, and a faulty RU must pass its
// upstream link straight through and refuse work.
module tb_fsa_ru;
  import fsa_pkg::*;
  localparam int unsigned N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic faulty = 0, disp_we = 0, disp_valid = 0, load_tgt = 0, step_en = 0, first = 0, last = 0, pwr_en;
  fault_loc_t disp_loc = '0, tgt_loc;
  act_t act = '0;
  wgt_t wgt = '0;
  corr_t up_in = '0, dn_out;

  fsa_ru dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic round(input int x, input int y, input bit expect_work);
    psum_t s = 0;
    disp_we <= 1; disp_valid <= 1; disp_loc <= '{x: 16'(x), y: 16'(y)}; @(posedge clk);
    disp_we <= 0; disp_valid <= 0;
    load_tgt <= 1; @(posedge clk); load_tgt <= 0; #1;
    if (expect_work) check(tgt_loc.x == 16'(x) && tgt_loc.y == 16'(y) && pwr_en, "target loaded");
    else             check(!pwr_en, "faulty RU gated");
    for (int t = 0; t < N; t++) begin
      act_t a = 8'($urandom); wgt_t w = 8'($urandom);
      act <= a; wgt <= w; step_en <= 1; first <= (t == 0); last <= (t == N - 1);
      s += 24'(a * w);
      @(posedge clk);
    end
    step_en <= 0; first <= 0; last <= 0; #1;
    if (expect_work) begin
      check(dn_out.valid && dn_out.value == s && dn_out.x == 16'(x) && dn_out.y == 16'(y),
            $sformatf("result %0d exp %0d", dn_out.value, s));
      up_in <= '{valid: 1'b1, x: 16'd3, y: 16'd4, value: 24'sd99}; @(posedge clk); #1;
      check(dn_out.valid && dn_out.value == 24'sd99, "chain shifts upstream entry in");
      up_in <= '0; @(posedge clk); #1;
      check(!dn_out.valid, "chain empties");
    end else begin
      check(!dn_out.valid, "faulty RU produced nothing");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(!pwr_en && !dn_out.valid, "idle after reset");
    round(2, 5, 1);
    round(7, 1, 1);
    faulty <= 1;
    round(1, 1, 0);
    up_in <= '{valid: 1'b1, x: 16'd9, y: 16'd8, value: -24'sd5}; #1;
    check(dn_out == up_in, "faulty RU bypassed combinationally");
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
