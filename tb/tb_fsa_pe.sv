// tb_fsa_pe: unit test of one output-stationary PE. Drives random operand
// streams and checks the one-cycle forwarding of activations and weights, the
// accumulation against a sum kept here, that a faulty PE keeps a zero partial
// sum, and the clear, correction and drain paths.
module tb_fsa_pe;
  import fsa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic faulty = 0, stationary = 0, preload = 0, clear = 0, drain = 0, corr_we = 0;
  act_t a_in = '0, a_out;
  wgt_t w_in = '0, w_out;
  psum_t psum_in = '0, corr_val = '0, psum_out;

  fsa_pe dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    psum_t exp_acc;
    act_t pa; wgt_t pw;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
    exp_acc = 0; pa = 0; pw = 0;
    for (int t = 0; t < 40; t++) begin
      act_t a; wgt_t w;
      a = 8'($urandom); w = 8'($urandom);
      a_in <= a; w_in <= w;
      @(posedge clk); #1;
      exp_acc += 24'(pa * pw);      // product of the values captured one cycle ago
      check(a_out == a && w_out == w, "operands forwarded after one cycle");
      check(psum_out == exp_acc, $sformatf("accumulate t=%0d got %0d exp %0d", t, psum_out, exp_acc));
      pa = a; pw = w;
    end
    // faulty PE: MAC eliminated, partial sum stays at zero after clear
    faulty <= 1; clear <= 1; @(posedge clk); clear <= 0;
    for (int t = 0; t < 10; t++) begin
      a_in <= 8'sd7; w_in <= 8'sd9; @(posedge clk); #1;
      check(psum_out == 0, "faulty PE partial sum stays zero");
      check(a_out == 8'sd7, "faulty PE still forwards activations");
    end
    // correction overwrites the register and is not disturbed afterwards
    corr_val <= 24'sd12345; corr_we <= 1; @(posedge clk); corr_we <= 0; #1;
    check(psum_out == 24'sd12345, "correction written");
    repeat (3) @(posedge clk); #1;
    check(psum_out == 24'sd12345, "corrected value held in faulty PE");
    // drain takes the partial sum from above
    a_in <= '0; w_in <= '0;
    psum_in <= -24'sd77; drain <= 1; @(posedge clk); #1;
    check(psum_out == -24'sd77, "drain shifts partial sum in");
    drain <= 0; faulty <= 0;
    // stationary mode
    stationary <= 1; preload <= 1; w_in <= 8'sd5; @(posedge clk);
    w_in <= -8'sd3; @(posedge clk); preload <= 0; #1;
    check(w_out == -8'sd3, "preload shifts the vertical register");
    for (int t = 0; t < 20; t++) begin
      act_t a;
      psum_t p;
      a = 8'($urandom);
      p = 24'($urandom_range(0, 100000));
      a_in <= a; w_in <= 8'($urandom); @(posedge clk);   // a captured
      psum_in <= p; faulty <= (t >= 15); @(posedge clk); #1;
      check(w_out == -8'sd3, "stationary operand held");
      check(psum_out == (t >= 15 ? p : p + 24'(a * -8'sd3)),
            $sformatf("stationary sum t=%0d got %0d", t, psum_out));
    end
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
