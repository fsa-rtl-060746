// tb_fsa_input_fifo: unit test of one input-buffer FIFO (depth 8). Checks
// that pushes land in order, that both read ports return entry `off` without
// consuming it, that reads beyond the stored data or with the enable low
// return zero, that the FIFO reports full and ignores pushes when full, and
// that clear empties it.
module tb_fsa_input_fifo;
  localparam int unsigned W = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, ca_en = 0, rcm_en = 0, full;
  logic [W-1:0] wdata = '0, ca_data, rcm_data;
  logic [$clog2(DEPTH)-1:0] ca_off = '0, rcm_off = '0;

  fsa_input_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] ref_q [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 2; rep++) begin
      int n;
      n = (rep == 0) ? 5 : DEPTH + 2;
      ref_q = {};
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      for (int i = 0; i < n; i++) begin
        logic [W-1:0] v;
        v = W'($urandom_range(1, 255));
        push <= 1; wdata <= v; @(posedge clk);
        if (ref_q.size() < DEPTH) ref_q.push_back(v);
      end
      push <= 0; @(posedge clk);
      check(full == (ref_q.size() == DEPTH), "full flag");
      for (int o = 0; o < DEPTH; o++) begin
        ca_en <= 1; rcm_en <= 1; ca_off <= o[$clog2(DEPTH)-1:0];
        rcm_off <= $clog2(DEPTH)'(DEPTH - 1 - o);
        #1;
        check(ca_data == (o < ref_q.size() ? ref_q[o] : '0), $sformatf("ca read off %0d", o));
        check(rcm_data == ((DEPTH-1-o) < ref_q.size() ? ref_q[DEPTH-1-o] : '0), "rcm read");
        @(posedge clk);
      end
      ca_en <= 0; rcm_en <= 0; #1;
      check(ca_data == '0 && rcm_data == '0, "disabled read returns zero");
      // reading again gives the same data: reads do not consume
      ca_en <= 1; ca_off <= '0; #1;
      check(ca_data == ref_q[0], "non-destructive read");
      ca_en <= 0;
    end
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0; ca_en <= 1; ca_off <= '0; #1;
    check(ca_data == '0 && !full, "clear empties the FIFO");
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
