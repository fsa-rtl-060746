// tb_fsa_fault_table: unit test of the fault detection table for an 8 x 8
// array. Reports random PEs (some twice, some out of range) and checks the
// count, the list order, the bitmap and clear.
module tb_fsa_fault_table;
  import fsa_pkg::*;
  localparam int unsigned N = 8, MAXF = N * N, AW = $clog2(MAXF);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, wr_en = 0;
  fault_loc_t wr_loc = '0, rd_loc;
  logic [AW-1:0] rd_addr = '0;
  logic [AW:0] count;
  logic [N-1:0][N-1:0] fault_map;

  fsa_fault_table #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  fault_loc_t lst [$];
  logic [N-1:0][N-1:0] m;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 2; rep++) begin
      lst = {}; m = '0;
      @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
      for (int i = 0; i < 30; i++) begin
        fault_loc_t l;
        l.x = 16'($urandom_range(N)); l.y = 16'($urandom_range(N));   // N is out of range
        wr_en <= 1; wr_loc <= l; @(posedge clk);
        if (l.x < N && l.y < N && !m[l.x][l.y]) begin m[l.x][l.y] = 1; lst.push_back(l); end
      end
      wr_en <= 0; @(posedge clk); #1;
      check(count == (AW+1)'(lst.size()), $sformatf("count %0d exp %0d", count, lst.size()));
      check(fault_map == m, "bitmap");
      foreach (lst[i]) begin
        rd_addr <= AW'(i); #1;
        check(rd_loc == lst[i], $sformatf("entry %0d", i));
        @(posedge clk);
      end
    end
    clear <= 1; @(posedge clk); clear <= 0; #1;
    check(count == 0 && fault_map == '0, "clear");
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
