// tb_fsa_output_buffer: unit test of an 8-bank output buffer: writes with a
// different address in every bank, as in the skewed WS/IS output, and
// same-address writes, as in the OS drain; then every entry is read back
// with one cycle of latency.
module tb_fsa_output_buffer;
  import fsa_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0] wr_en = '0;
  logic [N-1:0][$clog2(N)-1:0] wr_addr = '0;
  logic [$clog2(N)-1:0] rd_bank = '0, rd_addr = '0;
  psum_t [N-1:0] wr_data = '0;
  psum_t rd_data;

  fsa_output_buffer #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  psum_t M [N][N];   // [bank][addr]

  task automatic readback(input string what);
    for (int b = 0; b < N; b++) for (int a = 0; a < N; a++) begin
      rd_bank <= b[$clog2(N)-1:0]; rd_addr <= a[$clog2(N)-1:0];
      @(posedge clk); #1;
      checks++;
      if (rd_data != M[b][a]) begin failures++; $display("FAIL: %s bank %0d addr %0d", what, b, a); end
    end
  endtask

  initial begin
    @(posedge clk);
    // OS-style: every bank writes the same address
    for (int a = N - 1; a >= 0; a--) begin
      for (int b = 0; b < N; b++) begin
        M[b][a] = 24'($urandom); wr_data[b] <= M[b][a]; wr_addr[b] <= a[$clog2(N)-1:0];
      end
      wr_en <= '1; @(posedge clk);
    end
    wr_en <= '0;
    readback("row writes");
    // WS-style: bank b writes address c-b in cycle c
    for (int c = 0; c < 2 * N - 1; c++) begin
      for (int b = 0; b < N; b++) begin
        int a;
        a = c - b;
        wr_en[b] <= (a >= 0 && a < N);
        wr_addr[b] <= a[$clog2(N)-1:0];
        if (a >= 0 && a < N) begin M[b][a] = 24'($urandom); wr_data[b] <= M[b][a]; end
      end
      @(posedge clk);
    end
    wr_en <= '0;
    readback("skewed writes");
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
