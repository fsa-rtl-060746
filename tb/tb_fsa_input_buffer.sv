// tb_fsa_input_buffer: unit test of a buffer of 5 FIFOs of depth 5. After a
// broadside load, the array port must deliver the skewed pattern (FIFO f
// gives entry t-f in step t, zero outside the window), the reversed preload
// read (entry DEPTH-1-t) and the RCM port entry t of every FIFO.
module tb_fsa_input_buffer;
  localparam int unsigned N = 5, W = 8, DEPTH = 5, SW = $clog2(3*DEPTH);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, ca_en = 0, ca_rev = 0, rcm_en = 0, full;
  logic [N-1:0][W-1:0] push_data = '0, ca_data, rcm_data;
  logic [SW-1:0] ca_step = '0;
  logic [$clog2(DEPTH)-1:0] rcm_step = '0;

  fsa_input_buffer #(.N(N), .W(W), .DEPTH(DEPTH), .STEP_W(SW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] M [N][DEPTH];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
    for (int k = 0; k < DEPTH; k++) begin
      for (int f = 0; f < N; f++) begin M[f][k] = W'($urandom_range(1, 255)); push_data[f] <= M[f][k]; end
      push <= 1; @(posedge clk);
    end
    push <= 0; @(posedge clk); #1;
    check(full, "all FIFOs full");
    for (int t = 0; t < 3 * DEPTH; t++) begin
      ca_en <= 1; ca_step <= SW'(t); #1;
      for (int f = 0; f < N; f++)
        check(ca_data[f] == ((t - f >= 0 && t - f < DEPTH) ? M[f][t-f] : '0),
              $sformatf("skewed feed step %0d fifo %0d", t, f));
      @(posedge clk);
    end
    // reversed read for preloading
    for (int t = 0; t < DEPTH + 2; t++) begin
      ca_en <= 1; ca_rev <= 1; ca_step <= SW'(t); #1;
      for (int f = 0; f < N; f++)
        check(ca_data[f] == ((t < DEPTH) ? M[f][DEPTH-1-t] : '0), $sformatf("reverse step %0d fifo %0d", t, f));
      @(posedge clk);
    end
    ca_en <= 0; ca_rev <= 0;
    for (int t = 0; t < DEPTH; t++) begin
      rcm_en <= 1; rcm_step <= $clog2(DEPTH)'(t); #1;
      for (int f = 0; f < N; f++) check(rcm_data[f] == M[f][t], "rcm port");
      @(posedge clk);
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
