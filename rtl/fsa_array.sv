// fsa_array: the central computing array (CA), an N x N systolic array of
// fsa_pe that runs output stationary (OS), weight stationary (WS) or input
// stationary (IS).
//
// Row i receives an operand stream on its left edge and column j one on its
// top edge; both move one PE per cycle.
// OS (`stationary` low): with skewed inputs (row i starting i cycles late,
// column j starting j cycles late) PE(i,j) ends up holding
// sum_k A[i][k] * W[k][j]. A K=N product takes 3N-1 cycles from the first
// input to the last accumulation; `drain` then shifts the columns down, and
// `psum_bot` shows one row of results per cycle, bottom row first.
// WS/IS (`stationary` high): N cycles of `preload` shift one value into every
// PE from the top (the first value fed ends in the bottom row). Then the left
// edge streams skewed rows and the partial sums flow down the columns:
// column j delivers, on `psum_bot[j]`, the dot product of the stationary
// column with input vector r in cycle r + N + j + 1 of the compute phase.
//
// `fault_map[i][j]` marks PE(i,j) faulty (its MAC is cut out and its partial
// sum stays zero). The correction port writes a recomputed partial sum into
// the register of PE(corr.x, corr.y); the row and column decoders are shared
// by all PEs. Everything here follows the published architecture except the
// correction port's form (a broadcast value with row/column select), which is
// this design's choice.
module fsa_array
  import fsa_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0][N-1:0]     fault_map,   // [row][col]
  input  logic                    stationary,  // 0: OS, 1: WS or IS
  input  logic                    preload,
  input  logic                    clear,
  input  logic                    drain,
  input  act_t  [N-1:0]           a_left,      // one per row
  input  wgt_t  [N-1:0]           w_top,       // one per column
  input  corr_t                   corr,
  output psum_t [N-1:0]           psum_bot     // one per column
);

  act_t  a_h [N][N+1];
  wgt_t  w_v [N+1][N];
  psum_t p_v [N+1][N];
  logic [N-1:0] row_hit, col_hit;

  always_comb begin
    for (int unsigned r = 0; r < N; r++) row_hit[r] = corr.valid && (corr.x == 16'(r));
    for (int unsigned c = 0; c < N; c++) col_hit[c] = (corr.y == 16'(c));
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    assign a_h[i][0] = a_left[i];
    for (genvar j = 0; j < N; j++) begin : g_col
      if (i == 0) begin : g_top
        assign w_v[0][j] = w_top[j];
        assign p_v[0][j] = '0;
      end
      fsa_pe u_pe (
        .clk      (clk),
        .rst_n    (rst_n),
        .faulty   (fault_map[i][j]),
        .stationary (stationary),
        .preload  (preload),
        .clear    (clear),
        .drain    (drain),
        .a_in     (a_h[i][j]),
        .w_in     (w_v[i][j]),
        .psum_in  (p_v[i][j]),
        .corr_we  (row_hit[i] & col_hit[j]),
        .corr_val (corr.value),
        .a_out    (a_h[i][j+1]),
        .w_out    (w_v[i+1][j]),
        .psum_out (p_v[i+1][j])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    assign psum_bot[j] = p_v[N][j];
  end

endmodule
