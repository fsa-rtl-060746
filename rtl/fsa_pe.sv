// fsa_pe: processing element of the computing array.
//
// Each PE holds a horizontal operand register, a vertical operand register
// and a partial-sum register, plus a multiply-accumulate (MAC) unit. It runs
// in one of two ways, chosen by `stationary`:
//  - Output stationary (OS): an activation arriving from the left and a weight
//    arriving from above are captured in the current cycle; in the next cycle
//    they are multiplied into the local partial sum and, at the same time,
//    passed to the right and downward. The partial sum stays in the PE until
//    the array has finished, then `drain` shifts each column's partial sums
//    down one row per cycle towards the output buffer.
//  - Weight or input stationary (WS/IS): during `preload` the vertical
//    register shifts values down the column; afterwards it holds its value
//    (a weight for WS, an activation for IS). The operand streaming in from
//    the left is multiplied by it and added to the partial sum arriving from
//    above, and the sum moves on to the PE below in the next cycle.
//
// Fault handling follows the FSA scheme: when `faulty` is set the MAC is cut
// out. In OS the partial sum then stays at the zero it was cleared to; in
// WS/IS the PE passes the partial sum from above unchanged, so it adds zero.
// The operand registers keep forwarding data, so the rest of the array stays
// in step. In OS, the re-computing module later overwrites the partial sum
// with the correct value through `corr_we` / `corr_val`.
//
// Timing: one cycle per hop for operands and partial sums. Register
// priorities: `clear`, then `corr_we`, then `drain`, then the MAC. These
// priorities and the single correction port are this design's choices.
module fsa_pe
  import fsa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  faulty,     // MAC eliminated
  input  logic  stationary, // 0: OS, 1: WS or IS
  input  logic  preload,    // WS/IS: shift the stationary operand down the column
  input  logic  clear,      // start of a new tile: partial sum <= 0
  input  logic  drain,      // OS: shift partial sums down the column
  input  act_t  a_in,       // from the left neighbour (or the edge FIFO)
  input  wgt_t  w_in,       // from the neighbour above (or the edge FIFO)
  input  psum_t psum_in,    // partial sum of the PE above
  input  logic  corr_we,    // overwrite the partial sum with a recomputed value
  input  psum_t corr_val,
  output act_t  a_out,
  output wgt_t  w_out,
  output psum_t psum_out
);

  act_t  a_r;
  wgt_t  w_r;
  psum_t acc, prod;

  assign prod = faulty ? psum_t'(0) : PSUM_W'(a_r * w_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0;
      w_r <= '0;
    end else begin
      a_r <= a_in;
      if (!stationary || preload) w_r <= w_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          acc <= '0;
    else if (clear)      acc <= '0;
    else if (corr_we)    acc <= corr_val;
    else if (drain)      acc <= psum_in;
    else if (stationary) acc <= psum_in + prod;
    else                 acc <= acc + prod;
  end

  assign a_out    = a_r;
  assign w_out    = w_r;
  assign psum_out = acc;

endmodule
