// fsa_input_buffer: the activation buffer or the weight buffer, made of N
// fsa_input_fifo, one per row (activations) or per column (weights) of the
// computing array. With the default N = 256 FIFOs of DEPTH = 256 bytes it
// holds 64 KB, the size of each of the two input buffers.
//
// Loading: `push` appends `push_data[f]` to every FIFO f at once, so a tile
// of N x DEPTH operands loads in DEPTH cycles. Array feed: in step `ca_step`
// of a tile, FIFO f delivers its entry (ca_step - f), which produces the
// skew a systolic array needs; outside 0..DEPTH-1 it delivers zero. With
// `ca_rev` set (preload of a stationary operand in WS/IS) every FIFO instead
// delivers entry DEPTH-1-ca_step, last entry first, so that after DEPTH
// shifts down a column entry k sits in row k. RCM
// port: with `rcm_en`, every FIFO delivers its entry `rcm_step`, and the RCM
// picks the FIFOs of the faulty PEs from `rcm_data`.
// The broadside push and the skew made by read offsets are this design's
// choices.
module fsa_input_buffer #(
  parameter int unsigned N     = 256,
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned STEP_W = $clog2(3*DEPTH)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         push,
  input  logic [N-1:0][W-1:0]          push_data,
  input  logic                         ca_en,
  input  logic                         ca_rev,
  input  logic [STEP_W-1:0]            ca_step,
  output logic [N-1:0][W-1:0]          ca_data,
  input  logic                         rcm_en,
  input  logic [$clog2(DEPTH)-1:0]     rcm_step,
  output logic [N-1:0][W-1:0]          rcm_data,
  output logic                         full
);

  localparam int unsigned OW = $clog2(DEPTH);
  logic [N-1:0] fifo_full;

  for (genvar f = 0; f < N; f++) begin : g_fifo
    logic [STEP_W:0] off;
    logic            in_win;
    // a step before the FIFO's start wraps to a large offset and is rejected
    assign off    = ca_rev ? (STEP_W+1)'(DEPTH-1) - {1'b0, ca_step}
                           : {1'b0, ca_step} - (STEP_W+1)'(f);
    assign in_win = ca_en && (off < (STEP_W+1)'(DEPTH));
    fsa_input_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .push     (push),
      .wdata    (push_data[f]),
      .ca_en    (in_win),
      .ca_off   (off[OW-1:0]),
      .ca_data  (ca_data[f]),
      .rcm_en   (rcm_en),
      .rcm_off  (rcm_step),
      .rcm_data (rcm_data[f]),
      .full     (fifo_full[f])
    );
  end

  assign full = &fifo_full;

endmodule
