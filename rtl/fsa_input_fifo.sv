// fsa_input_fifo: one FIFO of the on-chip input buffer.
//
// Every row of the computing array has its own activation FIFO and every
// column its own weight FIFO. The off-chip loader appends one operand per
// `push`. Two readers use the stored data of a tile: the array edge feeder and
// the RCM buffer controller, which fetches the same operands again for a
// faulty PE. Both read by position from the oldest entry (`ca_off`,
// `rcm_off`), so reading does not consume data; `clear` empties the FIFO once
// the tile is finished. A read past the stored data, or with its enable low,
// returns zero so the array can be fed zeros outside the skew window.
//
// The published design only says the buffer is built from FIFOs assigned to
// rows and columns and that the RCM reads them directly; the two
// non-destructive read ports and the clear are this design's choices.
// Reads are combinational; a push is visible in the next cycle.
module fsa_input_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  logic [W-1:0]             wdata,
  input  logic                     ca_en,
  input  logic [$clog2(DEPTH)-1:0] ca_off,
  output logic [W-1:0]             ca_data,
  input  logic                     rcm_en,
  input  logic [$clog2(DEPTH)-1:0] rcm_off,
  output logic [W-1:0]             rcm_data,
  output logic                     full
);

  logic [W-1:0]           mem [DEPTH];
  logic [$clog2(DEPTH):0] count;

  always_ff @(posedge clk) begin
    if (push && !full) mem[count[$clog2(DEPTH)-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (clear)          count <= '0;
    else if (push && !full)  count <= count + 1'b1;
  end

  assign full = (count == ($clog2(DEPTH)+1)'(DEPTH));

  always_comb begin
    ca_data  = (ca_en  && ({1'b0, ca_off}  < count)) ? mem[ca_off]  : '0;
    rcm_data = (rcm_en && ({1'b0, rcm_off} < count)) ? mem[rcm_off] : '0;
  end

endmodule
