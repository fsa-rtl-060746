// fsa_output_buffer: on-chip output buffer of the accelerator.
//
// It holds one N x N tile of 24-bit results: with the default N = 256 that
// is 256 x 256 x 3 bytes = 192 KB, the published output-buffer size. It is
// organised as N banks, one per column of the computing array, each with its
// own write port, because the columns deliver their results at different
// times: in the OS drain all banks write the same row in a cycle, while in
// WS/IS column j writes result r in cycle r + N + j + 1.
// The host reads one result, bank `rd_bank` entry `rd_addr`, with the data
// one cycle later. The bank organisation and the one-cycle read are this
// design's choices.
module fsa_output_buffer
  import fsa_pkg::*;
#(
  parameter int unsigned N = 256
) (
  input  logic                            clk,
  input  logic  [N-1:0]                   wr_en,
  input  logic  [N-1:0][$clog2(N)-1:0]    wr_addr,
  input  psum_t [N-1:0]                   wr_data,
  input  logic  [$clog2(N)-1:0]           rd_bank,
  input  logic  [$clog2(N)-1:0]           rd_addr,
  output psum_t                           rd_data
);

  psum_t [N-1:0] rd_word;

  for (genvar b = 0; b < N; b++) begin : g_bank
    psum_t mem [N];
    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_addr[b]] <= wr_data[b];
    end
    assign rd_word[b] = mem[rd_addr];
  end

  always_ff @(posedge clk) rd_data <= rd_word[rd_bank];

endmodule
