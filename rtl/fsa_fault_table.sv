// fsa_fault_table: fault detection table filled by the built-in self-test.
//
// The self-test reports each faulty PE by its row (x) and column (y). The
// table keeps two views of the same information: a list of coordinates,
// read one entry at a time by the RCM buffer controller (`rd_addr` ->
// `rd_loc`, combinational), and a bitmap with one bit per PE that disables
// the MAC of the faulty PEs in the computing array. A PE reported twice is
// stored once. `clear` empties both views. The list can hold every PE of
// the array, so any number and placement of faults is covered.
// The published design names the table and its content; the two views, the
// duplicate filter and the write port are this design's choices.
module fsa_fault_table
  import fsa_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned MAX_FAULTS = N * N,
  parameter int unsigned AW         = $clog2(MAX_FAULTS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 wr_en,
  input  fault_loc_t           wr_loc,
  input  logic [AW-1:0]        rd_addr,
  output fault_loc_t           rd_loc,
  output logic [AW:0]          count,
  output logic [N-1:0][N-1:0]  fault_map
);

  fault_loc_t list [MAX_FAULTS];
  logic       accept;

  assign accept = wr_en && (wr_loc.x < 16'(N)) && (wr_loc.y < 16'(N))
               && !fault_map[wr_loc.x[$clog2(N)-1:0]][wr_loc.y[$clog2(N)-1:0]]
               && (count < (AW+1)'(MAX_FAULTS));

  always_ff @(posedge clk) begin
    if (accept) list[count[AW-1:0]] <= wr_loc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int r = 0; r < N; r++) fault_map[r] <= '0;
    end else if (clear) begin
      count <= '0;
      for (int r = 0; r < N; r++) fault_map[r] <= '0;
    end else if (accept) begin
      count <= count + 1'b1;
      fault_map[wr_loc.x[$clog2(N)-1:0]][wr_loc.y[$clog2(N)-1:0]] <= 1'b1;
    end
  end

  assign rd_loc = list[rd_addr];

endmodule
