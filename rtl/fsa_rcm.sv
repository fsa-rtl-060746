// fsa_rcm: the re-computing module (RCM), the RCM buffer controller plus the
// RU array.
//
// While the computing array runs a tile, the RCM recomputes, from the same
// input-buffer FIFOs, the partial sums that the faulty PEs should have
// produced, and writes them into those PEs' registers (`corr`) before the
// array drains. Operands are read straight from the FIFO of the faulty PE's
// row and column, so they do not have to cross the array.
// Interface: `rcm_en`/`rcm_step` read one entry of every FIFO; `act_vec` and
// `wgt_vec` return them combinationally. `start` begins a run (it must find
// `ready` high); `done` pulses when every correction has been written.
// See fsa_rcm_ctrl and fsa_ru_array for the timing.
module fsa_rcm
  import fsa_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned N_RU       = 256,
  parameter int unsigned MAX_FAULTS = N * N,
  parameter int unsigned AW         = $clog2(MAX_FAULTS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  prep,
  input  logic                  start,
  output logic                  ready,
  output logic                  busy,
  output logic                  done,
  output logic                  rcm_pwr_en,
  input  logic [N_RU-1:0]       ru_faulty,
  input  logic [AW:0]           fault_count,
  output logic [AW-1:0]         ft_rd_addr,
  input  fault_loc_t            ft_rd_loc,
  output logic                  rcm_en,
  output logic [$clog2(N)-1:0]  rcm_step,
  input  act_t  [N-1:0]         act_vec,
  input  wgt_t  [N-1:0]         wgt_vec,
  output corr_t                 corr,
  output logic [N_RU-1:0]       ru_pwr_en
);

  logic                      disp_we, disp_valid, load_tgt, step_en, first, last, any_valid;
  logic [$clog2(N_RU+1)-1:0] disp_idx;
  fault_loc_t                disp_loc;

  fsa_rcm_ctrl #(.N(N), .N_RU(N_RU), .MAX_FAULTS(MAX_FAULTS), .AW(AW)) u_ctrl (
    .clk, .rst_n, .prep, .start, .ready, .busy, .done, .rcm_pwr_en,
    .fault_count, .ft_rd_addr, .ft_rd_loc, .ru_faulty,
    .disp_we, .disp_idx, .disp_valid, .disp_loc, .load_tgt,
    .step_en, .first, .last, .rcm_step, .any_valid
  );

  fsa_ru_array #(.N(N), .N_RU(N_RU)) u_rus (
    .clk, .rst_n, .ru_faulty,
    .disp_we, .disp_idx, .disp_valid, .disp_loc, .load_tgt,
    .step_en, .first, .last, .act_vec, .wgt_vec,
    .corr, .any_valid, .pwr_en (ru_pwr_en)
  );

  assign rcm_en = step_en;

endmodule
