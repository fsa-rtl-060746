// fsa_ru_array: the RU array of the re-computing module, N_RU fsa_ru in a
// chain, with the data bus that gives each RU its operands.
//
// Data bus: every step, the RCM buffer controller reads one entry of every
// activation FIFO (`act_vec`) and every weight FIFO (`wgt_vec`). RU k takes
// the activation of its faulty PE's row and the weight of its column, so one
// FIFO value can go to many RUs at once (multicast) or to one (unicast).
// Chain: results move from RU k+1 to RU k; RU 0 drives `corr`, one corrected
// partial sum per cycle, into the computing array. `any_valid` is high while
// a result is still on its way. Faulty RUs (`ru_faulty`) are bypassed.
// The direction of the chain and the operand muxes are this design's choices.
module fsa_ru_array
  import fsa_pkg::*;
#(
  parameter int unsigned N    = 256,
  parameter int unsigned N_RU = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_RU-1:0]            ru_faulty,
  input  logic                       disp_we,
  input  logic [$clog2(N_RU+1)-1:0]  disp_idx,
  input  logic                       disp_valid,
  input  fault_loc_t                 disp_loc,
  input  logic                       load_tgt,
  input  logic                       step_en,
  input  logic                       first,
  input  logic                       last,
  input  act_t  [N-1:0]              act_vec,
  input  wgt_t  [N-1:0]              wgt_vec,
  output corr_t                      corr,
  output logic                       any_valid,
  output logic [N_RU-1:0]            pwr_en
);

  corr_t      link [N_RU+1];   // link[k] enters RU k-1 from RU k
  logic [N_RU-1:0] chain_busy;

  assign link[N_RU] = '0;

  for (genvar k = 0; k < N_RU; k++) begin : g_ru
    fault_loc_t loc;
    corr_t      dn;
    fsa_ru u_ru (
      .clk        (clk),
      .rst_n      (rst_n),
      .faulty     (ru_faulty[k]),
      .disp_we    (disp_we && (disp_idx == ($clog2(N_RU+1))'(k))),
      .disp_valid (disp_valid),
      .disp_loc   (disp_loc),
      .load_tgt   (load_tgt),
      .step_en    (step_en),
      .first      (first),
      .last       (last),
      .act        (act_vec[loc.x[$clog2(N)-1:0]]),
      .wgt        (wgt_vec[loc.y[$clog2(N)-1:0]]),
      .up_in      (link[k+1]),
      .dn_out     (dn),
      .tgt_loc    (loc),
      .pwr_en     (pwr_en[k])
    );
    assign link[k]       = dn;
    assign chain_busy[k] = dn.valid;
  end

  assign corr      = link[0];
  assign any_valid = |chain_busy;

endmodule
