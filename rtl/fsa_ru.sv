// fsa_ru: re-computing unit (RU) of the re-computing module.
//
// An RU recomputes the partial sum of one faulty PE at a time: in each of the
// N steps of a round it multiplies the activation and the weight of that PE
// (picked for it from the input buffer by the RU array) and accumulates the
// product. At the last step the finished sum, tagged with the PE's
// coordinates, moves into the RU's chain register while the MAC starts on the
// next faulty PE. Chain registers of neighbouring RUs form a shift path: each
// cycle an RU takes the entry of its upstream neighbour (`up_in`) and offers
// its own to the downstream one (`dn_out`); the last RU of the path writes the
// entries into the computing array. This is the MUX/DEMUX that chooses
// between keeping the local sum and passing data down the RU array.
// A faulty RU (`faulty`) is bypassed: `dn_out` is wired to `up_in`, and it is
// never given work. An RU with nothing to do keeps its registers still
// (`pwr_en` low), standing in for the power gating of unused RUs.
//
// Targets: the RCM buffer controller writes the next faulty PE into the
// shadow target (`disp_we`) during the current round; `load_tgt` makes it
// the working target. The separate accumulator and chain register, the
// shadow target and the clock-enable form of power gating are this design's
// choices.
module fsa_ru
  import fsa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       faulty,
  input  logic       disp_we,
  input  logic       disp_valid,
  input  fault_loc_t disp_loc,
  input  logic       load_tgt,
  input  logic       step_en,
  input  logic       first,
  input  logic       last,
  input  act_t       act,
  input  wgt_t       wgt,
  input  corr_t      up_in,
  output corr_t      dn_out,
  output fault_loc_t tgt_loc,
  output logic       pwr_en
);

  logic       tgt_valid, nxt_valid;
  fault_loc_t tgt, nxt;
  psum_t      acc, sum;
  corr_t      chain;

  assign sum = (first ? psum_t'(0) : acc) + PSUM_W'(act * wgt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_valid <= 1'b0;
      nxt       <= '0;
      tgt_valid <= 1'b0;
      tgt       <= '0;
    end else begin
      if (load_tgt) begin
        // a dispatch arriving in the same cycle goes straight to the target
        tgt_valid <= disp_we ? (disp_valid && !faulty) : nxt_valid;
        tgt       <= disp_we ? disp_loc : nxt;
        nxt_valid <= 1'b0;
      end else if (disp_we) begin
        nxt_valid <= disp_valid && !faulty;
        nxt       <= disp_loc;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           acc <= '0;
    else if (step_en && tgt_valid)        acc <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
    end else if (step_en && last) begin
      chain.valid <= tgt_valid;
      chain.x     <= tgt.x;
      chain.y     <= tgt.y;
      chain.value <= tgt_valid ? sum : psum_t'(0);
    end else if (chain.valid || up_in.valid) begin
      chain <= up_in;
    end
  end

  assign dn_out  = faulty ? up_in : chain;
  assign tgt_loc = tgt;
  assign pwr_en  = !faulty && (tgt_valid || nxt_valid || chain.valid);

endmodule
