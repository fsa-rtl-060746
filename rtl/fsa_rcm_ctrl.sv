// fsa_rcm_ctrl: RCM buffer controller.
//
// It walks the fault detection table and hands faulty PEs to healthy RUs, then
// streams the operands of those PEs from the input buffer to the RU array.
//
// Dispatch: one RU per cycle, RU 0 first. A healthy RU gets the next entry of
// the fault table (its row x selects an activation FIFO, its column y a
// weight FIFO); a faulty RU, or any RU once the table is used up, gets
// nothing. The first round is dispatched ahead of time (`prep`, and again
// after every run), the later rounds during the round before, so dispatch
// adds no time when N_RU <= N.
// Rounds: after `start`, each round takes N steps; in step t every FIFO
// delivers its entry t (`rcm_step`) and each active RU multiplies and
// accumulates. At the last step the results enter the RU chain and the next
// round begins at once if it has work, so results of one round shift out
// while the next is computed. With K faults and n healthy RUs this takes
// N*ceil(K/n) cycles plus the shift-out of the last round (K mod n cycles,
// or n if K divides evenly), which is the published latency model.
// `done` pulses when the last correction has left the chain; `ready` says a
// run can start. `rcm_pwr_en` is low when the table is empty, where the whole
// module may be power-gated.
// How dispatch is spread over time, and the handshake, are this design's
// choices.
module fsa_rcm_ctrl
  import fsa_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned N_RU       = 256,
  parameter int unsigned MAX_FAULTS = N * N,
  parameter int unsigned AW         = $clog2(MAX_FAULTS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       prep,
  input  logic                       start,
  output logic                       ready,
  output logic                       busy,
  output logic                       done,
  output logic                       rcm_pwr_en,
  input  logic [AW:0]                fault_count,
  output logic [AW-1:0]              ft_rd_addr,
  input  fault_loc_t                 ft_rd_loc,
  input  logic [N_RU-1:0]            ru_faulty,
  output logic                       disp_we,
  output logic [$clog2(N_RU+1)-1:0]  disp_idx,
  output logic                       disp_valid,
  output fault_loc_t                 disp_loc,
  output logic                       load_tgt,
  output logic                       step_en,
  output logic                       first,
  output logic                       last,
  output logic [$clog2(N)-1:0]       rcm_step,
  input  logic                       any_valid
);

  typedef enum logic [1:0] {S_PREP, S_READY, S_RUN, S_FLUSH} state_t;
  localparam int unsigned DW = $clog2(N_RU+1);

  state_t         state;
  logic [AW:0]    fptr;        // next fault table entry to hand out
  logic [DW-1:0]  didx;        // next RU to dispatch
  logic           dispatching;
  logic           nxt_work;    // the round being dispatched has a fault
  logic           nxt_has_work;
  logic           redo;        // restart dispatch from the first table entry
  logic           go_on;       // start dispatching the round after the next
  logic [$clog2(N)-1:0] step;

  initial assert (N_RU <= N) else $error("fsa_rcm_ctrl: N_RU must not exceed N");

  assign ft_rd_addr   = fptr[AW-1:0];
  assign disp_we      = dispatching;
  assign disp_idx     = didx;
  assign disp_valid   = dispatching && !ru_faulty[didx[$clog2(N_RU)-1:0]]
                        && (fptr < fault_count);
  assign disp_loc     = ft_rd_loc;
  assign nxt_has_work = nxt_work || disp_valid;

  assign step_en    = (state == S_RUN);
  assign rcm_step   = step;
  assign first      = (step == '0);
  assign last       = (step == ($clog2(N))'(N-1));
  assign load_tgt   = (state == S_READY && start && nxt_work)
                   || (state == S_RUN && last);
  assign ready      = (state == S_READY) && !prep;
  assign busy       = (state == S_RUN) || (state == S_FLUSH);
  assign rcm_pwr_en = (fault_count != '0);

  assign redo  = prep
              || (state == S_READY && start && !nxt_work)
              || (state == S_FLUSH && !any_valid);
  assign go_on = (state == S_READY && start && nxt_work)
              || (state == S_RUN && last && nxt_has_work);

  // dispatch engine: one RU per cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dispatching <= 1'b1;
      didx        <= '0;
      fptr        <= '0;
      nxt_work    <= 1'b0;
    end else if (redo) begin
      dispatching <= 1'b1;
      didx        <= '0;
      fptr        <= '0;
      nxt_work    <= 1'b0;
    end else begin
      if (disp_valid) fptr <= fptr + 1'b1;
      if (dispatching) begin
        didx <= didx + 1'b1;
        if (disp_valid) nxt_work <= 1'b1;
        if (didx == DW'(N_RU-1)) dispatching <= 1'b0;
      end
      if (go_on) begin
        dispatching <= 1'b1;
        didx        <= '0;
        nxt_work    <= 1'b0;
      end
    end
  end

  // round sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_PREP;
      step  <= '0;
      done  <= 1'b0;
    end else begin
      // Handshake rule: start is only given while `ready`.
      a_start_when_ready: assert (!start || ready)
        else $error("fsa_rcm_ctrl: start while not ready");
      done <= 1'b0;
      if (prep) begin
        state <= S_PREP;
      end else begin
        unique case (state)
          S_PREP:  if (!dispatching) state <= S_READY;
          S_READY: if (start) begin
            step <= '0;
            if (nxt_work) state <= S_RUN;
            else begin
              done  <= 1'b1;
              state <= S_PREP;
            end
          end
          S_RUN: begin
            step <= step + 1'b1;
            if (last) begin
              step <= '0;
              if (!nxt_has_work) state <= S_FLUSH;
            end
          end
          S_FLUSH: if (!any_valid) begin
            done  <= 1'b1;
            state <= S_PREP;
          end
          default: state <= S_PREP;
        endcase
      end
    end
  end

endmodule
