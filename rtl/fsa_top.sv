// fsa_top: FSA, a fault-tolerant systolic-array DNN accelerator.
//
// An N x N systolic computing array (CA) multiplies an N x N activation tile
// A by an N x N weight tile W, output stationary (OS), weight stationary (WS)
// or input stationary (IS). Operands come from an activation buffer and a
// weight buffer of N FIFOs each, and the results go to the output buffer. PEs found faulty by the built-in
// self-test are listed in the fault detection table; their MACs are switched
// off so their partial sums stay zero and the rest of the array runs
// undisturbed. In parallel the re-computing module (RCM) reads the row and
// column FIFOs of each faulty PE, recomputes its dot product in one of N_RU
// re-computing units (RUs) and writes the result into that PE's register.
// The drain waits until the RCM is finished, so the output is exact for any
// number and placement of faulty PEs; the wait only costs time when there
// are more faults than the RUs can cover while the array computes.
//
// The recomputation is built for the OS dataflow only; in WS and IS a faulty
// PE adds nothing to the partial sums passing through it and the results
// lack its products.
//
// Use: write faulty PEs through the bist_* port (the self-test itself is
// outside this design) and pulse bist_done; mark faulty RUs in ru_faulty.
// Push N entries into every FIFO (push k writes element f of the push data
// into FIFO f):
//   OS: act_push_data[i] = A[i][k], wgt_push_data[j] = W[k][j]
//   WS: act_push_data[k] = A[r][k] in push r, wgt_push_data[j] = W[k][j]
//   IS: act_push_data[r] = A[r][k] in push k, wgt_push_data[k] = W[k][j] in push j
// Select `dataflow` and pulse `start` while `ready`; `done` pulses when
// C = A x W is in the output buffer, read C[i][j] through out_rd_row = i,
// out_rd_col = j with one cycle of latency. Pulse buf_clear before loading
// the next tile.
// Timing, OS: the start cycle, 3N-1 compute cycles, `stall` cycles while the
// RCM still works, then N drain cycles: 4N-1 cycles from start to done
// without a stall. WS/IS: N preload cycles and 3N compute cycles, during
// which column j writes result r in compute cycle r + N + j + 1: 4N cycles.
// Defaults follow the published configuration: a 256 x 256 array, 256 RUs,
// 64 KB activation and weight buffers and a 192 KB output buffer. The
// sequencing, the operand layouts and the host interface are this design's
// own.
module fsa_top
  import fsa_pkg::*;
#(
  parameter int unsigned N          = 256,
  parameter int unsigned N_RU       = 256,
  parameter int unsigned MAX_FAULTS = N * N,
  parameter int unsigned AW         = $clog2(MAX_FAULTS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fault detection results from the self-test
  input  logic                  bist_clear,
  input  logic                  bist_we,
  input  fault_loc_t            bist_loc,
  input  logic                  bist_done,
  input  logic [N_RU-1:0]       ru_faulty,
  output logic [AW:0]           fault_count,
  // input buffer loading from off-chip memory
  input  logic                  buf_clear,
  input  logic                  act_push,
  input  act_t  [N-1:0]         act_push_data,
  input  logic                  wgt_push,
  input  wgt_t  [N-1:0]         wgt_push_data,
  output logic                  act_full,
  output logic                  wgt_full,
  // run control
  input  dataflow_t             dataflow,
  input  logic                  start,
  output logic                  ready,
  output logic                  busy,
  output logic                  done,
  output logic                  stall,
  output logic                  rcm_busy,
  // results
  input  logic [$clog2(N)-1:0]  out_rd_row,
  input  logic [$clog2(N)-1:0]  out_rd_col,
  output psum_t                 out_rd_data,
  // power-gating controls
  output logic                  rcm_pwr_en,
  output logic [N_RU-1:0]       ru_pwr_en
);

  localparam int unsigned SW = $clog2(3*N);
  typedef enum logic [2:0] {T_IDLE, T_PRELOAD, T_COMPUTE, T_STALL, T_DRAIN} tstate_t;

  tstate_t              state;
  dataflow_t            df;          // dataflow of the current / last run
  logic                 stat;        // WS or IS
  logic                 act_en, wgt_en, ca_rev, run_start;
  act_t  [N-1:0]        act_ca;
  wgt_t  [N-1:0]        wgt_ca;
  logic  [N-1:0]                  ob_wr_en;
  logic  [N-1:0][$clog2(N)-1:0]   ob_wr_addr;
  logic [SW-1:0]        step;
  logic [$clog2(N)-1:0] drow;
  logic                 rcm_fin, rcm_ready, rcm_done, rcm_start, rcm_en;
  logic                 ca_clear, ca_drain;
  logic [$clog2(N)-1:0] rcm_step;
  logic [AW-1:0]        ft_rd_addr;
  fault_loc_t           ft_rd_loc;
  logic [N-1:0][N-1:0]  fault_map;
  act_t  [N-1:0]        a_left, act_vec;
  wgt_t  [N-1:0]        w_top, wgt_vec;
  psum_t [N-1:0]        psum_bot;
  corr_t                corr;

  // ---------------------------------------------------------------- sequencer
  assign ready     = (state == T_IDLE) && rcm_ready;
  assign run_start = (state == T_IDLE) && start && rcm_ready;
  assign rcm_start = run_start && (dataflow == DF_OS);
  assign ca_clear  = run_start;
  assign stat      = (df != DF_OS);
  assign ca_drain  = (state == T_DRAIN);
  assign busy      = (state != T_IDLE);
  assign stall     = (state == T_STALL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      df      <= DF_OS;
      step    <= '0;
      drow    <= '0;
      rcm_fin <= 1'b0;
      done    <= 1'b0;
    end else begin
      // Rule of the correction handshake: once the drain has begun, the
      // array's partial-sum registers are shifting out, so no correction may
      // arrive.
      a_no_corr_in_drain: assert (!(ca_drain && corr.valid))
        else $error("fsa_top: correction arrived during drain");
      done <= 1'b0;
      if (rcm_start)     rcm_fin <= 1'b0;
      else if (rcm_done) rcm_fin <= 1'b1;
      unique case (state)
        T_IDLE: if (run_start) begin
          df    <= dataflow;
          state <= (dataflow == DF_OS) ? T_COMPUTE : T_PRELOAD;
          step  <= '0;
        end
        T_PRELOAD: begin
          step <= step + 1'b1;
          if (step == SW'(N-1)) begin
            step  <= '0;
            state <= T_COMPUTE;
          end
        end
        T_COMPUTE: begin
          step <= step + 1'b1;
          drow <= '0;
          if (!stat && step == SW'(3*N-2)) state <= (rcm_fin || rcm_done) ? T_DRAIN : T_STALL;
          if (stat && step == SW'(3*N-1)) begin
            state <= T_IDLE;
            done  <= 1'b1;
          end
        end
        T_STALL: if (rcm_fin || rcm_done) state <= T_DRAIN;
        T_DRAIN: begin
          drow <= drow + 1'b1;
          if (drow == ($clog2(N))'(N-1)) begin
            state <= T_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------- fault detection table
  fsa_fault_table #(.N(N), .MAX_FAULTS(MAX_FAULTS), .AW(AW)) u_ft (
    .clk, .rst_n,
    .clear     (bist_clear),
    .wr_en     (bist_we),
    .wr_loc    (bist_loc),
    .rd_addr   (ft_rd_addr),
    .rd_loc    (ft_rd_loc),
    .count     (fault_count),
    .fault_map (fault_map)
  );

  // ------------------------------------------------------------- input buffers
  // OS: activations stream in from the left, weights from the top.
  // WS: weights are preloaded from the top, then activations stream in.
  // IS: activations are preloaded from the top, then weights stream in.
  // The buffer that is not in use reads as zero.
  assign ca_rev = (state == T_PRELOAD);
  assign act_en = (state == T_COMPUTE && df != DF_IS) || (state == T_PRELOAD && df == DF_IS);
  assign wgt_en = (state == T_COMPUTE && df != DF_WS) || (state == T_PRELOAD && df == DF_WS);
  assign a_left = (df == DF_IS) ? wgt_ca : act_ca;
  assign w_top  = (df == DF_IS) ? act_ca : wgt_ca;

  fsa_input_buffer #(.N(N), .W(ACT_W), .DEPTH(N), .STEP_W(SW)) u_act_buf (
    .clk, .rst_n,
    .clear     (buf_clear),
    .push      (act_push),
    .push_data (act_push_data),
    .ca_en     (act_en),
    .ca_rev    (ca_rev),
    .ca_step   (step),
    .ca_data   (act_ca),
    .rcm_en    (rcm_en),
    .rcm_step  (rcm_step),
    .rcm_data  (act_vec),
    .full      (act_full)
  );

  fsa_input_buffer #(.N(N), .W(WGT_W), .DEPTH(N), .STEP_W(SW)) u_wgt_buf (
    .clk, .rst_n,
    .clear     (buf_clear),
    .push      (wgt_push),
    .push_data (wgt_push_data),
    .ca_en     (wgt_en),
    .ca_rev    (ca_rev),
    .ca_step   (step),
    .ca_data   (wgt_ca),
    .rcm_en    (rcm_en),
    .rcm_step  (rcm_step),
    .rcm_data  (wgt_vec),
    .full      (wgt_full)
  );

  // ----------------------------------------------------------- computing array
  fsa_array #(.N(N)) u_ca (
    .clk, .rst_n,
    .fault_map (fault_map),
    .stationary(stat),
    .preload   (state == T_PRELOAD),
    .clear     (ca_clear),
    .drain     (ca_drain),
    .a_left    (a_left),
    .w_top     (w_top),
    .corr      (corr),
    .psum_bot  (psum_bot)
  );

  // ------------------------------------------------------ re-computing module
  fsa_rcm #(.N(N), .N_RU(N_RU), .MAX_FAULTS(MAX_FAULTS), .AW(AW)) u_rcm (
    .clk, .rst_n,
    .prep        (bist_done),
    .start       (rcm_start),
    .ready       (rcm_ready),
    .busy        (rcm_busy),
    .done        (rcm_done),
    .rcm_pwr_en  (rcm_pwr_en),
    .ru_faulty   (ru_faulty),
    .fault_count (fault_count),
    .ft_rd_addr  (ft_rd_addr),
    .ft_rd_loc   (ft_rd_loc),
    .rcm_en      (rcm_en),
    .rcm_step    (rcm_step),
    .act_vec     (act_vec),
    .wgt_vec     (wgt_vec),
    .corr        (corr),
    .ru_pwr_en   (ru_pwr_en)
  );

  // ------------------------------------------------------------- output buffer
  // Bank j holds what column j of the array produces. OS: the drain writes
  // row N-1-d of C into every bank in drain cycle d. WS: column j delivers
  // C[r][j] in compute cycle r + N + j + 1. IS: column r of the array
  // delivers C[r][j] in compute cycle j + N + r + 1, so there bank r holds
  // row r of C and the read port swaps row and column.
  for (genvar j = 0; j < N; j++) begin : g_obw
    logic [SW:0] r_out;
    assign r_out = {1'b0, step} - (SW+1)'(N + j + 1);
    always_comb begin
      if (state == T_DRAIN) begin
        ob_wr_en[j]   = 1'b1;
        ob_wr_addr[j] = ($clog2(N))'(N-1) - drow;
      end else begin
        ob_wr_en[j]   = stat && (state == T_COMPUTE) && (r_out < (SW+1)'(N));
        ob_wr_addr[j] = r_out[$clog2(N)-1:0];
      end
    end
  end

  fsa_output_buffer #(.N(N)) u_obuf (
    .clk,
    .wr_en   (ob_wr_en),
    .wr_addr (ob_wr_addr),
    .wr_data (psum_bot),
    .rd_bank ((df == DF_IS) ? out_rd_row : out_rd_col),
    .rd_addr ((df == DF_IS) ? out_rd_col : out_rd_row),
    .rd_data (out_rd_data)
  );

endmodule
