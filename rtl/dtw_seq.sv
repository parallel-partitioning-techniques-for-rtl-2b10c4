// dtw_seq: step and phase sequencer (the array control unit).
//
// A DTW run over a reference pattern of I frames and a test pattern of J
// frames takes I + R + 1 steps: R + 1 steps that only fill the PE memories,
// then one step per column i = 1 .. I, as the paper states. Step t works on
// column col = t - R - 1 (nothing is computed while col < 1). Within a step
// the sequencer runs the phases of dtw_pkg::phase_e:
//   M x L cycles of PH_MAC (slot s = 0 .. M-1, element e = 0 .. L-1),
//   PH_DXFER, M cycles of PH_SUM (slot s), and PH_SHIFT when HAS_SHIFT is set.
// M is the number of window points each PE computes per column: 1 for the
// full arrays, more for the reduced array with fewer PEs than 2R+1.
// During PH_MAC of step t the reference pattern bus (RPB) carries element e
// of a_{t-R} (in the last slot) and the test pattern bus (TPB) element e of
// b_t (in slot 0); those vectors are used from step t+1 on. rpb_rd / tpb_rd
// say whether the requested frame exists (1 <= index <= I, resp. <= J);
// the pattern source answers in the same cycle. Splitting a step into these phases and addressing the pattern
// source this way is this design's choice; the paper gives the order of
// the operations but no cycle timing.
//
// Interface: `start` (ignored while busy) latches i_len / j_len, which must
// be >= 1. `init` is high for one cycle before step 1 and clears the PEs.
// `done` pulses for one cycle after the last phase of the last step.
// Cycle count from start to done: 2 + (I+R+1) * (M*L + M + 1 + HAS_SHIFT).
module dtw_seq
  import dtw_pkg::*;
#(
  parameter int unsigned R         = 7,
  parameter int unsigned L         = 16,
  parameter bit          HAS_SHIFT = 1'b0,
  parameter int unsigned M         = 1,
  localparam int unsigned EW       = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned SW       = (M > 1) ? $clog2(M) : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  idx_t          i_len,
  input  idx_t          j_len,
  output logic          busy,
  output logic          init,
  output logic          done,
  output phase_e        phase,
  output logic [EW-1:0] elem,
  output logic [SW-1:0] slot,
  output step_t         step,
  output sidx_t         col,
  output idx_t          i_q,
  output idx_t          j_q,
  output logic          rpb_rd,
  output idx_t          rpb_vec,
  output logic          tpb_rd,
  output idx_t          tpb_vec
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN} state_e;
  state_e state;
  step_t  n_steps;
  sidx_t  a_idx;
  logic   last_step;
  logic   step_end;

  assign busy      = (state != S_IDLE);
  assign init      = (state == S_INIT);
  assign n_steps   = step_t'(i_q) + step_t'(R + 1);
  assign last_step = (step == n_steps);
  assign col       = sidx_t'(step) - sidx_t'(R + 1);
  assign a_idx     = sidx_t'(step) - sidx_t'(R);
  assign step_end  = (state == S_RUN) &&
                     (HAS_SHIFT ? (phase == PH_SHIFT)
                                : (phase == PH_SUM && slot == SW'(M - 1)));

  always_comb begin
    rpb_rd  = (state == S_RUN) && (phase == PH_MAC) && (slot == SW'(M - 1)) &&
              (a_idx >= 1) && (a_idx <= sidx_t'(i_q));
    rpb_vec = idx_t'(a_idx);
    tpb_rd  = (state == S_RUN) && (phase == PH_MAC) && (slot == '0) &&
              (step <= step_t'(j_q));
    tpb_vec = idx_t'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= PH_MAC;
      elem  <= '0;
      slot  <= '0;
      step  <= '0;
      i_q   <= '0;
      j_q   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i_q   <= i_len;
          j_q   <= j_len;
          state <= S_INIT;
        end
        S_INIT: begin
          step  <= step_t'(1);
          phase <= PH_MAC;
          elem  <= '0;
          slot  <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          unique case (phase)
            PH_MAC: begin
              if (elem == EW'(L - 1)) begin
                elem <= '0;
                if (slot == SW'(M - 1)) begin
                  slot  <= '0;
                  phase <= PH_DXFER;
                end else begin
                  slot <= slot + 1'b1;
                end
              end else begin
                elem <= elem + 1'b1;
              end
            end
            PH_DXFER: phase <= PH_SUM;
            PH_SUM: begin
              if (slot == SW'(M - 1)) begin
                slot  <= '0;
                phase <= HAS_SHIFT ? PH_SHIFT : PH_MAC;
              end else begin
                slot <= slot + 1'b1;
              end
            end
            PH_SHIFT: phase <= PH_MAC;
          endcase
          if (step_end) begin
            phase <= PH_MAC;
            if (last_step) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              step <= step + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A run needs at least one frame in each pattern.
  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && start) |-> (i_len != 0 && j_len != 0));

endmodule
