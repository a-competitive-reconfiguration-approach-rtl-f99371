// cbe_unit -- Consensus Based Evaluation of a population of configurations.
//
// Every time an individual is compared with its peers (eval_valid), the unit
// adds the outcome to that individual's discrepancy value DV (weight on a
// discrepancy, saturating; weight 1 counts discrepant comparisons, a larger
// weight carries a discrepancy score) and to its evaluation count. No
// verdict is given on a single comparison beyond the per-comparison
// transitions: a Pristine individual that takes part in a discrepant
// comparison becomes Suspect (transition 2); agreements keep Pristine and
// Suspect individuals where they are (1, 3).
//
// Threshold decisions are relative, not absolute. Each individual's
// evaluation window is E comparisons. The sliding window S = Q*E closes when
// Q individuals have completed their evaluation window since the last
// update; the unit then treats the DVs of the whole population as the single
// column of X and uses the hat-matrix diagonal H_ii = DV_i^2 / sum_j DV_j^2,
// whose mean is 1/POP. Only individuals that have completed E comparisons
// are judged, and only their DVs and counts restart:
//   Pristine/Suspect -> Under Repair   if H_ii > K_R/POP            (4)
//   Refurbished      -> Under Repair   if H_ii > K_R/POP            (8)
//   Under Repair     -> Refurbished    if H_ii <= K_O/POP           (6)
// otherwise the state is kept (5, 7). The tests are done without division as
// POP*DV_i^2 > K_R*sum and POP*DV_i^2 <= K_O*sum. K_O < K_R, so an individual must fall well
// below the repair threshold to count as refurbished.
//
// Interface: eval_valid/eval_idx/discrepancy in; state, dv, window_done
// (one-cycle pulse after each sliding window) out. clr_idx with
// clr_valid clears the DV of an individual replaced by an offspring.
// Timing: one comparison per cycle, state updates at the clock edge; the
// window decision takes effect on the edge that ends the window.
// Follows the design: the four states and transitions of the half-
// configuration lifetime, evaluation window E, sliding window S = q*E,
// hat-matrix outlier test. Own choices: E, Q, K_R, K_O, restarting the DV of
// an individual once it has been judged.
module cbe_unit
  import oes_pkg::*;
#(
  parameter int unsigned POP  = 5,
  parameter int unsigned E    = 8,
  parameter int unsigned Q    = 2,
  parameter int unsigned K_R  = 2,
  parameter int unsigned K_O  = 1,
  parameter int unsigned DV_W = 12,
  localparam int unsigned IW  = (POP > 1) ? $clog2(POP) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      eval_valid,
  input  logic [IW-1:0]             eval_idx,
  input  logic                      discrepancy,
  input  logic [DV_W-1:0]           weight,
  input  logic                      clr_valid,
  input  logic [IW-1:0]             clr_idx,
  output fit_state_t [POP-1:0]      state,
  output logic [POP-1:0][DV_W-1:0]  dv,
  output logic                      window_done
);
  localparam int unsigned CW = $clog2(POP + 1) + 1;
  localparam int unsigned PW = 2 * DV_W + $clog2(POP + 1) + 4;

  logic [POP-1:0][DV_W-1:0] cnt, dv_nx, cnt_nx;
  logic [CW-1:0]            comp, comp_nx;
  logic                     win_end;
  logic [PW-1:0]            sumsq;

  // Values including the comparison counted on this clock edge.
  always_comb begin
    dv_nx   = dv;
    cnt_nx  = cnt;
    comp_nx = comp;
    if (eval_valid)
      for (int i = 0; i < POP; i++)
        if (int'(eval_idx) == i) begin
          if (discrepancy)
            dv_nx[i] = (dv[i] > '1 - weight) ? '1 : dv[i] + weight;
          if (int'(cnt[i]) < E) cnt_nx[i] = cnt[i] + 1'b1;
          if (int'(cnt[i]) == E - 1) comp_nx = comp + 1'b1;
        end
    win_end = (int'(comp_nx) >= Q);
    sumsq = '0;
    for (int i = 0; i < POP; i++) sumsq += PW'(dv_nx[i]) * PW'(dv_nx[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= '{default: ST_PRISTINE};
      dv          <= '0;
      cnt         <= '0;
      comp        <= '0;
      window_done <= 1'b0;
    end else begin
      window_done <= win_end;
      dv   <= dv_nx;
      cnt  <= cnt_nx;
      comp <= win_end ? '0 : comp_nx;
      if (eval_valid)
        for (int i = 0; i < POP; i++)
          if (int'(eval_idx) == i && discrepancy && state[i] == ST_PRISTINE)
            state[i] <= ST_SUSPECT;
      if (win_end) begin
        for (int i = 0; i < POP; i++) begin
          logic [PW-1:0] lev;
          lev = PW'(POP) * PW'(dv_nx[i]) * PW'(dv_nx[i]);
          if (int'(cnt_nx[i]) >= E) begin
            unique case (state[i])
              ST_PRISTINE, ST_SUSPECT, ST_REFURBISHED:
                if (lev > PW'(K_R) * sumsq) state[i] <= ST_UNDER_REPAIR;
              ST_UNDER_REPAIR:
                if (lev <= PW'(K_O) * sumsq) state[i] <= ST_REFURBISHED;
              default: ;
            endcase
            dv[i]  <= '0;
            cnt[i] <= '0;
          end
        end
      end
      if (clr_valid)
        for (int i = 0; i < POP; i++)
          if (int'(clr_idx) == i) begin
            dv[i]  <= '0;
            cnt[i] <= '0;
          end
    end
  end

endmodule
