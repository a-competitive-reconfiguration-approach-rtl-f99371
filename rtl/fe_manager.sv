// fe_manager -- switching logic and evolutionary repair of the Functional
// Elements (three full-adder configurations, two active and one cold spare).
//
// CED mode: FEs act_a and act_b process every input; the AE compares them.
// The system output is act_a's result. On an FE discrepancy (fe_dv) that the
// AE does not blame on itself (ae_dv low) the result of that input is
// flagged not valid and the manager switches to TMR.
// TMR mode: the spare is woken up and the output is the bitwise majority of
// all three. The first input on which exactly one FE disagrees with the
// majority identifies it as faulty; the other two become the active pair
// and the faulty one becomes "standby under repair". If no FE disagrees for
// TMR_WIN inputs the discrepancy is taken as transient and CED resumes.
// REPAIR mode: the active pair keeps delivering results in CED. The faulty
// FE's fabric is loaded with candidate configurations bred from its own
// configuration by mutation and cell-swap (rate 1/2 each, at least one
// applied). A candidate is compared with the agreed pair output; it is
// accepted as repaired after E_FE consecutive agreements and the FE
// becomes the new spare. A candidate that disagrees is scored by the number
// of agreements it reached; the better of it and its parent breeds the next.
//
// Interface: one input per cycle with in_valid; fe_y are the combinational
// outputs of the three FE fabrics for the current input; the results
// out_data/out_ok/out_valid are registered (latency one cycle).
// Follows the design: two active FEs plus cold spare under CED, temporary
// TMR to articulate the faulty FE, repair by mutation and cell-swap only
// without population information, repaired FE becomes the spare.
// Own choices: TMR_WIN, E_FE, the hill-climbing acceptance rule.
module fe_manager
  import oes_pkg::*;
#(
  parameter int unsigned E_FE    = 32,
  parameter int unsigned TMR_WIN = 16,
  parameter logic [31:0] SEED    = 32'h0BAD_F00D
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [2:0][FE_OUT-1:0]   fe_y,
  input  logic                     fe_dv,
  input  logic                     ae_dv,
  output logic [1:0]               act_a,
  output logic [1:0]               act_b,
  output logic [1:0]               spare,
  output fe_chrom_t [2:0]          fe_chrom,
  output logic [1:0]               mode,        // 0 CED, 1 TMR, 2 REPAIR
  output logic                     out_valid,
  output logic [FE_OUT-1:0]        out_data,
  output logic                     out_ok,
  output logic [15:0]              n_tmr,
  output logic [15:0]              n_repair,
  output logic [15:0]              n_candidates
);
  typedef enum logic [1:0] {M_CED = 2'd0, M_TMR = 2'd1, M_REPAIR = 2'd2} mode_t;

  mode_t           m;
  fe_chrom_t [2:0] chrom_q;
  fe_chrom_t       cand, parent, base, mutated, child;
  logic [1:0]      faulty;
  logic [15:0]     tmr_cnt, cand_cnt, parent_score;
  logic [31:0]     r;
  logic            mut_en, swp_en;
  logic [FE_OUT-1:0] vote;
  logic [2:0]      dis;

  assign mode = m;

  rng32 #(.SEED(SEED)) u_rng (.clk, .rst_n, .r);

  // Bitwise majority of the three FEs and who disagrees with it.
  always_comb begin
    vote = (fe_y[0] & fe_y[1]) | (fe_y[0] & fe_y[2]) | (fe_y[1] & fe_y[2]);
    for (int k = 0; k < 3; k++) dis[k] = (fe_y[k] != vote);
  end

  // Breeding: base is the better of the failed candidate and its parent.
  always_comb begin
    base   = (cand_cnt >= parent_score) ? cand : parent;
    mut_en = r[0] | ~r[9];
    swp_en = r[9];
  end

  fe_chrom_t mut_o, swp_o;
  ga_mutation #(.N_LUT(FE_LUTS)) u_mut (
    .chrom_i(base), .idx({2'b00, r[2:1]}), .pin_a(r[6:5]), .pin_b(r[8:7]), .chrom_o(mut_o));
  assign mutated = mut_en ? mut_o : base;
  ga_cell_swap #(.N_LUT(FE_LUTS)) u_swp (
    .chrom_i(mutated), .idx_a({2'b00, r[11:10]}), .idx_b({2'b00, r[13:12]}), .chrom_o(swp_o));
  assign child = swp_en ? swp_o : mutated;

  // First offspring when repair starts, bred from the faulty FE's configuration.
  fe_chrom_t first_o, first_child;
  ga_mutation #(.N_LUT(FE_LUTS)) u_mut0 (
    .chrom_i(chrom_q[faulty_next()]), .idx({2'b00, r[2:1]}), .pin_a(r[6:5]), .pin_b(r[8:7]),
    .chrom_o(first_o));
  assign first_child = first_o;

  function automatic logic [1:0] faulty_next();
    logic [1:0] f;
    f = 2'd0;
    for (int k = 0; k < 3; k++) if (dis[k]) f = 2'(k);
    return f;
  endfunction

  always_comb
    for (int k = 0; k < 3; k++)
      fe_chrom[k] = (m == M_REPAIR && int'(faulty) == k) ? cand : chrom_q[k];

  function automatic logic [1:0] third(input logic [1:0] x, input logic [1:0] y);
    return 2'd3 - x - y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m            <= M_CED;
      for (int k = 0; k < 3; k++) chrom_q[k] <= fe_reference();
      cand         <= fe_reference();
      parent       <= fe_reference();
      act_a        <= 2'd0;
      act_b        <= 2'd1;
      spare        <= 2'd2;
      faulty       <= 2'd2;
      tmr_cnt      <= '0;
      cand_cnt     <= '0;
      parent_score <= '0;
      out_valid    <= 1'b0;
      out_data     <= '0;
      out_ok       <= 1'b0;
      n_tmr        <= '0;
      n_repair     <= '0;
      n_candidates <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        unique case (m)
          M_CED: begin
            out_data <= fe_y[act_a];
            out_ok   <= !fe_dv;
            if (fe_dv && !ae_dv) begin
              m       <= M_TMR;
              tmr_cnt <= '0;
              n_tmr   <= n_tmr + 1'b1;
            end
          end
          M_TMR: begin
            out_data <= vote;
            out_ok   <= 1'b1;
            if ((dis[0] + dis[1] + dis[2]) == 2'd1) begin
              faulty       <= faulty_next();
              act_a        <= (faulty_next() == 2'd0) ? 2'd1 : 2'd0;
              act_b        <= (faulty_next() == 2'd2) ? 2'd1 : 2'd2;
              spare        <= faulty_next();
              parent       <= chrom_q[faulty_next()];
              cand         <= first_child;
              cand_cnt     <= '0;
              parent_score <= '0;
              n_candidates <= n_candidates + 1'b1;
              m            <= M_REPAIR;
            end else if (int'(tmr_cnt) == TMR_WIN - 1) begin
              m <= M_CED;
            end else begin
              tmr_cnt <= tmr_cnt + 1'b1;
            end
          end
          M_REPAIR: begin
            out_data <= fe_y[act_a];
            out_ok   <= !fe_dv;
            if (!fe_dv) begin
              if (fe_y[faulty] != fe_y[act_a]) begin
                if (cand_cnt >= parent_score) begin
                  parent       <= cand;
                  parent_score <= cand_cnt;
                end
                cand         <= child;
                cand_cnt     <= '0;
                n_candidates <= n_candidates + 1'b1;
              end else if (int'(cand_cnt) == E_FE - 1) begin
                chrom_q[faulty] <= cand;
                spare           <= faulty;
                n_repair        <= n_repair + 1'b1;
                m               <= M_CED;
              end else begin
                cand_cnt <= cand_cnt + 1'b1;
              end
            end
          end
          default: m <= M_CED;
        endcase
      end
    end
  end

  // The spare is always the FE that is neither act_a nor act_b.
  always_comb assert (!rst_n || spare == third(act_a, act_b) || m != M_CED)
    else $error("fe_manager: spare is not the idle FE");

endmodule
