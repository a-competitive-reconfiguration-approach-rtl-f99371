// as_unit -- Autonomic Supervisor: consensus-based evaluation and
// evolutionary repair of the Autonomic Element's configurations.
//
// The AS keeps a population of POP functionally identical, physically
// distinct AE configurations. One of them (cur) is loaded on the AE fabric.
// Every AE evaluation (eval_valid) reports AE_DV to a cbe_unit, which keeps
// the discrepancy values and fitness states. The loaded configuration is
// replaced by the next one (round robin) when it shows a discrepancy, when it
// has completed its evaluation window of E evaluations, or at random with
// the reintroduction probability LAMBDA_R/256.
// When the configuration about to be loaded is Under Repair and has shown a
// discrepancy since it was last bred (DV > 0), the AS first breeds an
// offspring in its place: mutation, cell-swap and PMX crossover
// are each applied with probability 1/2 (mutation is forced when none is
// chosen); the crossover mate is the winner of a size-2 tournament (lower
// DV wins). The offspring's DV restarts, and the CBE promotes it to
// Refurbished once it completes a window with a DV at or below the
// population's consensus level.
//
// Interface: eval_valid/ae_dv in; ae_chrom (the loaded configuration),
// cur, state, dv and the counters n_reload / n_evolution out. A reload takes
// effect on the clock edge after the evaluation that caused it.
// Follows the design: population of five AEs, CBE states and windows,
// three genetic operators with rate 0.5, tournament size 2, replacement on
// discrepancy / window end / reintroduction rate. Own choices: round-robin
// order, reintroduction rate 0.4 (a value the CBE experiments use), one
// offspring per reload of a still-discrepant Under-Repair individual, reload time of one
// evaluation slot; of the two PMX offspring only A' is kept.
module as_unit
  import oes_pkg::*;
#(
  parameter int unsigned POP      = 5,
  parameter int unsigned E        = 8,
  parameter int unsigned Q        = 2,
  parameter int unsigned LAMBDA_R = 102,
  parameter logic [31:0] SEED     = 32'h5EED_1234,
  localparam int unsigned IW      = $clog2(POP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   eval_valid,
  input  logic                   ae_dv,
  output ae_chrom_t              ae_chrom,
  output logic [IW-1:0]          cur,
  output fit_state_t [POP-1:0]   state,
  output logic [POP-1:0][11:0]   dv,
  output logic [15:0]            n_reload,
  output logic [15:0]            n_evolution,
  output logic                   window_done
);
  ae_chrom_t [POP-1:0] pop;
  logic [IW-1:0]       nxt, t1, t2, mate;
  logic [7:0]          load_cnt;
  logic                rotate, breed;
  logic [31:0]         r;
  logic                mut_en, swp_en, pmx_en;

  rng32 #(.SEED(SEED)) u_rng (.clk, .rst_n, .r);

  cbe_unit #(.POP(POP), .E(E), .Q(Q), .DV_W(12)) u_cbe (
    .clk, .rst_n, .eval_valid, .eval_idx(cur), .discrepancy(ae_dv), .weight(12'd1),
    .clr_valid(breed), .clr_idx(nxt), .state, .dv, .window_done
  );

  assign ae_chrom = pop[cur];

  function automatic logic [IW-1:0] modpop(input logic [7:0] v);
    return IW'(int'(v) % POP);
  endfunction

  function automatic logic [3:0] modlut(input logic [3:0] v);
    return 4'(int'(v) % AE_LUTS);
  endfunction

  always_comb begin
    nxt    = (int'(cur) == POP - 1) ? '0 : cur + 1'b1;
    rotate = eval_valid && (ae_dv || int'(load_cnt) == E - 1 || r[31:24] < 8'(LAMBDA_R));
    breed  = rotate && (state[nxt] == ST_UNDER_REPAIR) && (dv[nxt] != '0);
    t1     = modpop(r[23:16]);
    t2     = modpop(r[15:8]);
    mate   = (dv[t2] < dv[t1]) ? t2 : t1;
    mut_en = r[0] | ~(r[1] | r[2]);
    swp_en = r[1];
    pmx_en = r[2];
  end

  ae_chrom_t m_o, s_i, s_o, p_i, p_o, p_b, child;
  ga_mutation #(.N_LUT(AE_LUTS)) u_mut (
    .chrom_i(pop[nxt]), .idx(modlut(r[6:3])), .pin_a(r[8:7]), .pin_b(r[10:9]), .chrom_o(m_o));
  assign s_i = mut_en ? m_o : pop[nxt];
  ga_cell_swap #(.N_LUT(AE_LUTS)) u_swp (
    .chrom_i(s_i), .idx_a(modlut(r[14:11])), .idx_b(modlut(r[18:15])), .chrom_o(s_o));
  assign p_i = swp_en ? s_o : s_i;
  ga_pmx #(.N_LUT(AE_LUTS)) u_pmx (
    .a_i(p_i), .b_i(pop[mate]), .cp(modlut(r[22:19])), .a_o(p_o), .b_o(p_b));
  assign child = pmx_en ? p_o : p_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < POP; k++) pop[k] <= ae_reference(k);
      cur         <= '0;
      load_cnt    <= '0;
      n_reload    <= '0;
      n_evolution <= '0;
    end else if (eval_valid) begin
      if (rotate) begin
        cur      <= nxt;
        load_cnt <= '0;
        n_reload <= n_reload + 1'b1;
        if (breed) begin
          pop[nxt]    <= child;
          n_evolution <= n_evolution + 1'b1;
        end
      end else begin
        load_cnt <= load_cnt + 1'b1;
      end
    end
  end

  // Offspring must remain valid placements: every slot used exactly once.
  always_comb begin
    logic [AE_LUTS-1:0] used;
    used = '0;
    for (int g = 0; g < AE_LUTS; g++)
      for (int k = 0; k < AE_LUTS; k++)
        if (int'(child[g].slot) == k) used[k] = 1'b1;
    assert (!rst_n || !breed || &used) else $error("as_unit: offspring placement not a permutation");
  end

endmodule
