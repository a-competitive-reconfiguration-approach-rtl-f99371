// cbe_half -- population manager for one half (L or R) of a CBE Duplex
// arrangement: a pool of functionally identical, physically distinct
// configurations that compete for one reconfigurable region.
//
// One configuration (cur) is resident. Every comparison of the resident
// configuration with the other half (eval_valid) is reported to a cbe_unit
// with its outcome (discrepancy) and score (weight), which keeps the DVs and
// fitness states of the pool. The resident configuration is replaced by the
// next one (round robin) when it shows a discrepancy, when it has completed
// its evaluation window of E comparisons, or at random with the
// reintroduction probability LAMBDA_R/256.
// When the configuration about to be loaded is Under Repair and has shown a
// discrepancy since it was last bred, an offspring replaces it. Input
// permutation (ga_mutation) and cell swapping (ga_cell_swap) are each applied
// with probability 1/2 (input permutation when neither is drawn), and
// crossover (ga_pmx) with probability 1/2 with a randomly drawn mate from the
// same half, only if that mate is Pristine, Suspect or Refurbished.
//
// Population set-up: a pulse on init loads the pool from one seed
// configuration (base); individual k is the seed with every LUT moved k
// physical positions on (slot + k mod N_LUT), so that the individuals use
// the fabric's LUTs in different ways.
// Interface: chrom is the resident configuration; state, dv, cur,
// n_reload, n_evolution and window_done report the pool. A reload takes
// effect on the clock edge after the comparison that caused it.
// Follows the design: competing pool per half, four fitness states,
// evaluation and sliding windows, replacement on discrepancy / window end /
// reintroduction rate, breeding only within the same half with a mate that
// is not Under Repair, input permutation and cell swapping. Own choices: the
// seeding by rotation, round-robin order, the rates of 1/2, and PMX as the
// crossover, because it keeps every offspring a valid placement.
module cbe_half
  import oes_pkg::*;
#(
  parameter int unsigned N_LUT    = 16,
  parameter int unsigned POP      = 10,
  parameter int unsigned E        = 8,
  parameter int unsigned Q        = 2,
  parameter int unsigned LAMBDA_R = 102,
  parameter int unsigned DV_W     = 12,
  parameter logic [31:0] SEED     = 32'h2468_ACE1,
  localparam int unsigned IW      = $clog2(POP)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  gene_t [N_LUT-1:0]         base,
  input  logic                      eval_valid,
  input  logic                      discrepancy,
  input  logic [DV_W-1:0]           weight,
  output gene_t [N_LUT-1:0]         chrom,
  output logic [IW-1:0]             cur,
  output fit_state_t [POP-1:0]      state,
  output logic [POP-1:0][DV_W-1:0]  dv,
  output logic [15:0]               n_reload,
  output logic [15:0]               n_evolution,
  output logic                      window_done
);
  typedef gene_t [N_LUT-1:0] chrom_t;

  chrom_t [POP-1:0] pop;
  logic [IW-1:0]    nxt, mate;
  logic [7:0]       load_cnt;
  logic             rotate, breed;
  logic [31:0]      r;
  logic             mut_en, swp_en, pmx_en;

  rng32 #(.SEED(SEED)) u_rng (.clk, .rst_n, .r);

  cbe_unit #(.POP(POP), .E(E), .Q(Q), .DV_W(DV_W)) u_cbe (
    .clk, .rst_n, .eval_valid, .eval_idx(cur), .discrepancy, .weight,
    .clr_valid(breed), .clr_idx(nxt), .state, .dv, .window_done
  );

  assign chrom = pop[cur];

  function automatic logic [3:0] modlut(input logic [3:0] v);
    return 4'(int'(v) % N_LUT);
  endfunction

  always_comb begin
    nxt    = (int'(cur) == POP - 1) ? '0 : cur + 1'b1;
    rotate = eval_valid && (discrepancy || int'(load_cnt) == E - 1 || r[31:24] < 8'(LAMBDA_R));
    breed  = rotate && (state[nxt] == ST_UNDER_REPAIR) && (dv[nxt] != '0);
    mate   = IW'(int'(r[23:16]) % POP);
    swp_en = r[1];
    pmx_en = r[2] && mate != nxt && state[mate] != ST_UNDER_REPAIR;
    mut_en = r[0] | ~(swp_en | pmx_en);
  end

  chrom_t m_o, s_i, s_o, p_i, p_o, p_b, child;
  ga_mutation #(.N_LUT(N_LUT)) u_mut (
    .chrom_i(pop[nxt]), .idx(modlut(r[6:3])), .pin_a(r[8:7]), .pin_b(r[10:9]), .chrom_o(m_o));
  assign s_i = mut_en ? m_o : pop[nxt];
  ga_cell_swap #(.N_LUT(N_LUT)) u_swp (
    .chrom_i(s_i), .idx_a(modlut(r[14:11])), .idx_b(modlut(r[18:15])), .chrom_o(s_o));
  assign p_i = swp_en ? s_o : s_i;
  ga_pmx #(.N_LUT(N_LUT)) u_pmx (
    .a_i(p_i), .b_i(pop[mate]), .cp(modlut(r[22:19])), .a_o(p_o), .b_o(p_b));
  assign child = pmx_en ? p_o : p_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pop         <= '0;
      cur         <= '0;
      load_cnt    <= '0;
      n_reload    <= '0;
      n_evolution <= '0;
    end else if (init) begin
      for (int k = 0; k < POP; k++)
        for (int g = 0; g < N_LUT; g++) begin
          pop[k][g]      <= base[g];
          pop[k][g].slot <= slot_t'((int'(base[g].slot) + k) % N_LUT);
        end
      cur      <= '0;
      load_cnt <= '0;
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
    logic [N_LUT-1:0] used;
    used = '0;
    for (int g = 0; g < N_LUT; g++)
      for (int k = 0; k < N_LUT; k++)
        if (int'(child[g].slot) == k) used[k] = 1'b1;
    assert (!rst_n || !breed || &used) else $error("cbe_half: offspring placement not a permutation");
  end

endmodule
