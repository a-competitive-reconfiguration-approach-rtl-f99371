// cbe_tmr -- Competitive runtime reconfiguration in TMR mode: three
// reconfigurable regions, each holding one configuration drawn from its own
// competing pool, voted bit by bit.
//
// Every accepted input x is applied to the three regions (three lut_fabric
// instances with separate fault inputs). The output is the bitwise majority
// of the three results. Each region is scored against the vote: its
// discrepancy is any bit where it differs from the majority, its score the
// Hamming distance to it. Unlike the Duplex mode the vote points at the
// disagreeing region, so only that region's resident configuration is
// charged. Each region's cbe_half forms the consensus over its pool,
// rotates configurations and breeds repairs for those Under Repair.
//
// Interface: pulse init once after reset to seed the three pools from base
// and outsel. Then one input per cycle with in_valid; the voted result
// appears on out_y one cycle later with out_valid; out_ok is low when no
// majority was unanimous, i.e. some region disagreed. disc is the
// combinational per-region discrepancy for the current input.
// Follows the design: three regions of ten competing configurations, the
// majority vote, Hamming-distance scoring of each module against the vote,
// the same fitness states, windows and genetic repair as the Duplex mode.
// Own choices: one consensus per region, the registered output stage.
module cbe_tmr
  import oes_pkg::*;
#(
  parameter int unsigned N_IN     = 6,
  parameter int unsigned N_OUT    = 6,
  parameter int unsigned N_LUT    = 16,
  parameter int unsigned POP_M    = 10,
  parameter int unsigned E        = 8,
  parameter int unsigned Q        = 2,
  parameter int unsigned LAMBDA_R = 102,
  localparam int unsigned DV_W    = 12
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                init,
  input  gene_t [N_LUT-1:0]                   base,
  input  src_t  [N_OUT-1:0]                   outsel,
  input  logic                                in_valid,
  input  logic [N_IN-1:0]                     x,
  input  logic [2:0][N_LUT-1:0][PINS-1:0]     stuck_mask,
  input  logic [2:0][N_LUT-1:0][PINS-1:0]     stuck_val,
  output logic                                out_valid,
  output logic [N_OUT-1:0]                    out_y,
  output logic                                out_ok,
  output logic [2:0]                          disc,
  output fit_state_t [2:0][POP_M-1:0]         state,
  output logic [15:0]                         n_discrepancy,
  output logic [15:0]                         n_reload,
  output logic [15:0]                         n_evolution,
  output logic                                window_done
);
  src_t  [N_OUT-1:0]  osel;
  logic  [2:0][N_OUT-1:0] y;
  logic  [N_OUT-1:0]  vote;
  logic  [2:0][DV_W-1:0] score;
  logic  [2:0][15:0]  rl, ev;
  logic  [2:0]        wd;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    osel <= '0;
    else if (init) osel <= outsel;

  always_comb begin
    vote = (y[0] & y[1]) | (y[0] & y[2]) | (y[1] & y[2]);
    for (int m = 0; m < 3; m++) begin
      disc[m]  = |(y[m] ^ vote);
      score[m] = DV_W'($countones(y[m] ^ vote));
    end
  end

  for (genvar m = 0; m < 3; m++) begin : g_mod
    gene_t [N_LUT-1:0] chrom;
    logic  [$clog2(POP_M)-1:0] cur;
    logic  [POP_M-1:0][DV_W-1:0] dv;
    lut_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_fab (
      .x, .chrom, .outsel(osel), .stuck_mask(stuck_mask[m]), .stuck_val(stuck_val[m]), .y(y[m]));
    cbe_half #(.N_LUT(N_LUT), .POP(POP_M), .E(E), .Q(Q), .LAMBDA_R(LAMBDA_R), .DV_W(DV_W),
               .SEED(32'h9E37_79B9 ^ (32'(m) << 8))) u_half (
      .clk, .rst_n, .init, .base, .eval_valid(in_valid), .discrepancy(disc[m]), .weight(score[m]),
      .chrom, .cur, .state(state[m]), .dv,
      .n_reload(rl[m]), .n_evolution(ev[m]), .window_done(wd[m]));
  end

  assign n_reload    = rl[0] + rl[1] + rl[2];
  assign n_evolution = ev[0] + ev[1] + ev[2];
  assign window_done = |wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_y         <= '0;
      out_ok        <= 1'b0;
      n_discrepancy <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_y  <= vote;
        out_ok <= ~|disc;
        if (|disc) n_discrepancy <= n_discrepancy + 1'b1;
      end
    end
  end

endmodule
