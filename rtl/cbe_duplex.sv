// cbe_duplex -- Competitive runtime reconfiguration in Duplex mode: two
// reconfigurable regions, L and R, each holding one half-configuration drawn
// from its own competing pool, checked against each other on live data.
//
// Every accepted input x is applied to both regions (two lut_fabric
// instances with separate physical fault inputs, so the halves use
// exclusive resources). The discrepancy detector compares the two results:
// a discrepancy is any differing output bit, and its score is either the
// Hamming distance of the two output words (HAMMING = 1) or their
// arithmetic difference |L - R| (HAMMING = 0, bit-weight scoring). The same
// outcome and score are charged to both resident configurations without
// judging which one is faulty; each half's cbe_half then forms the
// consensus over its pool, rotates configurations and breeds repairs for
// the ones it finds Under Repair. A faulty configuration collects DV with
// every partner, a healthy one only when paired with a faulty one, so over
// many pairings the faulty ones stand out.
//
// Interface: pulse init once after reset to seed both pools from base
// (the synthesized design) and outsel (which sources drive the outputs).
// Then one input per cycle with in_valid; the result of L appears on out_y
// one cycle later with out_valid, and out_ok is low when L and R disagreed
// on it. discrepancy and score are combinational for the current input.
// Follows the design: L/R half-configurations, discrepancy detector,
// DV charged to both without judgment, consensus per evaluation window,
// Hamming and bit-weight scoring. Own choices: one cbe_unit per half (the
// consensus is formed within each pool), L's result as the output, the
// registered output stage.
module cbe_duplex
  import oes_pkg::*;
#(
  parameter int unsigned N_IN     = 6,
  parameter int unsigned N_OUT    = 6,
  parameter int unsigned N_LUT    = 16,
  parameter int unsigned POP_H    = 10,
  parameter int unsigned E        = 8,
  parameter int unsigned Q        = 2,
  parameter int unsigned LAMBDA_R = 102,
  parameter bit          HAMMING  = 1'b1,
  localparam int unsigned DV_W    = 12,
  localparam int unsigned IW      = $clog2(POP_H)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            init,
  input  gene_t [N_LUT-1:0]               base,
  input  src_t  [N_OUT-1:0]               outsel,
  input  logic                            in_valid,
  input  logic [N_IN-1:0]                 x,
  input  logic [N_LUT-1:0][PINS-1:0]      stuck_mask_l,
  input  logic [N_LUT-1:0][PINS-1:0]      stuck_val_l,
  input  logic [N_LUT-1:0][PINS-1:0]      stuck_mask_r,
  input  logic [N_LUT-1:0][PINS-1:0]      stuck_val_r,
  output logic                            out_valid,
  output logic [N_OUT-1:0]                out_y,
  output logic                            out_ok,
  output logic                            discrepancy,
  output logic [DV_W-1:0]                 score,
  output logic [IW-1:0]                   cur_l,
  output logic [IW-1:0]                   cur_r,
  output fit_state_t [POP_H-1:0]          state_l,
  output fit_state_t [POP_H-1:0]          state_r,
  output logic [POP_H-1:0][DV_W-1:0]      dv_l,
  output logic [POP_H-1:0][DV_W-1:0]      dv_r,
  output logic [15:0]                     n_discrepancy,
  output logic [15:0]                     n_reload,
  output logic [15:0]                     n_evolution,
  output logic                            window_done
);
  gene_t [N_LUT-1:0] chrom_l, chrom_r;
  src_t  [N_OUT-1:0] osel;
  logic  [N_OUT-1:0] y_l, y_r;
  logic  [15:0]      rl_l, rl_r, ev_l, ev_r;
  logic              wd_l, wd_r;

  // The output selection is part of the synthesized design; it is latched
  // with the seed so that the halves never see it change.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    osel <= '0;
    else if (init) osel <= outsel;

  lut_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_l (
    .x, .chrom(chrom_l), .outsel(osel), .stuck_mask(stuck_mask_l), .stuck_val(stuck_val_l), .y(y_l));
  lut_fabric #(.N_IN(N_IN), .N_OUT(N_OUT), .N_LUT(N_LUT)) u_r (
    .x, .chrom(chrom_r), .outsel(osel), .stuck_mask(stuck_mask_r), .stuck_val(stuck_val_r), .y(y_r));

  // Discrepancy detector.
  always_comb begin
    logic [N_OUT-1:0] d;
    d = y_l ^ y_r;
    discrepancy = |d;
    if (HAMMING) score = DV_W'($countones(d));
    else         score = (y_l > y_r) ? DV_W'(y_l - y_r) : DV_W'(y_r - y_l);
  end

  cbe_half #(.N_LUT(N_LUT), .POP(POP_H), .E(E), .Q(Q), .LAMBDA_R(LAMBDA_R), .DV_W(DV_W),
             .SEED(32'h1357_9BDF)) u_hl (
    .clk, .rst_n, .init, .base, .eval_valid(in_valid), .discrepancy, .weight(score),
    .chrom(chrom_l), .cur(cur_l), .state(state_l), .dv(dv_l),
    .n_reload(rl_l), .n_evolution(ev_l), .window_done(wd_l));
  cbe_half #(.N_LUT(N_LUT), .POP(POP_H), .E(E), .Q(Q), .LAMBDA_R(LAMBDA_R), .DV_W(DV_W),
             .SEED(32'h2468_ACE1)) u_hr (
    .clk, .rst_n, .init, .base, .eval_valid(in_valid), .discrepancy, .weight(score),
    .chrom(chrom_r), .cur(cur_r), .state(state_r), .dv(dv_r),
    .n_reload(rl_r), .n_evolution(ev_r), .window_done(wd_r));

  assign n_reload    = rl_l + rl_r;
  assign n_evolution = ev_l + ev_r;
  assign window_done = wd_l | wd_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_y         <= '0;
      out_ok        <= 1'b0;
      n_discrepancy <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_y  <= y_l;
        out_ok <= !discrepancy;
        if (discrepancy) n_discrepancy <= n_discrepancy + 1'b1;
      end
    end
  end

endmodule
