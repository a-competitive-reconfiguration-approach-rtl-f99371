// oes_top -- Organic Embedded System case study: a self-repairing full adder.
//
// Functional layer: three full-adder Functional Elements (FEs), each a LUT
// fabric of one CLB (4 LUTs) with its own physical fault inputs. Two are
// active in Concurrent Error Detection, the third is a cold spare.
// Autonomic layer: one Autonomic Element (ae_unit) compares the active pair
// (FE_DV) and checks itself against its stored checksum table (AE_DV);
// fe_manager is the switching logic that turns CED into TMR, isolates a
// faulty FE and repairs it by evolution; the Autonomic Supervisor (as_unit)
// runs consensus-based evaluation over the population of AE configurations
// and repairs the AE by evolution.
//
// Operation: after reset the AE runs its compute-checksum step (16 cycles,
// in_ready low). Then one full-adder input {cin, b, a} is accepted per cycle
// while in_ready is high; the sum/carry result appears one cycle later on
// out_data = {carry, sum} with out_valid, and out_ok tells whether it was
// produced without an unresolved discrepancy. All repair happens online,
// between and during normal inputs, without test vectors.
//
// Fault inputs model permanent stuck-at faults on physical LUT input pins
// of each FE fabric and of the AE fabric, and stuck entries of the AE's
// checksum table; they exist so that fault handling can be exercised.
// Follows the design: layer split, three FEs with a cold spare, one AE per
// FE group, AS with CBE and genetic operators. Own choices: a single FE/AE
// group, reconfiguration modelled as an immediate register load. While the
// loaded AE configuration is Under Repair its FE_DV is ignored (AE
// self-repair mode); the FEs keep producing results in the meantime.
//
// Beside the case study, the cd_* ports give access to a cbe_duplex
// instance: the competitive-reconfiguration scheme in its Duplex mode, two
// regions of 16 LUTs with ten competing configurations each, for any
// circuit of up to 6 inputs and 6 outputs loaded through cd_base/cd_outsel.
// The ct_* ports do the same for a cbe_tmr instance, the TMR mode of that
// scheme with three regions of ten configurations each.
module oes_top
  import oes_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic [FE_IN-1:0]                     in_data,
  output logic                                 in_ready,
  input  logic [2:0][FE_LUTS-1:0][PINS-1:0]    fe_stuck_mask,
  input  logic [2:0][FE_LUTS-1:0][PINS-1:0]    fe_stuck_val,
  input  logic [AE_LUTS-1:0][PINS-1:0]         ae_stuck_mask,
  input  logic [AE_LUTS-1:0][PINS-1:0]         ae_stuck_val,
  input  logic [15:0]                          cs_stuck_mask,
  input  logic [15:0][2:0]                     cs_stuck_val,
  output logic                                 out_valid,
  output logic [FE_OUT-1:0]                    out_data,
  output logic                                 out_ok,
  output logic                                 fe_dv,
  output logic                                 ae_dv,
  output logic [1:0]                           fe_mode,
  output logic [1:0]                           fe_act_a,
  output logic [1:0]                           fe_act_b,
  output logic [1:0]                           fe_spare,
  output logic [2:0]                           ae_cur,
  output fit_state_t [4:0]                     ae_state,
  output logic [15:0]                          n_tmr,
  output logic [15:0]                          n_fe_repair,
  output logic [15:0]                          n_fe_candidates,
  output logic [15:0]                          n_ae_reload,
  output logic [15:0]                          n_ae_evolution,
  output logic [4:0][11:0]                     ae_dv_values,
  output logic                                 ae_window_done,
  output logic [2:0]                           ae_checksum,
  // CBE Duplex-mode region pair (cbe_duplex at its defaults)
  input  logic                                 cd_init,
  input  gene_t [15:0]                         cd_base,
  input  src_t  [5:0]                          cd_outsel,
  input  logic                                 cd_in_valid,
  input  logic [5:0]                           cd_x,
  input  logic [15:0][PINS-1:0]                cd_stuck_mask_l,
  input  logic [15:0][PINS-1:0]                cd_stuck_val_l,
  input  logic [15:0][PINS-1:0]                cd_stuck_mask_r,
  input  logic [15:0][PINS-1:0]                cd_stuck_val_r,
  output logic                                 cd_out_valid,
  output logic [5:0]                           cd_out_y,
  output logic                                 cd_out_ok,
  output logic                                 cd_discrepancy,
  output logic [11:0]                          cd_score,
  output logic [3:0]                           cd_cur_l,
  output logic [3:0]                           cd_cur_r,
  output fit_state_t [9:0]                     cd_state_l,
  output fit_state_t [9:0]                     cd_state_r,
  output logic [9:0][11:0]                     cd_dv_l,
  output logic [9:0][11:0]                     cd_dv_r,
  output logic [15:0]                          cd_n_discrepancy,
  output logic [15:0]                          cd_n_reload,
  output logic [15:0]                          cd_n_evolution,
  output logic                                 cd_window_done,
  // CBE TMR-mode region triple (cbe_tmr at its defaults)
  input  logic                                 ct_init,
  input  gene_t [15:0]                         ct_base,
  input  src_t  [5:0]                          ct_outsel,
  input  logic                                 ct_in_valid,
  input  logic [5:0]                           ct_x,
  input  logic [2:0][15:0][PINS-1:0]           ct_stuck_mask,
  input  logic [2:0][15:0][PINS-1:0]           ct_stuck_val,
  output logic                                 ct_out_valid,
  output logic [5:0]                           ct_out_y,
  output logic                                 ct_out_ok,
  output logic [2:0]                           ct_disc,
  output fit_state_t [2:0][9:0]                ct_state,
  output logic [15:0]                          ct_n_discrepancy,
  output logic [15:0]                          ct_n_reload,
  output logic [15:0]                          ct_n_evolution,
  output logic                                 ct_window_done
);
  logic                    started, ae_busy, accept, ae_monitor;
  logic [2:0][FE_OUT-1:0]  fe_y;
  fe_chrom_t [2:0]         fe_chrom;
  ae_chrom_t               ae_chrom;

  // Kick off the compute-checksum step once after reset.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) started <= 1'b0;
    else        started <= 1'b1;

  assign in_ready = started && !ae_busy;
  assign accept   = in_valid && in_ready;

  for (genvar k = 0; k < 3; k++) begin : g_fe
    lut_fabric #(.N_IN(FE_IN), .N_OUT(FE_OUT), .N_LUT(FE_LUTS)) u_fe (
      .x(in_data), .chrom(fe_chrom[k]), .outsel(fe_outsel()),
      .stuck_mask(fe_stuck_mask[k]), .stuck_val(fe_stuck_val[k]), .y(fe_y[k])
    );
  end

  ae_unit u_ae (
    .clk, .rst_n, .init_start(!started), .busy(ae_busy),
    .fe_a(fe_y[fe_act_a]), .fe_b(fe_y[fe_act_b]), .chrom(ae_chrom),
    .stuck_mask(ae_stuck_mask), .stuck_val(ae_stuck_val),
    .cs_stuck_mask, .cs_stuck_val, .fe_dv, .ae_dv, .checksum(ae_checksum)
  );

  // An AE configuration that the AS holds under repair is in self-repair
  // mode: it gives up observing the FEs, so its FE_DV is not acted on.
  assign ae_monitor = (ae_state[ae_cur] != ST_UNDER_REPAIR);

  fe_manager u_fem (
    .clk, .rst_n, .in_valid(accept), .fe_y, .fe_dv(fe_dv && ae_monitor), .ae_dv,
    .act_a(fe_act_a), .act_b(fe_act_b), .spare(fe_spare), .fe_chrom,
    .mode(fe_mode), .out_valid, .out_data, .out_ok,
    .n_tmr, .n_repair(n_fe_repair), .n_candidates(n_fe_candidates)
  );

  as_unit u_as (
    .clk, .rst_n, .eval_valid(accept), .ae_dv, .ae_chrom, .cur(ae_cur),
    .state(ae_state), .dv(ae_dv_values), .n_reload(n_ae_reload),
    .n_evolution(n_ae_evolution), .window_done(ae_window_done)
  );

  // Competitive reconfiguration in Duplex mode on a general LUT fabric: a
  // separate subsystem with its own ports, independent of the case study.
  cbe_duplex u_cd (
    .clk, .rst_n, .init(cd_init), .base(cd_base), .outsel(cd_outsel),
    .in_valid(cd_in_valid), .x(cd_x),
    .stuck_mask_l(cd_stuck_mask_l), .stuck_val_l(cd_stuck_val_l),
    .stuck_mask_r(cd_stuck_mask_r), .stuck_val_r(cd_stuck_val_r),
    .out_valid(cd_out_valid), .out_y(cd_out_y), .out_ok(cd_out_ok),
    .discrepancy(cd_discrepancy), .score(cd_score), .cur_l(cd_cur_l), .cur_r(cd_cur_r),
    .state_l(cd_state_l), .state_r(cd_state_r), .dv_l(cd_dv_l), .dv_r(cd_dv_r),
    .n_discrepancy(cd_n_discrepancy), .n_reload(cd_n_reload),
    .n_evolution(cd_n_evolution), .window_done(cd_window_done)
  );

  // The same scheme in TMR mode, also a separate subsystem.
  cbe_tmr u_ct (
    .clk, .rst_n, .init(ct_init), .base(ct_base), .outsel(ct_outsel),
    .in_valid(ct_in_valid), .x(ct_x), .stuck_mask(ct_stuck_mask), .stuck_val(ct_stuck_val),
    .out_valid(ct_out_valid), .out_y(ct_out_y), .out_ok(ct_out_ok), .disc(ct_disc),
    .state(ct_state), .n_discrepancy(ct_n_discrepancy), .n_reload(ct_n_reload),
    .n_evolution(ct_n_evolution), .window_done(ct_window_done)
  );
endmodule
