// tb_oes_top -- end-to-end test of the self-repairing full adder at its
// default (and only) configuration.
//
// Phases:
//  1. reset and compute-checksum step (in_ready low for 16 cycles after the
//     first clock);
//  2. fault-free stream: every result correct, one cycle after its input;
//  3. permanent stuck-at on FE0's carry LUT: the AE reports FE_DV, CED turns
//     into TMR, FE0 is isolated, repaired by evolution and becomes the spare;
//  4. permanent stuck-at on the AE fabric that only AE placement 4 uses: AE_DV
//     events, reloads, CBE marks it Under Repair, offspring are bred until
//     one is Refurbished.
//  5. in parallel, the Duplex-mode subsystem runs a 2-bit adder; a stuck
//     pin in its region L must cause flagged discrepancies, reloads, Under
//     Repair, offspring and Refurbished configurations; likewise the
//     TMR-mode subsystem with a stuck pin in region 0, whose voted results
//     must all be right.
// Throughout, every result flagged out_ok must equal a + b + cin. Each
// mechanism is counted and a mechanism that never happened is a failure.
module tb_oes_top;
  import oes_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [2:0] in_data = 0;
  logic [2:0][FE_LUTS-1:0][3:0] fsm, fsv;
  logic [AE_LUTS-1:0][3:0] asm_, asv;
  logic out_valid, out_ok, fe_dv, ae_dv, ae_wd;
  logic [1:0] out_data, mode, act_a, act_b, spare;
  logic [2:0] ae_cur, ae_cs;
  fit_state_t [4:0] ae_state;
  logic [4:0][11:0] ae_dvv;
  logic [15:0] n_tmr, n_rep, n_cand, n_rel, n_evo;
  int checks = 0, failures = 0;
  int c_fe_dv = 0, c_ae_dv = 0, c_tmr_cycles = 0, c_isolated = 0, c_ae_repair = 0,
      c_ae_refurb = 0, c_flagged = 0, c_windows = 0;
  logic [1:0] exp_q;
  // Duplex-mode subsystem
  logic cd_init = 0, cd_in_valid = 0, cd_out_valid, cd_out_ok, cd_disc, cd_wd, cd_done = 0;
  logic [5:0] cd_x = 0, cd_out_y, cd_xq;
  gene_t [15:0] cd_base;
  src_t [5:0] cd_outsel;
  logic [15:0][3:0] cd_sml = '0, cd_svl = '0, cd_smr = '0, cd_svr = '0;
  logic [11:0] cd_score;
  logic [3:0] cd_cur_l, cd_cur_r;
  fit_state_t [9:0] cd_st_l, cd_st_r;
  logic [9:0][11:0] cd_dv_l, cd_dv_r;
  logic [15:0] cd_n_disc, cd_n_rel, cd_n_evo;
  // TMR-mode subsystem
  logic ct_init = 0, ct_in_valid = 0, ct_out_valid, ct_out_ok, ct_wd, ct_done = 0;
  logic [5:0] ct_x = 0, ct_out_y, ct_xq;
  logic [2:0][15:0][3:0] ct_sm = '0, ct_sv = '0;
  logic [2:0] ct_disc;
  fit_state_t [2:0][9:0] ct_st;
  logic [15:0] ct_n_disc, ct_n_rel, ct_n_evo;
  int c_ct_disc = 0, c_ct_ur = 0, c_ct_ref = 0;
  int c_cd_disc = 0, c_cd_ur = 0, c_cd_ref = 0, c_cd_win = 0, c_cd_flag = 0;

  oes_top dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .fe_stuck_mask(fsm), .fe_stuck_val(fsv), .ae_stuck_mask(asm_), .ae_stuck_val(asv),
    .cs_stuck_mask(16'h0), .cs_stuck_val('0),
    .out_valid, .out_data, .out_ok, .fe_dv, .ae_dv, .fe_mode(mode),
    .fe_act_a(act_a), .fe_act_b(act_b), .fe_spare(spare), .ae_cur, .ae_state,
    .n_tmr, .n_fe_repair(n_rep), .n_fe_candidates(n_cand), .n_ae_reload(n_rel),
    .n_ae_evolution(n_evo), .ae_dv_values(ae_dvv), .ae_window_done(ae_wd), .ae_checksum(ae_cs),
    .cd_init, .cd_base, .cd_outsel, .cd_in_valid, .cd_x,
    .cd_stuck_mask_l(cd_sml), .cd_stuck_val_l(cd_svl), .cd_stuck_mask_r(cd_smr), .cd_stuck_val_r(cd_svr),
    .cd_out_valid, .cd_out_y, .cd_out_ok, .cd_discrepancy(cd_disc), .cd_score,
    .cd_cur_l, .cd_cur_r, .cd_state_l(cd_st_l), .cd_state_r(cd_st_r), .cd_dv_l, .cd_dv_r,
    .cd_n_discrepancy(cd_n_disc), .cd_n_reload(cd_n_rel), .cd_n_evolution(cd_n_evo),
    .cd_window_done(cd_wd),
    .ct_init, .ct_base(cd_base), .ct_outsel(cd_outsel), .ct_in_valid, .ct_x,
    .ct_stuck_mask(ct_sm), .ct_stuck_val(ct_sv), .ct_out_valid, .ct_out_y, .ct_out_ok,
    .ct_disc, .ct_state(ct_st), .ct_n_discrepancy(ct_n_disc), .ct_n_reload(ct_n_rel),
    .ct_n_evolution(ct_n_evo), .ct_window_done(ct_wd));

  always #5 clk = ~clk;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && fe_dv) c_fe_dv++;
    if (in_valid && in_ready && ae_dv) c_ae_dv++;
    if (mode == 2'd1) c_tmr_cycles++;
    if (mode == 2'd2) c_isolated++;
    if (ae_state[4] == ST_UNDER_REPAIR) c_ae_repair++;
    if (ae_state[4] == ST_REFURBISHED) c_ae_refurb++;
    if (ae_wd) c_windows++;
    if (out_valid) begin
      if (out_ok) begin
        checks++;
        if (out_data != exp_q) begin failures++; $display("FAIL result %b exp %b @%0t", out_data, exp_q, $time); end
      end else c_flagged++;
    end
  end

  // Duplex subsystem: a 2-bit adder {c2,s1,s0} = a + b + cin on inputs
  // {cin, b1, b0, a1, a0}; outputs 3-5 follow input 0.
  always @(posedge clk) if (rst_n) begin
    if (cd_in_valid) cd_xq <= cd_x;
    if (cd_in_valid && cd_disc) c_cd_disc++;
    if (cd_wd) c_cd_win++;
    for (int k = 0; k < 10; k++) begin
      if (cd_st_l[k] == ST_UNDER_REPAIR) c_cd_ur++;
      if (cd_st_l[k] == ST_REFURBISHED) c_cd_ref++;
    end
    if (cd_out_valid) begin
      if (cd_out_ok) begin
        logic [2:0] sum;
        sum = 3'(cd_xq[1:0]) + 3'(cd_xq[3:2]) + 3'(cd_xq[4]);
        checks++;
        if (cd_out_y != {{3{cd_xq[0]}}, sum}) begin
          failures++; $display("FAIL duplex result %b for %b", cd_out_y, cd_xq);
        end
      end else c_cd_flag++;
    end
  end

  initial begin
    for (int g = 0; g < 16; g++) cd_base[g] = mk_gene(g, 0, 0, 0, 0, 16'h0000);
    cd_base[0] = mk_gene(0, 0, 2, 4, 0, T_XOR3);
    cd_base[1] = mk_gene(1, 0, 2, 4, 0, T_MAJ3);
    cd_base[2] = mk_gene(2, 1, 3, 7, 0, T_XOR3);
    cd_base[3] = mk_gene(3, 1, 3, 7, 0, T_MAJ3);
    cd_outsel = '0;
    cd_outsel[0] = src_t'(6);
    cd_outsel[1] = src_t'(8);
    cd_outsel[2] = src_t'(9);
    wait (rst_n);
    @(negedge clk); cd_init = 1;
    @(negedge clk); cd_init = 0;
    for (int i = 0; i < 300; i++) begin cd_x = 6'($urandom); cd_in_valid = 1; @(negedge clk); end
    // stuck-at-1 on pin A1 of physical LUT 3 of region L
    cd_sml[3][0] = 1'b1; cd_svl[3][0] = 1'b1;
    for (int i = 0; i < 6000; i++) begin cd_x = 6'($urandom); cd_in_valid = 1; @(negedge clk); end
    cd_in_valid = 0;
    @(negedge clk);
    cd_done = 1;
  end

  // TMR subsystem: same adder; one faulty region, so every voted result
  // must be right.
  always @(posedge clk) if (rst_n) begin
    if (ct_in_valid) ct_xq <= ct_x;
    if (ct_in_valid && |ct_disc) c_ct_disc++;
    for (int k = 0; k < 10; k++) begin
      if (ct_st[0][k] == ST_UNDER_REPAIR) c_ct_ur++;
      if (ct_st[0][k] == ST_REFURBISHED) c_ct_ref++;
    end
    if (ct_out_valid) begin
      logic [2:0] sum;
      sum = 3'(ct_xq[1:0]) + 3'(ct_xq[3:2]) + 3'(ct_xq[4]);
      checks++;
      if (ct_out_y != {{3{ct_xq[0]}}, sum}) begin
        failures++; $display("FAIL TMR-mode result %b for %b", ct_out_y, ct_xq);
      end
    end
  end

  initial begin
    wait (rst_n);
    @(negedge clk); ct_init = 1;
    @(negedge clk); ct_init = 0;
    for (int i = 0; i < 300; i++) begin ct_x = 6'($urandom); ct_in_valid = 1; @(negedge clk); end
    ct_sm[0][3][0] = 1'b1; ct_sv[0][3][0] = 1'b1;
    for (int i = 0; i < 6000; i++) begin ct_x = 6'($urandom); ct_in_valid = 1; @(negedge clk); end
    ct_in_valid = 0;
    @(negedge clk);
    ct_done = 1;
  end

  task automatic feed1(input logic [2:0] v);
    @(negedge clk);
    in_valid = 1; in_data = v;
    @(posedge clk); exp_q <= 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, guard;
    fsm = '0; fsv = '0; asm_ = '0; asv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1
    n = 0;
    @(posedge clk); #1;
    while (!in_ready) begin @(posedge clk); #1; n++; end
    ok(n == 16, $sformatf("checksum step took %0d cycles", n));
    // 2
    for (int i = 0; i < 100; i++) feed1(3'($urandom));
    ok(c_flagged == 0 && n_tmr == 0 && mode == 0, "fault-free operation");
    // 3: FE0 carry LUT (slot 1) pin A3 (cin) stuck at 1
    fsm[0][1][2] = 1'b1; fsv[0][1][2] = 1'b1;
    guard = 0;
    while (n_rep == 0 && guard < 5000) begin feed1(3'($urandom)); guard++; end
    $display("FE repair after %0d inputs, %0d candidates, spare=%0d", guard, n_cand, spare);
    ok(n_rep == 1 && spare == 2'd0 && mode == 0, "FE0 repaired and made the spare");
    for (int i = 0; i < 100; i++) feed1(3'($urandom));
    // 4: AE fabric slot 0 pin A3 stuck at 1
    asm_[0][2] = 1'b1; asv[0][2] = 1'b1;
    guard = 0;
    while (c_ae_refurb == 0 && guard < 20000) begin feed1(3'($urandom)); guard++; end
    $display("AE individual 4 refurbished after %0d inputs: %0d reloads, %0d offspring",
             guard, n_rel, n_evo);
    for (int i = 0; i < 200; i++) feed1(3'($urandom));
    wait (cd_done && ct_done);
    // mechanisms
    $display("mechanisms: fe_dv=%0d tmr_cycles=%0d fe_isolated_cycles=%0d fe_candidates=%0d fe_repairs=%0d",
             c_fe_dv, c_tmr_cycles, c_isolated, n_cand, n_rep);
    $display("            ae_dv=%0d ae_reloads=%0d ae_offspring=%0d ae_under_repair_cycles=%0d ae_refurbished_cycles=%0d cbe_windows=%0d flagged=%0d",
             c_ae_dv, n_rel, n_evo, c_ae_repair, c_ae_refurb, c_windows, c_flagged);
    ok(c_fe_dv > 0, "FE discrepancy detected");
    ok(n_tmr > 0 && c_tmr_cycles > 0, "CED to TMR switch");
    ok(c_isolated > 0, "faulty FE isolated (standby under repair)");
    ok(n_cand > 0 && n_rep > 0, "FE evolutionary repair");
    ok(c_ae_dv > 0, "AE discrepancy detected");
    ok(n_rel > 0, "AE configuration reloads");
    ok(c_windows > 0, "CBE sliding windows closed");
    ok(c_ae_repair > 0, "AE individual under repair");
    ok(n_evo > 0, "AE offspring bred");
    ok(c_ae_refurb > 0, "AE individual refurbished");
    $display("duplex: discrepancies=%0d flagged=%0d reloads=%0d offspring=%0d windows=%0d L_under_repair_cycles=%0d L_refurbished_cycles=%0d",
             c_cd_disc, c_cd_flag, cd_n_rel, cd_n_evo, c_cd_win, c_cd_ur, c_cd_ref);
    ok(c_cd_disc > 0 && int'(cd_n_disc) == c_cd_disc && c_cd_flag == c_cd_disc, "duplex discrepancies detected and flagged");
    ok(cd_n_rel > 0, "duplex reloads");
    ok(c_cd_win > 0, "duplex sliding windows closed");
    ok(c_cd_ur > 0, "duplex configuration under repair");
    ok(cd_n_evo > 0, "duplex offspring bred");
    ok(c_cd_ref > 0, "duplex configuration refurbished");
    $display("tmr mode: discrepancies=%0d reloads=%0d offspring=%0d under_repair_cycles=%0d refurbished_cycles=%0d",
             c_ct_disc, ct_n_rel, ct_n_evo, c_ct_ur, c_ct_ref);
    ok(c_ct_disc > 0 && int'(ct_n_disc) == c_ct_disc, "TMR-mode discrepancies against the vote");
    ok(ct_n_rel > 0 && ct_n_evo > 0, "TMR-mode reloads and offspring");
    ok(c_ct_ur > 0 && c_ct_ref > 0, "TMR-mode configuration under repair and refurbished");
    for (int i = 0; i < 5; i++)
      if (i != 4) ok(ae_state[i] != ST_UNDER_REPAIR, "healthy AE never under repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
