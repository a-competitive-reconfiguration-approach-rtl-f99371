// tb_cbe_duplex -- end-to-end test of the Duplex-mode competitive
// reconfiguration at its default sizes (6 inputs, 6 outputs, 16 LUTs, ten
// configurations per half, Hamming scoring).
//
// Circuit: a 2-bit adder a + b + cin on inputs {cin, b1, b0, a1, a0},
// mapped to four LUTs (sum0, carry1, sum1, carry2); outputs 0-2 are
// {carry2, sum1, sum0}, outputs 3-5 are tied to input 0 by the output
// selection. The pools are seeded from this mapping.
//  1. Fault-free: no discrepancy for 400 random inputs, every result right.
//  2. Stuck-at-1 on input pin A1 of physical LUT 3 of region L. It hits
//     the L configurations whose logic uses that LUT (shifts 0 to 3), for
//     some inputs only. Expected: discrepancies, the detector's flag and
//     score equal to the Hamming distance worked out here, every result
//     flagged good is right, faulty L configurations go Under Repair,
//     offspring are bred and refurbished, and the discrepancy rate over the
//     last 2000 inputs is far below that over the first 2000 after the
//     fault. L configurations 4 to 9 never use the faulty LUT, so they
//     never show a discrepancy and must never be sent to repair.
// A second instance with bit-weight scoring runs alongside; its detector
// score must equal |L - R| of the two modelled output words.
// Mechanisms counted: discrepancies, reloads, offspring, sliding windows,
// L Under Repair and Refurbished states; one that never happens fails.
module tb_cbe_duplex;
  import oes_pkg::*;
  localparam int N_IN = 6, N_OUT = 6, N_LUT = 16, POP_H = 10;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [N_IN-1:0] x = 0;
  gene_t [N_LUT-1:0] base;
  src_t [N_OUT-1:0] outsel;
  logic [N_LUT-1:0][PINS-1:0] sml = '0, svl = '0, smr = '0, svr = '0;
  logic out_valid, out_ok, disc, wd;
  logic [N_OUT-1:0] out_y;
  logic [11:0] score;
  logic [3:0] cur_l, cur_r;
  fit_state_t [POP_H-1:0] st_l, st_r;
  logic [POP_H-1:0][11:0] dv_l, dv_r;
  logic [15:0] n_disc, n_reload, n_evo;
  int checks = 0, failures = 0;
  int c_disc = 0, c_ur = 0, c_ref = 0, c_win = 0, c_healthy_ur = 0;
  logic [N_IN-1:0] x_q;

  cbe_duplex dut (.clk, .rst_n, .init, .base, .outsel, .in_valid, .x,
    .stuck_mask_l(sml), .stuck_val_l(svl), .stuck_mask_r(smr), .stuck_val_r(svr),
    .out_valid, .out_y, .out_ok, .discrepancy(disc), .score, .cur_l, .cur_r,
    .state_l(st_l), .state_r(st_r), .dv_l, .dv_r, .n_discrepancy(n_disc),
    .n_reload, .n_evolution(n_evo), .window_done(wd));

  // Second instance with bit-weight scoring, fed the same inputs and fault;
  // only its detector is checked.
  logic disc_b, out_valid_b, out_ok_b, wd_b;
  logic [N_OUT-1:0] out_y_b;
  logic [11:0] score_b;
  logic [3:0] cur_lb, cur_rb;
  fit_state_t [POP_H-1:0] st_lb, st_rb;
  logic [POP_H-1:0][11:0] dv_lb, dv_rb;
  logic [15:0] n_disc_b, n_reload_b, n_evo_b;
  cbe_duplex #(.HAMMING(1'b0)) dut_bw (.clk, .rst_n, .init, .base, .outsel, .in_valid, .x,
    .stuck_mask_l(sml), .stuck_val_l(svl), .stuck_mask_r(smr), .stuck_val_r(svr),
    .out_valid(out_valid_b), .out_y(out_y_b), .out_ok(out_ok_b), .discrepancy(disc_b),
    .score(score_b), .cur_l(cur_lb), .cur_r(cur_rb), .state_l(st_lb), .state_r(st_rb),
    .dv_l(dv_lb), .dv_r(dv_rb), .n_discrepancy(n_disc_b), .n_reload(n_reload_b),
    .n_evolution(n_evo_b), .window_done(wd_b));
  int c_bw = 0;

  always #5 clk = ~clk;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [N_OUT-1:0] expect_y(input logic [N_IN-1:0] v);
    logic [2:0] s;
    s = 3'(v[1:0]) + 3'(v[3:2]) + 3'(v[4]);
    return {{3{v[0]}}, s};
  endfunction

  // Reference model of region L's output with the injected fault: the
  // resident configuration evaluated gene by gene in the testbench.
  function automatic logic [N_OUT-1:0] model_y(input gene_t [N_LUT-1:0] c,
                                              input logic [N_IN-1:0] v,
                                              input logic [N_LUT-1:0][PINS-1:0] m,
                                              input logic [N_LUT-1:0][PINS-1:0] sv);
    logic [N_IN+N_LUT-1:0] sig;
    logic [N_OUT-1:0] o;
    sig = '0;
    sig[N_IN-1:0] = v;
    for (int g = 0; g < N_LUT; g++) begin
      logic [3:0] a;
      for (int p = 0; p < PINS; p++)
        a[p] = m[c[g].slot][p] ? sv[c[g].slot][p] : sig[c[g].src[p]];
      sig[N_IN+g] = c[g].content[a];
    end
    for (int k = 0; k < N_OUT; k++) o[k] = sig[outsel[k]];
    return o;
  endfunction

  // Results: every result flagged good must be the right sum.
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_ok && out_y != expect_y(x_q)) begin
      failures++; $display("FAIL result %b for %b", out_y, x_q);
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (in_valid) x_q <= x;
    if (in_valid && disc) c_disc++;
    if (wd) c_win++;
    for (int k = 0; k < POP_H; k++) begin
      if (st_l[k] == ST_UNDER_REPAIR) c_ur++;
      if (st_l[k] == ST_REFURBISHED) c_ref++;
      if (k >= 4 && st_l[k] == ST_UNDER_REPAIR) c_healthy_ur++;
    end
  end

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d_first, d_last, evo_before;
    logic [N_OUT-1:0] yl, yr;
    for (int g = 0; g < N_LUT; g++) base[g] = mk_gene(g, 0, 0, 0, 0, 16'h0000);
    base[0] = mk_gene(0, 0, 2, 4, 0, T_XOR3);                 // sum0
    base[1] = mk_gene(1, 0, 2, 4, 0, T_MAJ3);                 // carry1
    base[2] = mk_gene(2, 1, 3, N_IN + 1, 0, T_XOR3);          // sum1
    base[3] = mk_gene(3, 1, 3, N_IN + 1, 0, T_MAJ3);          // carry2
    outsel = '0;
    outsel[0] = src_t'(N_IN + 0);
    outsel[1] = src_t'(N_IN + 2);
    outsel[2] = src_t'(N_IN + 3);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    // 1. fault-free
    for (int i = 0; i < 400; i++) begin
      x = N_IN'($urandom); in_valid = 1; @(negedge clk);
    end
    ok(n_disc == 0, "no discrepancy without a fault");
    ok(st_l == {POP_H{ST_PRISTINE}} && st_r == {POP_H{ST_PRISTINE}}, "all pristine");
    // 2. permanent fault in region L
    sml[3][0] = 1'b1; svl[3][0] = 1'b1;
    d_first = 0; d_last = 0; evo_before = int'(n_evo);
    for (int i = 0; i < 30000; i++) begin
      x = N_IN'($urandom); in_valid = 1;
      #1;
      // the detector, checked against a model of both regions
      yl = model_y(dut.chrom_l, x, sml, svl);
      yr = model_y(dut.chrom_r, x, smr, svr);
      checks++;
      if (disc != (yl != yr) || int'(score) != $countones(yl ^ yr)) begin
        failures++; $display("FAIL detector disc=%b score=%0d yl=%b yr=%b", disc, score, yl, yr);
      end
      yl = model_y(dut_bw.chrom_l, x, sml, svl);
      yr = model_y(dut_bw.chrom_r, x, smr, svr);
      checks++;
      if (disc_b != (yl != yr) || int'(score_b) != ((yl > yr) ? int'(yl) - int'(yr) : int'(yr) - int'(yl))) begin
        failures++; $display("FAIL bit-weight detector disc=%b score=%0d yl=%b yr=%b", disc_b, score_b, yl, yr);
      end
      if (disc_b) c_bw++;
      if (i < 2000 && disc) d_first++;
      if (i >= 28000 && disc) d_last++;
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    $display("discrepancies: first 2000 %0d, last 2000 %0d; reloads %0d offspring %0d",
             d_first, d_last, n_reload, n_evo);
    $display("L states %p", st_l);
    $display("R states %p", st_r);
    ok(d_first >= 10, "the fault shows");
    ok(d_last * 4 < d_first, "discrepancy rate falls as L is refurbished");
    ok(int'(n_evo) > evo_before, "offspring bred");
    ok(int'(n_disc) == c_disc, "discrepancy counter");
    ok(c_healthy_ur == 0, "L configurations that avoid the faulty LUT never go under repair");
    // mechanisms
    $display("mechanisms: discrepancies=%0d reloads=%0d offspring=%0d windows=%0d under_repair=%0d refurbished=%0d",
             c_disc, n_reload, n_evo, c_win, c_ur, c_ref);
    ok(c_disc > 0, "mechanism: discrepancy");
    ok(c_bw > 0, "mechanism: bit-weight scored discrepancy");
    ok(n_reload > 0, "mechanism: reload");
    ok(n_evo > 0, "mechanism: evolution");
    ok(c_win > 0, "mechanism: sliding window");
    ok(c_ur > 0, "mechanism: under repair");
    ok(c_ref > 0, "mechanism: refurbished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
