// tb_cbe_tmr -- test of the TMR-mode competitive reconfiguration at its
// default sizes (6 inputs, 6 outputs, 16 LUTs, ten configurations per
// region).
//
// Circuit: the same 2-bit adder as the Duplex test, {c2,s1,s0} = a + b + cin
// on inputs {cin, b1, b0, a1, a0}; outputs 3-5 follow input 0.
//  1. Fault-free: no discrepancy for 400 random inputs.
//  2. Stuck-at-1 on pin A1 of physical LUT 3 of region 0. With one faulty
//     region the vote is always right, so every voted result must be the
//     right sum, flagged or not. Each region's discrepancy flag must match
//     a model of the three regions and their majority. Regions 1 and 2
//     never disagree with the vote, so none of their configurations may go
//     Under Repair; in region 0 only configurations 0-3 use LUT 3, so 4-9
//     must not either. Faulty region-0 configurations must go Under
//     Repair, be bred and come back Refurbished, and the discrepancy rate
//     must fall.
// Mechanisms counted: discrepancies, reloads, offspring, sliding windows,
// Under Repair and Refurbished states.
module tb_cbe_tmr;
  import oes_pkg::*;
  localparam int N_IN = 6, N_OUT = 6, N_LUT = 16, POP_M = 10;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0;
  logic [N_IN-1:0] x = 0, x_q;
  gene_t [N_LUT-1:0] base;
  src_t [N_OUT-1:0] outsel;
  logic [2:0][N_LUT-1:0][PINS-1:0] sm = '0, sv = '0;
  logic out_valid, out_ok, wd;
  logic [2:0] disc;
  logic [N_OUT-1:0] out_y;
  fit_state_t [2:0][POP_M-1:0] st;
  logic [15:0] n_disc, n_reload, n_evo;
  int checks = 0, failures = 0;
  int c_disc = 0, c_ur = 0, c_ref = 0, c_win = 0, c_bad_ur = 0, c_flag = 0;

  cbe_tmr dut (.clk, .rst_n, .init, .base, .outsel, .in_valid, .x,
    .stuck_mask(sm), .stuck_val(sv), .out_valid, .out_y, .out_ok, .disc,
    .state(st), .n_discrepancy(n_disc), .n_reload, .n_evolution(n_evo), .window_done(wd));

  always #5 clk = ~clk;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [N_OUT-1:0] model_y(input gene_t [N_LUT-1:0] c,
                                              input logic [N_IN-1:0] v,
                                              input logic [N_LUT-1:0][PINS-1:0] m,
                                              input logic [N_LUT-1:0][PINS-1:0] s);
    logic [N_IN+N_LUT-1:0] sig;
    logic [N_OUT-1:0] o;
    sig = '0;
    sig[N_IN-1:0] = v;
    for (int g = 0; g < N_LUT; g++) begin
      logic [3:0] a;
      for (int p = 0; p < PINS; p++)
        a[p] = m[c[g].slot][p] ? s[c[g].slot][p] : sig[c[g].src[p]];
      sig[N_IN+g] = c[g].content[a];
    end
    for (int k = 0; k < N_OUT; k++) o[k] = sig[outsel[k]];
    return o;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid) x_q <= x;
    if (in_valid && |disc) c_disc++;
    if (wd) c_win++;
    for (int k = 0; k < POP_M; k++) begin
      if (st[0][k] == ST_UNDER_REPAIR) c_ur++;
      if (st[0][k] == ST_REFURBISHED) c_ref++;
      if (k >= 4 && st[0][k] == ST_UNDER_REPAIR) c_bad_ur++;
      if (st[1][k] == ST_UNDER_REPAIR || st[2][k] == ST_UNDER_REPAIR) c_bad_ur++;
    end
    if (out_valid) begin
      logic [2:0] s;
      s = 3'(x_q[1:0]) + 3'(x_q[3:2]) + 3'(x_q[4]);
      checks++;
      if (out_y != {{3{x_q[0]}}, s}) begin
        failures++; $display("FAIL voted result %b for %b", out_y, x_q);
      end
      if (!out_ok) c_flag++;
    end
  end

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d_first, d_last;
    logic [N_OUT-1:0] y0, y1, y2, v;
    for (int g = 0; g < N_LUT; g++) base[g] = mk_gene(g, 0, 0, 0, 0, 16'h0000);
    base[0] = mk_gene(0, 0, 2, 4, 0, T_XOR3);
    base[1] = mk_gene(1, 0, 2, 4, 0, T_MAJ3);
    base[2] = mk_gene(2, 1, 3, N_IN + 1, 0, T_XOR3);
    base[3] = mk_gene(3, 1, 3, N_IN + 1, 0, T_MAJ3);
    outsel = '0;
    outsel[0] = src_t'(N_IN + 0);
    outsel[1] = src_t'(N_IN + 2);
    outsel[2] = src_t'(N_IN + 3);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    for (int i = 0; i < 400; i++) begin
      x = N_IN'($urandom); in_valid = 1; @(negedge clk);
    end
    ok(n_disc == 0, "no discrepancy without a fault");
    sm[0][3][0] = 1'b1; sv[0][3][0] = 1'b1;
    d_first = 0; d_last = 0;
    for (int i = 0; i < 30000; i++) begin
      x = N_IN'($urandom); in_valid = 1;
      #1;
      y0 = model_y(dut.g_mod[0].chrom, x, sm[0], sv[0]);
      y1 = model_y(dut.g_mod[1].chrom, x, sm[1], sv[1]);
      y2 = model_y(dut.g_mod[2].chrom, x, sm[2], sv[2]);
      v  = (y0 & y1) | (y0 & y2) | (y1 & y2);
      checks++;
      if (disc != {y2 != v, y1 != v, y0 != v}) begin
        failures++; $display("FAIL discrepancy flags %b", disc);
      end
      if (i < 2000 && |disc) d_first++;
      if (i >= 28000 && |disc) d_last++;
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    $display("discrepancies: first 2000 %0d, last 2000 %0d; reloads %0d offspring %0d",
             d_first, d_last, n_reload, n_evo);
    ok(d_first >= 10, "the fault shows");
    ok(d_last * 4 < d_first, "discrepancy rate falls as region 0 is refurbished");
    ok(c_bad_ur == 0, "only configurations using the faulty LUT go under repair");
    ok(int'(n_disc) == c_disc && c_flag == c_disc, "discrepancy counter and flags");
    $display("mechanisms: discrepancies=%0d reloads=%0d offspring=%0d windows=%0d under_repair=%0d refurbished=%0d",
             c_disc, n_reload, n_evo, c_win, c_ur, c_ref);
    ok(c_disc > 0, "mechanism: discrepancy");
    ok(n_reload > 0, "mechanism: reload");
    ok(n_evo > 0, "mechanism: evolution");
    ok(c_win > 0, "mechanism: sliding window");
    ok(c_ur > 0, "mechanism: under repair");
    ok(c_ref > 0, "mechanism: refurbished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
