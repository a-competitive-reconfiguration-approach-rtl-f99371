// tb_as_unit -- checks the Autonomic Supervisor with a real AE.
//
// The AE fabric gets a stuck-at-0 fault on physical slot 0, pin A3. Of the
// five AE placements only number 4 uses that pin (its Checking-Sum XOR3 sits
// on slot 0 and reads the Evaluator there), so only individual 4 is faulty,
// and only when the two FE results differ. Random FE result pairs are fed.
// Expected: individual 4 becomes Suspect, then Under Repair; the AS breeds
// offspring for it and eventually one that avoids the fault, which the CBE
// marks Refurbished; the four healthy individuals never go Under Repair;
// every AE_DV makes the AS load another configuration on the next edge;
// when individual 4 is loaded after refurbishment it is silent for all 16
// FE result combinations.
module tb_as_unit;
  import oes_pkg::*;
  logic clk = 0, rst_n = 0, ev = 0, init_start = 0, busy;
  logic [1:0] fe_a = 0, fe_b = 0;
  ae_chrom_t chrom;
  logic [AE_LUTS-1:0][3:0] sm, sv;
  logic fe_dv, ae_dv;
  logic [2:0] cur;
  fit_state_t [4:0] st;
  logic [4:0][11:0] dv;
  logic [15:0] n_reload, n_evo;
  logic wd;
  int checks = 0, failures = 0;
  int seen_suspect = 0, seen_repair = 0, seen_refurb = 0, dv_reloads = 0;

  ae_unit u_ae (.clk, .rst_n, .init_start, .busy, .fe_a, .fe_b, .chrom,
                .stuck_mask(sm), .stuck_val(sv), .cs_stuck_mask(16'h0), .cs_stuck_val('0),
                .fe_dv, .ae_dv, .checksum());
  as_unit dut (.clk, .rst_n, .eval_valid(ev), .ae_dv, .ae_chrom(chrom), .cur, .state(st),
               .dv, .n_reload, .n_evolution(n_evo), .window_done(wd));

  always #5 clk = ~clk;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t st=%p", what, $time, st); end
  endtask

  logic       was_dv;
  logic [2:0] was_cur;
  always @(posedge clk) begin
    was_dv  <= ev && ae_dv;
    was_cur <= cur;
    if (rst_n) begin
      if (st[4] == ST_SUSPECT) seen_suspect++;
      if (st[4] == ST_UNDER_REPAIR) seen_repair++;
      if (st[4] == ST_REFURBISHED) seen_refurb++;
      for (int i = 0; i < 4; i++)
        if (st[i] == ST_UNDER_REPAIR) begin
          failures++; $display("FAIL healthy individual %0d under repair", i);
        end
    end
  end
  always @(negedge clk)
    if (rst_n && was_dv) begin
      checks++; dv_reloads++;
      if (cur == was_cur) begin failures++; $display("FAIL no reload after AE_DV"); end
    end

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int guard;
    sm = '0; sv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init_start = 1;
    @(negedge clk); init_start = 0;
    while (busy) @(negedge clk);
    sm[0][2] = 1'b1; sv[0][2] = 1'b0;
    guard = 0;
    while (guard < 100000) begin
      @(negedge clk);
      if (st[4] == ST_REFURBISHED && cur == 3'd4) break;
      ev = 1; {fe_b, fe_a} = 4'($urandom);
      guard++;
    end
    ev = 0;
    $display("refurbished after %0d evaluations, %0d reloads, %0d offspring", guard, n_reload, n_evo);
    ok(seen_suspect > 0, "individual 4 was Suspect");
    ok(seen_repair > 0, "individual 4 was Under Repair");
    ok(st[4] == ST_REFURBISHED, "individual 4 Refurbished");
    ok(n_evo > 0 && n_reload > n_evo, "offspring bred and reloads counted");
    ok(dv_reloads > 0, "discrepancy-triggered reloads happened");
    ok(cur == 3'd4, "refurbished individual loaded");
    for (int v = 0; v < 16; v++) begin
      {fe_b, fe_a} = 4'(v);
      #1 ok(!ae_dv, "refurbished configuration silent on faulty fabric");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
