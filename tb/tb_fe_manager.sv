// tb_fe_manager -- checks the FE switching logic and FE repair.
//
// Three full-adder FE fabrics are driven by random inputs; the testbench
// plays the AE (fe_dv = the two active FEs differ, ae_dv = 0).
//  1. Fault-free: CED throughout, every result correct one cycle later.
//  2. Transient: a fault present for a single input causes CED -> TMR and,
//     after TMR_WIN clean inputs, TMR -> CED with no repair.
//  3. Permanent stuck-at-0 on the pin carrying b into FE1's sum LUT:
//     CED -> TMR -> REPAIR; FE1 is isolated, FEs 0 and 2 become the pair,
//     evolution repairs FE1 (which then computes a correct full adder on
//     its still faulty fabric) and it becomes the spare.
// Every result flagged out_ok must be the correct sum of the inputs.
module tb_fe_manager;
  import oes_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2:0] in_data = 0;
  logic [2:0][1:0] fe_y;
  logic fe_dv;
  logic [1:0] act_a, act_b, spare, mode;
  fe_chrom_t [2:0] fe_chrom;
  logic out_valid, out_ok;
  logic [1:0] out_data;
  logic [15:0] n_tmr, n_repair, n_cand;
  logic [2:0][FE_LUTS-1:0][3:0] sm, sv;
  int checks = 0, failures = 0, bad_ok = 0;
  logic [1:0] exp_q;

  for (genvar k = 0; k < 3; k++) begin : g_fe
    lut_fabric #(.N_IN(3), .N_OUT(2), .N_LUT(FE_LUTS)) u_fe (
      .x(in_data), .chrom(fe_chrom[k]), .outsel(fe_outsel()),
      .stuck_mask(sm[k]), .stuck_val(sv[k]), .y(fe_y[k]));
  end
  assign fe_dv = fe_y[act_a] != fe_y[act_b];

  fe_manager #(.E_FE(32), .TMR_WIN(16)) dut (
    .clk, .rst_n, .in_valid, .fe_y, .fe_dv, .ae_dv(1'b0), .act_a, .act_b, .spare,
    .fe_chrom, .mode, .out_valid, .out_data, .out_ok, .n_tmr, .n_repair, .n_candidates(n_cand));

  always #5 clk = ~clk;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t mode=%0d", what, $time, mode); end
  endtask

  function automatic logic [1:0] fa(input logic [2:0] v);
    return 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
  endfunction

  // results: one cycle after each accepted input
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_ok) begin
        checks++;
        if (out_data != exp_q) begin failures++; $display("FAIL result %b exp %b", out_data, exp_q); end
      end else bad_ok++;
    end
  end

  task automatic feed(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_data = 3'($urandom);
      @(posedge clk); exp_q <= fa(in_data);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    sm = '0; sv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1
    feed(50);
    ok(mode == 0 && n_tmr == 0 && bad_ok == 0, "fault-free stays in CED");
    // 2: FE0's carry LUT pin A1 stuck at 1 for one input with a=0,b=1,cin=0
    @(negedge clk);
    sm[0][1][0] = 1'b1; sv[0][1][0] = 1'b1;
    in_valid = 1; in_data = 3'b010;
    @(posedge clk); exp_q <= 2'b01;
    @(negedge clk); in_valid = 0; sm = '0;
    ok(mode == 1 && n_tmr == 1, "transient discrepancy starts TMR");
    feed(16);
    ok(mode == 0 && n_repair == 0, "transient: back to CED without repair");
    // 3: FE1 sum LUT (slot 0), pin A2 (input b) stuck at 0
    sm[1][0][1] = 1'b1; sv[1][0][1] = 1'b0;
    begin
      int guard = 0;
      while (mode != 2 && guard < 200) begin feed(1); guard++; end
    end
    ok(mode == 2, "permanent fault isolated, repair started");
    ok(act_a != 1 && act_b != 1 && spare == 1, "faulty FE1 taken out of the pair");
    begin
      int guard = 0;
      while (mode != 0 && guard < 20000) begin feed(1); guard++; end
      $display("repair took %0d inputs, %0d candidates", guard, n_cand);
    end
    ok(n_repair == 1 && mode == 0 && spare == 1, "FE1 repaired and made the spare");
    for (int v = 0; v < 8; v++) begin
      @(negedge clk); in_data = 3'(v);
      #1 ok(fe_y[1] == fa(3'(v)), "repaired FE1 correct on faulty fabric");
    end
    ok(bad_ok <= 3, $sformatf("few unflagged results (%0d)", bad_ok));
    feed(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
