// tb_cbe_unit -- checks consensus-based evaluation with POP=5, E=8, Q=2.
//
// Scenario (expected values worked out by hand):
//  1. individual 0 disagrees on all 8 of its evaluations, individual 1 on
//     none. 0 becomes Suspect at once (transition 2). When the second one
//     completes its window the sliding window closes: 5*8^2 > 2*8^2, so 0
//     goes Under Repair (4); 1 stays Pristine (1).
//  2. 2 and 3 complete clean windows: 0 has no complete window, unchanged.
//  3. 0 completes a clean window, as does 4: DV all zero, 0 is Refurbished (6).
//  4. 0 disagrees 3 times in 8, 1 clean: 5*9 > 2*9, back to Under Repair (8).
//  5. all five, evaluated in turn, disagree equally: nobody is an outlier, Pristine ones become
//     Suspect only. 6. clr clears one individual's DV.
module tb_cbe_unit;
  import oes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ev = 0, disc = 0, clr = 0;
  logic [2:0] idx = 0, cidx = 0;
  fit_state_t [4:0] st;
  logic [4:0][11:0] dv;
  logic wd;
  int checks = 0, failures = 0, windows = 0;

  cbe_unit dut (.clk, .rst_n, .eval_valid(ev), .eval_idx(idx), .discrepancy(disc), .weight(12'd1),
                .clr_valid(clr), .clr_idx(cidx), .state(st), .dv, .window_done(wd));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && wd) windows++;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (st=%p dv=%p)", what, st, dv); end
  endtask

  // n evaluations of individual i, the first d of them discrepant
  task automatic run(input int i, input int n, input int d);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      ev = 1; idx = 3'(i); disc = (k < d);
    end
    @(negedge clk); ev = 0; disc = 0;
    @(negedge clk);
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    ok(st == {5{ST_PRISTINE}}, "reset state");
    // 1
    @(negedge clk); ev = 1; idx = 0; disc = 1;
    @(negedge clk); ev = 0; disc = 0;
    ok(st[0] == ST_SUSPECT && dv[0] == 1, "transition 2 on first discrepancy");
    run(0, 7, 7);
    ok(dv[0] == 8 && st[0] == ST_SUSPECT, "DV accumulates, no verdict yet");
    run(1, 8, 0);
    ok(st[0] == ST_UNDER_REPAIR, "transition 4: outlier goes under repair");
    ok(st[1] == ST_PRISTINE, "transition 1: clean stays pristine");
    ok(dv[0] == 0 && windows == 1, "judged DV restarts, one window");
    // 2
    run(2, 8, 0); run(3, 8, 0);
    ok(st[0] == ST_UNDER_REPAIR && windows == 2, "unjudged individual unchanged");
    // 3
    run(0, 8, 0); run(4, 8, 0);
    ok(st[0] == ST_REFURBISHED, "transition 6: repaired individual refurbished");
    ok(st[4] == ST_PRISTINE, "4 pristine");
    // 4
    run(0, 8, 3); run(1, 8, 0);
    ok(st[0] == ST_UNDER_REPAIR, "transition 8: refurbished falls back");
    // 5: everyone disagrees 4 times out of 8
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 5; i++) run(i, 1, (k < 4) ? 1 : 0);
    ok(st[1] == ST_SUSPECT && st[2] == ST_SUSPECT && st[3] == ST_SUSPECT && st[4] == ST_SUSPECT,
       "pervasive: suspects, no outliers");
    ok(st[0] == ST_REFURBISHED, "0 at consensus level refurbished");
    // 6
    run(2, 3, 3);
    ok(dv[2] == 3, "dv before clear");
    @(negedge clk); clr = 1; cidx = 2;
    @(negedge clk); clr = 0;
    ok(dv[2] == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
