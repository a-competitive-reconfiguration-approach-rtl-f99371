// tb_ae_unit -- checks the Autonomic Element.
//
//  1. The compute-checksum step keeps busy high for exactly 16 cycles.
//  2. Fault-free: for all 16 combinations of the two FE results, FE_DV is
//     (fe_a != fe_b), the checksum equals ds + dc + 2*(ds|dc) (ds, dc the
//     sum/carry mismatches: the four compressed signals are ds, dc and the
//     evaluator/actuator bit twice) and AE_DV stays low.
//  3. A stuck-at-1 on the physical pin carrying sum_a into the CED XOR makes
//     the checksum disagree with the table exactly when sum_a = 0.
//  4. Moving that XOR's signal off the faulty pin (pin 1 <-> pin 4 exchange
//     with the content rewritten in the testbench) clears every AE_DV.
//  5. A corrupted CS-LUT entry raises AE_DV for that entry only.
module tb_ae_unit;
  import oes_pkg::*;
  logic clk = 0, rst_n = 0, init_start = 0, busy;
  logic [1:0] fe_a, fe_b;
  ae_chrom_t chrom;
  logic [AE_LUTS-1:0][3:0] sm, sv;
  logic [15:0] csm;
  logic [15:0][2:0] csv;
  logic fe_dv, ae_dv;
  logic [2:0] cs;
  int checks = 0, failures = 0;

  ae_unit dut (.clk, .rst_n, .init_start, .busy, .fe_a, .fe_b, .chrom,
               .stuck_mask(sm), .stuck_val(sv), .cs_stuck_mask(csm), .cs_stuck_val(csv),
               .fe_dv, .ae_dv, .checksum(cs));

  always #5 clk = ~clk;

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s a=%b b=%b fe_dv=%b ae_dv=%b cs=%b", what, fe_a, fe_b, fe_dv, ae_dv, cs); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    chrom = ae_reference(0);
    sm = '0; sv = '0; csm = '0; csv = '0; fe_a = 0; fe_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init_start = 1;
    @(negedge clk); init_start = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    ok(n == 16, $sformatf("checksum step length %0d", n));
    // 2
    for (int v = 0; v < 16; v++) begin
      int ds, dc, tot;
      {fe_b, fe_a} = 4'(v);
      ds = int'(fe_a[0] != fe_b[0]); dc = int'(fe_a[1] != fe_b[1]);
      tot = ds + dc + 2 * (ds | dc);
      #1;
      ok(fe_dv == (fe_a != fe_b), "FE_DV");
      ok(int'(cs[0]) + 2 * (int'(cs[1]) + int'(cs[2])) == tot, "checksum value");
      ok(!ae_dv, "no AE_DV when fault-free");
    end
    // 3: placement 0 puts gene 0 (sum_a ^ sum_b) on slot 0, sum_a on pin A1
    sm[0][0] = 1'b1; sv[0][0] = 1'b1;
    for (int v = 0; v < 16; v++) begin
      {fe_b, fe_a} = 4'(v);
      #1 ok(ae_dv == !fe_a[0], "AE_DV from stuck CED pin");
    end
    // 4: exchange pins A1 and A4 of gene 0: sum_a now on A4, A1 unused
    chrom[0].src[0] = chrom[0].src[3];
    chrom[0].src[3] = 5'd0;
    for (int k = 0; k < 16; k++) chrom[0].content[k] = k[3] ^ k[1];
    for (int v = 0; v < 16; v++) begin
      {fe_b, fe_a} = 4'(v);
      #1;
      ok(!ae_dv, "repaired AE silent");
      ok(fe_dv == (fe_a != fe_b), "repaired FE_DV");
    end
    // 5
    sm = '0;
    csm[5] = 1'b1; csv[5] = 3'b111;
    for (int v = 0; v < 16; v++) begin
      {fe_b, fe_a} = 4'(v);
      #1 ok(ae_dv == (v == 5), "AE_DV from corrupted table entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
