// tb_ga_mutation -- checks the function-preserving pin-permutation mutation.
//
// Directed case: F = F1 & (F3 | F4) with F2 unused; exchanging pins 2 and 4
// must give a LUT whose content is F1 & (F3 | F2), with the old F4 source
// now on pin 2. Random cases: for every LUT address the mutated LUT, fed
// with the same signals on the exchanged pins, must give the parent's value;
// the connections of the two pins must be exchanged and every other gene
// and field must be unchanged.
module tb_ga_mutation;
  import oes_pkg::*;
  localparam int N_LUT = 16;
  gene_t [N_LUT-1:0] ci, co;
  logic [3:0] idx;
  logic [1:0] pa, pb;
  int checks = 0, failures = 0;

  ga_mutation dut (.chrom_i(ci), .idx, .pin_a(pa), .pin_b(pb), .chrom_o(co));

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] f_before, f_after;
    // directed example from the operator description
    for (int k = 0; k < 16; k++) begin
      f_before[k] = k[0] & (k[2] | k[3]);   // F1 & (F3 | F4)
      f_after[k]  = k[0] & (k[2] | k[1]);   // F1 & (F3 | F2)
    end
    ci = '0;
    ci[3] = '{slot: 4'd9, src: '{5'd7, 5'd6, 5'd0, 5'd5}, content: f_before};
    idx = 4'd3; pa = 2'd1; pb = 2'd3;
    #1;
    ok(co[3].content == f_after, "directed content");
    ok(co[3].src[1] == 5'd7 && co[3].src[3] == 5'd0, "directed sources");
    ok(co[3].slot == 4'd9 && co[3].src[0] == 5'd5 && co[3].src[2] == 5'd6, "directed rest");
    for (int t = 0; t < 400; t++) begin
      for (int g = 0; g < N_LUT; g++) ci[g] = gene_t'({$urandom, $urandom});
      idx = 4'($urandom); pa = 2'($urandom); pb = 2'($urandom);
      #1;
      for (int g = 0; g < N_LUT; g++)
        if (g != int'(idx)) ok(co[g] == ci[g], "other gene unchanged");
      ok(co[idx].slot == ci[idx].slot, "slot kept");
      ok(co[idx].src[pa] == ci[idx].src[pb] && co[idx].src[pb] == ci[idx].src[pa], "pins exchanged");
      for (int p = 0; p < 4; p++)
        if (p != int'(pa) && p != int'(pb)) ok(co[idx].src[p] == ci[idx].src[p], "pin kept");
      for (int k = 0; k < 16; k++) begin
        logic [3:0] a, b;
        a = 4'(k);     // signal values as seen on the parent's pins
        b = a;
        b[pa] = a[pb]; // the same signals on the offspring's pins
        b[pb] = a[pa];
        ok(co[idx].content[b] == ci[idx].content[a], "function preserved");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
