// tb_ga_cell_swap -- checks the cell-swap operator: the two chosen genes
// exchange physical slots and keep connections, contents and logic order;
// all other genes are unchanged; out-of-range indices change nothing.
// Includes the Figure-style case of logic 3 and logic 7 swapping LUT 3 and 7.
module tb_ga_cell_swap;
  import oes_pkg::*;
  localparam int N_LUT = 16;
  gene_t [N_LUT-1:0] ci, co;
  logic [3:0] ia, ib;
  int checks = 0, failures = 0;

  ga_cell_swap #(.N_LUT(N_LUT)) dut (.chrom_i(ci), .idx_a(ia), .idx_b(ib), .chrom_o(co));

  task automatic ok(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int g = 0; g < N_LUT; g++) ci[g] = '{slot: slot_t'(g), src: '{5'(g), 5'(g), 5'(g), 5'(g)}, content: 16'(g * 1111)};
    ia = 4'd3; ib = 4'd7;
    #1;
    ok(co[3].slot == 4'd7 && co[7].slot == 4'd3, "logic 3 <-> logic 7 slots");
    ok(co[3].content == ci[3].content && co[3].src == ci[3].src, "logic 3 keeps its function");
    for (int t = 0; t < 500; t++) begin
      for (int g = 0; g < N_LUT; g++) ci[g] = gene_t'({$urandom, $urandom});
      ia = 4'($urandom); ib = 4'($urandom);
      #1;
      ok(co[ia].slot == ci[ib].slot && co[ib].slot == ci[ia].slot, "slots exchanged");
      ok(co[ia].src == ci[ia].src && co[ia].content == ci[ia].content, "a function kept");
      ok(co[ib].src == ci[ib].src && co[ib].content == ci[ib].content, "b function kept");
      for (int g = 0; g < N_LUT; g++)
        if (g != int'(ia) && g != int'(ib)) ok(co[g] == ci[g], "others unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
