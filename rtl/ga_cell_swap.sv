// ga_cell_swap -- cell-swap operator: two LUTs exchange physical positions.
//
// The logic held by gene idx_a moves to the physical LUT slot of gene idx_b
// and vice versa. Input interconnections, LUT contents and the logic order
// stay with the logic, so the configuration computes the same function;
// only the physical LUTs it occupies change. A fully used LUT can thereby
// move onto a spare or partly used LUT and away from a faulty resource.
// Because connections and array outputs refer to logic order, no separate
// rewrite of the output vector is needed after the swap.
//
// Interface: chrom_i parent, chrom_o offspring. Timing: combinational.
// Follows the design: the swap exchanges everything but the LUT sequence.
// Own choice: indices beyond N_LUT leave the chromosome unchanged.
module ga_cell_swap
  import oes_pkg::*;
#(
  parameter int unsigned N_LUT = 16
) (
  input  gene_t [N_LUT-1:0] chrom_i,
  input  logic  [3:0]       idx_a,
  input  logic  [3:0]       idx_b,
  output gene_t [N_LUT-1:0] chrom_o
);
  slot_t slot_a, slot_b;
  logic  ok;

  always_comb begin
    slot_a = '0;
    slot_b = '0;
    for (int g = 0; g < N_LUT; g++) begin
      if (int'(idx_a) == g) slot_a = chrom_i[g].slot;
      if (int'(idx_b) == g) slot_b = chrom_i[g].slot;
    end
    ok = (int'(idx_a) < N_LUT) && (int'(idx_b) < N_LUT);
    chrom_o = chrom_i;
    for (int g = 0; g < N_LUT; g++) begin
      if (ok && int'(idx_a) == g) chrom_o[g].slot = slot_b;
      if (ok && int'(idx_b) == g) chrom_o[g].slot = slot_a;
    end
  end
endmodule
