// ga_mutation -- function-preserving mutation of one LUT gene.
//
// The operator does not flip configuration bits. It exchanges the signals
// connected to two input pins (pin_a, pin_b) of LUT gene idx and rewrites the
// LUT content so that the LUT still computes the same function of the same
// signals. Its effect is physical: a signal that reached the LUT on a faulty
// pin now arrives on another pin, and an unused pin can be moved onto a pin
// with a stuck-at fault. Example: F = F1&(F3|F4) with F2 unused becomes
// F = F1&(F3|F2) with F4 unused after exchanging pins 2 and 4.
//
// Interface: chrom_i is the parent, chrom_o the offspring; all other genes
// pass unchanged. Timing: combinational.
// Follows the design: mutation acts on the input interconnection of a LUT
// and updates the LUT content with it. Own choice: exactly two pins are
// exchanged per application (pin_a == pin_b leaves the gene unchanged).
module ga_mutation
  import oes_pkg::*;
#(
  parameter int unsigned N_LUT = 16
) (
  input  gene_t [N_LUT-1:0] chrom_i,
  input  logic  [3:0]       idx,
  input  logic  [1:0]       pin_a,
  input  logic  [1:0]       pin_b,
  output gene_t [N_LUT-1:0] chrom_o
);
  always_comb begin
    chrom_o = chrom_i;
    for (int g = 0; g < N_LUT; g++) begin
      if (int'(idx) == g) begin
        chrom_o[g].src[pin_a] = chrom_i[g].src[pin_b];
        chrom_o[g].src[pin_b] = chrom_i[g].src[pin_a];
        chrom_o[g].content    = permute_content(chrom_i[g].content, pin_a, pin_b);
      end
    end
  end
endmodule
