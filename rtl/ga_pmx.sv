// ga_pmx -- partially matched crossover (PMX) of two LUT placements.
//
// Each configuration assigns every LUT gene (by logic order) to a physical
// slot, so its slot fields form a permutation. A crossover point cp on a LUT
// boundary splits the chromosome. Offspring A' takes genes cp..N_LUT-1 from
// B and genes 0..cp-1 from A; offspring B' the reverse. Where a slot a gene
// keeps would collide with a slot inside the exchanged section, it is
// replaced through the section's position-wise pairs (A[j].slot, B[j].slot)
// until it no longer collides, so both offspring remain valid placements.
// Example (8 LUTs, cp = 4): A = 0 1 2 3 4 5 6 7, B = 0 3 4 6 7 2 1 5 give
// A' = 0 6 4 3 7 2 1 5 and B' = 0 3 2 1 4 5 6 7.
//
// Interface: a_i, b_i parents; a_o, b_o offspring. Timing: combinational.
// Follows the design: the section is exchanged position-wise and duplicates
// are resolved through the mapping pairs. Own choice: the mapping is
// followed as a chain (standard PMX); both parents are assumed to carry
// the same logic with different placements.
module ga_pmx
  import oes_pkg::*;
#(
  parameter int unsigned N_LUT = 16
) (
  input  gene_t [N_LUT-1:0] a_i,
  input  gene_t [N_LUT-1:0] b_i,
  input  logic  [3:0]       cp,
  output gene_t [N_LUT-1:0] a_o,
  output gene_t [N_LUT-1:0] b_o
);
  // Resolve slot v kept from parent 'keep' against the section of 'give'.
  function automatic slot_t resolve(input slot_t v, input gene_t [N_LUT-1:0] keep,
                                    input gene_t [N_LUT-1:0] give, input logic [3:0] c);
    slot_t r;
    r = v;
    for (int it = 0; it < N_LUT; it++) begin
      logic  hit;
      slot_t nxt;
      hit = 1'b0;
      nxt = r;
      for (int j = 0; j < N_LUT; j++)
        if (j >= int'(c) && give[j].slot == r) begin
          hit = 1'b1;
          nxt = keep[j].slot;
        end
      if (hit) r = nxt;
    end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < N_LUT; i++) begin
      if (i >= int'(cp)) begin
        a_o[i] = b_i[i];
        b_o[i] = a_i[i];
      end else begin
        a_o[i] = a_i[i];
        b_o[i] = b_i[i];
        a_o[i].slot = resolve(a_i[i].slot, a_i, b_i, cp);
        b_o[i].slot = resolve(b_i[i].slot, b_i, a_i, cp);
      end
    end
  end
endmodule
