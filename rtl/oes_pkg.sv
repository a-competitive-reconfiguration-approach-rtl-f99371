// oes_pkg -- types and constants shared by the self-repairing LUT fabric,
// the genetic operators, the Autonomic Element and the Autonomic Supervisor.
//
// A configuration (chromosome) is an array of LUT genes indexed by logic
// order: gene g is evaluated after genes 0..g-1 and may only read array
// inputs or the outputs of lower-numbered genes, which keeps every
// configuration feed-forward. Each gene records the physical LUT position it
// is placed on, the source of each of its four input pins (A1 = LSB of the
// LUT address, A4 = MSB) and the 16-bit LUT content. The gene layout follows
// the logical genotype of the design (logic order, physical position, four
// input interconnections, LUT content); the widths and the packing of column
// and row into one slot number are this implementation's choices.
package oes_pkg;

  localparam int unsigned SLOT_W = 4;   // up to 16 physical LUT positions
  localparam int unsigned SRC_W  = 5;   // up to 32 connection sources
  localparam int unsigned PINS   = 4;   // 4-input LUTs
  localparam int unsigned LUT_BITS = 16;

  // Connection source numbering: 0..N_IN-1 are array inputs,
  // N_IN+g is the output of the LUT gene with logic order g.
  typedef logic [SRC_W-1:0]  src_t;
  typedef logic [SLOT_W-1:0] slot_t;

  typedef struct packed {
    slot_t                 slot;     // physical LUT position (Col#/Row#)
    src_t  [PINS-1:0]      src;      // input interconnection I1..I4
    logic  [LUT_BITS-1:0]  content;  // LUT truth table, index {A4,A3,A2,A1}
  } gene_t;

  // Fitness states of an individual under consensus-based evaluation.
  typedef enum logic [1:0] {
    ST_PRISTINE    = 2'd0,
    ST_SUSPECT     = 2'd1,
    ST_UNDER_REPAIR= 2'd2,
    ST_REFURBISHED = 2'd3
  } fit_state_t;

  // Content of a 4-input LUT after its pins a and b exchange their signals:
  // new address k reads the old address with bits a and b exchanged.
  function automatic logic [LUT_BITS-1:0] permute_content(
      input logic [LUT_BITS-1:0] c, input logic [1:0] a, input logic [1:0] b);
    logic [LUT_BITS-1:0] r;
    for (int k = 0; k < LUT_BITS; k++) begin
      logic [3:0] addr, kk;
      kk      = 4'(k);
      addr    = kk;
      addr[a] = kk[b];
      addr[b] = kk[a];
      r[k]    = c[addr];
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Case-study configurations: a full-adder Functional Element and the
  // Autonomic Element logic (CED, Evaluator, Actuator, Checking Sum).
  // ---------------------------------------------------------------------
  localparam int unsigned FE_IN   = 3;   // a, b, carry-in
  localparam int unsigned FE_OUT  = 2;   // {carry, sum}
  localparam int unsigned FE_LUTS = 4;   // one CLB
  localparam int unsigned AE_IN   = 4;   // {carry_b, sum_b, carry_a, sum_a}
  localparam int unsigned AE_OUT  = 4;   // {cout, carry, sum, fe_dv}
  localparam int unsigned AE_LUTS = 12;  // three CLBs

  typedef gene_t [FE_LUTS-1:0] fe_chrom_t;
  typedef gene_t [AE_LUTS-1:0] ae_chrom_t;
  typedef src_t  [FE_OUT-1:0]  fe_outsel_t;
  typedef src_t  [AE_OUT-1:0]  ae_outsel_t;

  // Truth tables of common LUT functions of pins A1, A2, A3.
  localparam logic [15:0] T_BUF1 = 16'hAAAA;        // A1
  localparam logic [15:0] T_XOR2 = 16'h6666;        // A1 ^ A2
  localparam logic [15:0] T_OR2  = 16'hEEEE;        // A1 | A2
  localparam logic [15:0] T_AND2 = 16'h8888;        // A1 & A2
  localparam logic [15:0] T_XOR3 = 16'h9696;        // A1 ^ A2 ^ A3
  localparam logic [15:0] T_MAJ3 = 16'hE8E8;        // majority(A1,A2,A3)

  function automatic gene_t mk_gene(input int slot, input int s1, input int s2,
                                    input int s3, input int s4, input logic [15:0] t);
    gene_t g;
    g.slot    = slot_t'(slot);
    g.src[0]  = src_t'(s1);
    g.src[1]  = src_t'(s2);
    g.src[2]  = src_t'(s3);
    g.src[3]  = src_t'(s4);
    g.content = t;
    return g;
  endfunction

  // Full adder: gene 0 = sum, gene 1 = carry, genes 2-3 spare.
  function automatic fe_chrom_t fe_reference();
    fe_chrom_t c;
    c[0] = mk_gene(0, 0, 1, 2, 0, T_XOR3);
    c[1] = mk_gene(1, 0, 1, 2, 0, T_MAJ3);
    c[2] = mk_gene(2, 0, 0, 0, 0, 16'h0000);
    c[3] = mk_gene(3, 0, 0, 0, 0, 16'h0000);
    return c;
  endfunction

  function automatic fe_outsel_t fe_outsel();
    fe_outsel_t o;
    o[0] = src_t'(FE_IN + 0);  // sum
    o[1] = src_t'(FE_IN + 1);  // carry
    return o;
  endfunction

  // AE logic. Inputs: 0 sum_a, 1 carry_a, 2 sum_b, 3 carry_b.
  //  g0 = sum_a ^ sum_b, g1 = carry_a ^ carry_b      (CED)
  //  g2 = g0 | g1                                    (Evaluator)
  //  g3 = g2 ^ 0 (second XOR input grounded)         (Actuator -> FE_DV)
  //  g4..g7: 4-to-2 compressor of g0,g1,g2,g3        (Checking Sum)
  //  g8..g11 spare.
  // Placement 'k' rotates the logic by 2k physical slots, giving
  // functionally identical but physically distinct alternatives.
  function automatic ae_chrom_t ae_reference(input int k);
    ae_chrom_t c;
    int b;
    b = AE_IN;
    c[0]  = mk_gene(0, 0, 2, 0, 0, T_XOR2);
    c[1]  = mk_gene(0, 1, 3, 0, 0, T_XOR2);
    c[2]  = mk_gene(0, b+0, b+1, 0, 0, T_OR2);
    c[3]  = mk_gene(0, b+2, 0, 0, 0, T_BUF1);
    c[4]  = mk_gene(0, b+0, b+1, b+2, 0, T_XOR3);
    c[5]  = mk_gene(0, b+0, b+1, b+2, 0, T_MAJ3);
    c[6]  = mk_gene(0, b+4, b+3, 0, 0, T_XOR2);
    c[7]  = mk_gene(0, b+4, b+3, 0, 0, T_AND2);
    for (int g = 8; g < AE_LUTS; g++) c[g] = mk_gene(0, 0, 0, 0, 0, 16'h0000);
    for (int g = 0; g < AE_LUTS; g++) c[g].slot = slot_t'((g + 2 * k) % AE_LUTS);
    return c;
  endfunction

  function automatic ae_outsel_t ae_outsel();
    ae_outsel_t o;
    o[0] = src_t'(AE_IN + 3);  // FE_DV
    o[1] = src_t'(AE_IN + 6);  // checksum sum
    o[2] = src_t'(AE_IN + 7);  // checksum carry
    o[3] = src_t'(AE_IN + 5);  // checksum cout
    return o;
  endfunction

endpackage
