// lut_fabric -- a feed-forward array of 4-input LUTs configured by a genotype.
//
// This is the reconfigurable logic on which Functional and Autonomic Elements
// are placed. The array has N_IN inputs, N_OUT outputs and N_LUT LUTs grouped
// four to a CLB. LUT gene g (logic order g) is placed on physical slot
// chrom[g].slot; each of its four pins reads either an array input or the
// output of a gene with lower logic order, and its output is
// content[{A4,A3,A2,A1}]. Each array output takes any source via outsel.
//
// Faults are physical: stuck_mask/stuck_val name a (slot, pin) whose value is
// forced to a constant, whatever logic is placed there. Moving logic to other
// slots (cell swap, crossover) or moving the unused pin onto the faulty one
// (mutation) therefore repairs the circuit without changing what it computes.
//
// Timing: purely combinational, y follows x, chrom and the fault inputs.
// Follows the design: 4-input LUTs, A1 = LSB, feed-forward ordering, six
// inputs and six outputs by default, stuck-at faults on LUT input pins.
// Own choices: LUT count (four CLBs), a source number at or beyond the
// gene's own logic order reads 0, slots >= N_LUT carry no faults.
module lut_fabric
  import oes_pkg::*;
#(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned N_OUT = 6,
  parameter int unsigned N_LUT = 16
) (
  input  logic [N_IN-1:0]                x,
  input  gene_t [N_LUT-1:0]              chrom,
  input  src_t  [N_OUT-1:0]              outsel,
  input  logic  [N_LUT-1:0][PINS-1:0]    stuck_mask,
  input  logic  [N_LUT-1:0][PINS-1:0]    stuck_val,
  output logic [N_OUT-1:0]               y
);
  localparam int unsigned NS = N_IN + N_LUT;

  // Stage g sees the inputs and the outputs of genes 0..g-1.
  for (genvar g = 0; g < N_LUT; g++) begin : g_lut
    logic [NS-1:0] vin, vout;
    logic [PINS-1:0] pin;
    logic            o;

    if (g == 0) begin : g_first
      assign vin = NS'(x);
    end else begin : g_next
      assign vin = g_lut[g-1].vout;
    end

    always_comb begin
      for (int p = 0; p < PINS; p++) begin
        pin[p] = 1'b0;
        for (int k = 0; k < N_IN + g; k++)
          if (int'(chrom[g].src[p]) == k) pin[p] = vin[k];
        for (int k = 0; k < N_LUT; k++)
          if (int'(chrom[g].slot) == k && stuck_mask[k][p])
            pin[p] = stuck_val[k][p];
      end
      o = chrom[g].content[pin];
    end

    always_comb begin
      vout = vin;
      vout[N_IN+g] = o;
    end
  end

  always_comb
    for (int j = 0; j < N_OUT; j++) begin
      y[j] = 1'b0;
      for (int k = 0; k < NS; k++)
        if (int'(outsel[j]) == k) y[j] = g_lut[N_LUT-1].vout[k];
    end

endmodule
