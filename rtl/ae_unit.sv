// ae_unit -- Autonomic Element watching one pair of full-adder FEs.
//
// The AE logic is itself configured on a LUT fabric (ae_chrom), so that the
// Autonomic Supervisor can repair it by reconfiguration. The fabric holds:
//   CED        two XORs comparing sum and carry of the two active FEs,
//   Evaluator  OR of the two XORs (any discrepancy),
//   Actuator   XOR with its second input grounded, driving FE_DV,
//   Checksum   a 4-to-2 compressor summing the four signals above into
//              {cout, carry, sum}.
// Outside the fabric sit the stored checksum table CS-LUT (16 entries x 4
// bits: valid flag plus the 3-bit checksum expected for each of the 16
// combinations of the four FE output bits) and a comparator (XORs into an
// OR) that raises AE_DV when the running checksum differs from the stored
// one. A fault in the CED, Evaluator, Actuator, Checksum logic or in the
// table therefore shows up as AE_DV.
//
// Compute-checksum step: a pulse on init_start sweeps the 16 input
// combinations through the fabric, one per cycle, and writes the results
// into the CS-LUT (busy high for 16 cycles). The AE is assumed fault-free
// during this step.
//
// Interface: fe_a, fe_b = {carry, sum} of the two active FEs. fe_dv and
// ae_dv are combinational from the inputs and valid outside the init step.
// Follows the design: the component list, the 16x4 CS-LUT, the XOR/OR
// comparators and the 4-to-2 compressor. Own choices: the table is indexed
// directly by the FE output bits (instead of searched), its 4th bit marks a
// populated entry, and the Actuator's second XOR input is tied to 0.
module ae_unit
  import oes_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          init_start,
  output logic                          busy,
  input  logic [FE_OUT-1:0]             fe_a,
  input  logic [FE_OUT-1:0]             fe_b,
  input  ae_chrom_t                     chrom,
  input  logic [AE_LUTS-1:0][PINS-1:0]  stuck_mask,
  input  logic [AE_LUTS-1:0][PINS-1:0]  stuck_val,
  input  logic [15:0]                   cs_stuck_mask,  // CS-LUT entry fault: valid entry forced
  input  logic [15:0][2:0]              cs_stuck_val,   // to this checksum
  output logic                          fe_dv,
  output logic                          ae_dv,
  output logic [2:0]                    checksum
);
  logic [3:0]        sweep;
  logic [AE_IN-1:0]  x;
  logic [AE_OUT-1:0] y;
  logic [3:0]        cs_lut [16];
  logic [3:0]        entry;

  assign x = busy ? sweep : {fe_b[1], fe_b[0], fe_a[1], fe_a[0]};

  lut_fabric #(.N_IN(AE_IN), .N_OUT(AE_OUT), .N_LUT(AE_LUTS)) u_fabric (
    .x, .chrom, .outsel(ae_outsel()), .stuck_mask, .stuck_val, .y
  );

  assign checksum = y[3:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      sweep <= '0;
    end else if (busy) begin
      sweep <= sweep + 1'b1;
      if (sweep == 4'hF) busy <= 1'b0;
    end else if (init_start) begin
      busy  <= 1'b1;
      sweep <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) cs_lut[i] <= '0;
    end else if (busy) begin
      cs_lut[sweep] <= {1'b1, y[3:1]};
    end
  end

  always_comb begin
    entry = cs_lut[x];
    if (cs_stuck_mask[x]) entry[2:0] = cs_stuck_val[x];
    fe_dv = !busy && y[0];
    ae_dv = !busy && entry[3] && |(entry[2:0] ^ checksum);
  end

endmodule
