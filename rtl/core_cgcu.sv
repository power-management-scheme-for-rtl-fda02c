// core_cgcu: clock-gating control unit for the multiplier and register file.
//
// Combinational look-up, as in the published truth table of the unit: the
// multiplier is clocked from the cycle a MULT reaches the execute stage
// (one cycle before it operates) until it reports itself idle; the
// register file is clocked whenever a write to it is pending in write-back
// or enabled. Outputs drive the CE pins of the two core clock buffers.
module core_cgcu (
  input  logic uipm_cg_dpex_mult_en,
  input  logic uipm_cg_dpmem_mult_busy,
  input  logic uipm_cg_dpwb_rf_wr,
  input  logic uipm_cg_dp_rf_wr_en,
  output logic uopm_cg_mult_en,
  output logic uopm_cg_rf_en
);
  timeunit 1ns;
  timeprecision 1ps;


  always_comb begin
    uopm_cg_mult_en = uipm_cg_dpex_mult_en | uipm_cg_dpmem_mult_busy;
    uopm_cg_rf_en   = uipm_cg_dpwb_rf_wr   | uipm_cg_dp_rf_wr_en;
  end

endmodule
