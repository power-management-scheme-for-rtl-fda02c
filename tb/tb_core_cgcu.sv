// tb_core_cgcu: exhaustive check of the core clock-gating look-up: the
// multiplier clock must run exactly when a MULT is in EX or the multiplier
// is busy, the register-file clock exactly when a write is pending.
module tb_core_cgcu;
  timeunit 1ns;
  timeprecision 1ps;

  logic ex_mult, mult_busy, wb_wr, rf_wr, mult_en, rf_en;
  int   checks = 0, failures = 0;

  core_cgcu dut (
    .uipm_cg_dpex_mult_en (ex_mult), .uipm_cg_dpmem_mult_busy (mult_busy),
    .uipm_cg_dpwb_rf_wr (wb_wr), .uipm_cg_dp_rf_wr_en (rf_wr),
    .uopm_cg_mult_en (mult_en), .uopm_cg_rf_en (rf_en));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {ex_mult, mult_busy, wb_wr, rf_wr} = 4'(v);
      #1;
      checks++;
      if (mult_en !== (v >= 4)) failures++;               // bits 3 or 2 set
      checks++;
      if (rf_en !== ((v & 3) != 0)) failures++;           // bits 1 or 0 set
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
