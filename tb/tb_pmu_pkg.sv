// tb_pmu_pkg: checks the shared f-v table of the power management unit.
// For every index the SPI word, frequency and voltage returned by the
// package functions are compared with the calibrated values listed here
// independently; the codes beyond the last pair must map to the slowest
// pair's SPI word. Also checks the encodings of the frequency-change
// request and that the state type has eight distinct states.
module tb_pmu_pkg;
  timeunit 1ns;
  timeprecision 1ps;
  import pmu_pkg::*;

  int checks = 0, failures = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] cmd [6];
    int          mhz [6];
    int          mv  [6];
    dvfs_state_t st;
    int          nst;
    cmd = '{16'h12F9, 16'h1277, 16'h1242, 16'h1229, 16'h1218, 16'h120D};
    mhz = '{40, 36, 32, 28, 24, 20};
    mv  = '{1000, 980, 960, 940, 920, 900};
    check(NUM_FV == 6 && FV_FASTEST == 0 && FV_SLOWEST == 5, "table size and ends");
    for (int i = 0; i < 6; i++) begin
      check(fv_spi_cmd(fv_idx_t'(i)) == cmd[i],
            $sformatf("SPI word %h for index %0d", fv_spi_cmd(fv_idx_t'(i)), i));
      check(fv_freq_mhz(fv_idx_t'(i)) == mhz[i], $sformatf("frequency of index %0d", i));
      check(fv_millivolt(fv_idx_t'(i)) == mv[i], $sformatf("voltage of index %0d", i));
    end
    for (int i = 6; i < 8; i++)
      check(fv_spi_cmd(fv_idx_t'(i)) == 16'h120D, $sformatf("index %0d maps to the slowest word", i));
    check(FCHG_EQUAL == 2'b00 && FCHG_LOWER == 2'b10 && FCHG_HIGHER == 2'b11, "fchange codes");
    st = st.first();
    nst = 1;
    while (st != st.last()) begin st = st.next(); nst++; end
    check(nst == 8, "eight DVFS states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
