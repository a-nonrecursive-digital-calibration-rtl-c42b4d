// tb_lo_irr_sweep: calibration quality against the quality of the LO.
//
// The calibration assumes that switching the LO shifts it by exactly 90
// degrees. A quadrature error eta of the LO breaks that assumption, and the
// paper shows the calibrated image rejection (IRR) following the IRR of the
// LO itself. Five transceivers are calibrated side by side, all at the
// paper's measured imbalances: an ideal LO and LO phase errors that give an
// LO IRR of 15, 20, 25 and 30 dB (eta = 2 * 10^(-IRR/20) rad). Better LOs
// are not swept: from about 40 dB on, the residual image of the loop is
// below the ADC rounding and noise and no longer follows the LO. A sixth one
// has an ideal LO but converters at 80 MHz against the 100-MHz logic clock
// (every fifth clock without an ADC sample), as in the paper's prototype.
// Checks:
//   * ideal LO: calibrated IRR of at least 50 dB;
//   * with an LO error the calibrated IRR of the loop is at least the LO
//     IRR, and it rises with every 5-dB step of LO IRR;
//   * 80-MHz ADC: IRR of at least 50 dB, and the sample phases take 5/4 as
//     many clocks.
module tb_lo_irr_sweep;
  import iq_cal_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real RAD2DEG = 180.0 / PI;
  localparam int  NCASE = 4;
  localparam real LO_IRR [NCASE] = '{15.0, 20.0, 25.0, 30.0};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lo_irr_bench #(.LO_PHASE(0.0)) u_ideal (.clk, .rst_n);
  lo_irr_bench #(.LO_PHASE(2.0 * 10.0 ** (-15.0 / 20.0) * RAD2DEG)) u_lo15 (.clk, .rst_n);
  lo_irr_bench #(.LO_PHASE(2.0 * 10.0 ** (-20.0 / 20.0) * RAD2DEG)) u_lo20 (.clk, .rst_n);
  lo_irr_bench #(.LO_PHASE(2.0 * 10.0 ** (-25.0 / 20.0) * RAD2DEG)) u_lo25 (.clk, .rst_n);
  lo_irr_bench #(.LO_PHASE(2.0 * 10.0 ** (-30.0 / 20.0) * RAD2DEG)) u_lo30 (.clk, .rst_n);
  lo_irr_bench #(.LO_PHASE(0.0), .ADC_SKIP(5)) u_adc80 (.clk, .rst_n);

  task automatic at_least(input string what, input real got, input real lim);
    checks++;
    if (got < lim) begin
      failures++;
      $display("%s: %0.1f dB is below %0.1f dB", what, got, lim);
    end
  endtask

  initial begin
    real irr [NCASE];
    int base;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (u_ideal.finished && u_lo15.finished && u_lo20.finished && u_lo25.finished &&
          u_lo30.finished && u_adc80.finished);
    irr = '{u_lo15.irr_db, u_lo20.irr_db, u_lo25.irr_db, u_lo30.irr_db};

    $display("ideal LO: calibrated IRR %0.1f dB", u_ideal.irr_db);
    at_least("ideal LO", u_ideal.irr_db, 50.0);
    for (int k = 0; k < NCASE; k++) begin
      $display("LO IRR %0.0f dB: calibrated IRR %0.1f dB", LO_IRR[k], irr[k]);
      at_least($sformatf("LO IRR %0.0f dB", LO_IRR[k]), irr[k], LO_IRR[k]);
    end
    for (int k = 1; k < NCASE; k++) begin
      checks++;
      if (irr[k] <= irr[k-1]) begin
        failures++;
        $display("calibrated IRR does not rise from %0.0f to %0.0f dB of LO IRR",
                 LO_IRR[k-1], LO_IRR[k]);
      end
    end

    $display("80-MHz ADC: calibrated IRR %0.1f dB, calibration %0d cycles (100-MHz ADC: %0d)",
             u_adc80.irr_db, u_adc80.cal_cycles, u_ideal.cal_cycles);
    at_least("80-MHz ADC", u_adc80.irr_db, 50.0);
    // the 400 sample phases stretch to about 500 clocks; computation is unchanged
    base = u_ideal.cal_cycles - 400;
    checks++;
    if (u_adc80.cal_cycles < base + 495 || u_adc80.cal_cycles > base + 505) begin
      failures++;
      $display("80-MHz calibration took %0d cycles", u_adc80.cal_cycles);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
