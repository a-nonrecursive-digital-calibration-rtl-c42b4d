// tb_comp_coef_unit: self-checking test of the compensator-gain unit.
// For known (alpha, theta, beta, xi) checks -tan(theta), sec(theta)/alpha,
// -tan(xi), sec(xi)/beta against real arithmetic (3 LSB of Q2.14), the
// identity gains after reset, and the 11-cycle latency (1 secant cycle,
// 9 division cycles, 1 register).
module tb_comp_coef_unit;
  import iq_cal_pkg::*;

  localparam real DEG = 3.14159265358979 / 180.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  iq_params_t params = '0;
  logic busy, done;
  comp_coef_t coefs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comp_coef_unit dut (.clk, .rst_n, .start, .params, .busy, .done, .coefs);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_near(input string what, input coef_t got, input real exp_v);
    real g;
    g = real'(got) / 16384.0;
    checks++;
    if (g - exp_v > 3.0 / 16384.0 || exp_v - g > 3.0 / 16384.0) begin
      failures++;
      $display("%s: got %f expected %f", what, g, exp_v);
    end
  endtask

  task automatic run(input real al, input real th, input real be, input real xi);
    int n;
    @(negedge clk);
    params.alpha = coef_t'($rtoi($floor(al * 16384.0 + 0.5)));
    params.beta  = coef_t'($rtoi($floor(be * 16384.0 + 0.5)));
    params.theta = angle_t'($rtoi($floor(th * 8192.0 + 0.5)));
    params.xi    = angle_t'($rtoi($floor(xi * 8192.0 + 0.5)));
    // use the quantised values as the truth
    al = real'(params.alpha) / 16384.0;
    be = real'(params.beta) / 16384.0;
    th = real'(params.theta) / 8192.0;
    xi = real'(params.xi) / 8192.0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk); #1;
      n++;
    end
    checks++;
    if (n != 11) begin
      failures++;
      $display("latency %0d, expected 11", n);
    end
    expect_near("-tan(theta)",     coefs.tx_neg_tan, -$tan(th));
    expect_near("sec(theta)/alpha", coefs.tx_k,      1.0 / ($cos(th) * al));
    expect_near("-tan(xi)",        coefs.rx_neg_tan, -$tan(xi));
    expect_near("sec(xi)/beta",    coefs.rx_k,       1.0 / ($cos(xi) * be));
  endtask

  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (coefs != COEF_IDENTITY) begin
      failures++;
      $display("gains after reset are not the identity");
    end
    run(1.0281, -3.2828 * DEG, 1.0823, 1.9306 * DEG);
    run(1.0, 0.0, 1.0, 0.0);
    for (int t = 0; t < 200; t++)
      run(urand(0.8, 1.25), urand(-12.0, 12.0) * DEG, urand(0.8, 1.25), urand(-12.0, 12.0) * DEG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
