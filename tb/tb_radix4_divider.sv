// tb_radix4_divider: self-checking test of the radix-4 fixed-point divider.
// Compares floor(num * 2^14 / den) with integer arithmetic for edge cases and
// random operands, checks saturation and the overflow flag when the quotient
// does not fit, and checks the 9-cycle latency.
module tb_radix4_divider;
  localparam int IN_W = 17;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [IN_W-1:0] num = '0, den = '0;
  logic busy, done, ovf;
  logic [15:0] quot;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  radix4_divider #(.IN_W(IN_W), .Q_W(16), .QFRAC(14)) dut (
    .clk, .rst_n, .start, .num, .den, .busy, .done, .quot, .ovf);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n_i, input longint d_i);
    int n;
    longint q_exp;
    bit ovf_exp;
    @(negedge clk);
    num = IN_W'(n_i);
    den = IN_W'(d_i);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk); #1;
      n++;
    end
    if (d_i == 0) begin
      ovf_exp = 1'b1;
      q_exp = 65535;
    end else begin
      q_exp = (n_i << 14) / d_i;
      ovf_exp = (q_exp > 65535);
      if (ovf_exp) q_exp = 65535;
    end
    checks++;
    if (n != 9) begin
      failures++;
      $display("latency %0d, expected 9", n);
    end
    checks++;
    if (longint'(quot) != q_exp || ovf != ovf_exp) begin
      failures++;
      $display("%0d/%0d: got %0d ovf %0b, expected %0d ovf %0b", n_i, d_i, quot, ovf, q_exp, ovf_exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(16384, 16384);
    run(1, 3);
    run(12345, 12345);
    run(20000, 10001);
    run(40000, 10001);    // just under 4
    run(40004, 10001);    // exactly 4: overflow
    run(100, 0);
    run(0, 77);
    run(131071, 131071);
    run(131071, 32768);
    for (int t = 0; t < 400; t++) begin
      longint a, b;
      b = longint'($urandom_range(1, 131071));
      a = longint'($urandom_range(0, 131071));
      if (t % 2 == 0) a = a % (4 * b);   // mostly quotients that fit
      run(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
