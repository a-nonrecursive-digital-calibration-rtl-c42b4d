// tb_cordic_vectoring: self-checking test of the vectoring CORDIC.
// Drives random vectors in all four quadrants plus the axes, compares the
// magnitude and angle with sqrt and atan2 computed in real arithmetic, and
// checks the 25-cycle latency (start edge plus 24 iterations).
module tb_cordic_vectoring;
  import iq_cal_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  path_t x_in = '0, y_in = '0;
  logic busy, done;
  logic [PATH_W:0] mag;
  angle_t angle;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_vectoring dut (.clk, .rst_n, .start, .x_in, .y_in, .busy, .done, .mag, .angle);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int xi, input int yi);
    int n;
    real em, ea, gm, ga, da;
    @(negedge clk);
    x_in = path_t'(xi);
    y_in = path_t'(yi);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk); #1;
      n++;
    end
    em = $sqrt(real'(xi) * xi + real'(yi) * yi);
    ea = $atan2(real'(yi), real'(xi));
    gm = real'(mag);
    ga = real'(angle) / real'(1 << ANG_FRAC);
    da = ga - ea;
    if (da > PI) da -= 2 * PI;
    if (da < -PI) da += 2 * PI;
    checks++;
    if (n != 25) begin
      failures++;
      $display("latency %0d, expected 25", n);
    end
    checks++;
    if ((gm - em > 2.0 + em * 1e-4) || (em - gm > 2.0 + em * 1e-4)) begin
      failures++;
      $display("mag x=%0d y=%0d got %f exp %f", xi, yi, gm, em);
    end
    checks++;
    if (em > 16.0 && (da > 3e-4 || da < -3e-4)) begin
      failures++;
      $display("angle x=%0d y=%0d got %f exp %f", xi, yi, ga, ea);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(1000, 0);
    run(0, 1000);
    run(-1000, 0);
    run(0, -1000);
    run(3000, 2962);     // about 44.7 degrees
    run(-20000, 15000);
    run(-12345, -23456);
    run(32767, 32767);
    run(-32767, -32767);
    for (int t = 0; t < 300; t++)
      run($signed($urandom_range(0, 65534)) - 32767, $signed($urandom_range(0, 65534)) - 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
