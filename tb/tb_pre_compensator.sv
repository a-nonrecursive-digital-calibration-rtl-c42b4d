// tb_pre_compensator: self-checking test of the TX precompensator.
// Part 1: random coefficients and samples against a rounded, saturated
// reference of eq. (4). Part 2: coefficients made from a known TX imbalance
// (alpha, theta); the compensated samples are passed through the imbalance
// model of eq. (1) in real arithmetic and must come back to the input within
// 1.5 LSB. Also checks the one-cycle latency through out_valid.
module tb_pre_compensator;
  import iq_cal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  sample_t i_in = '0, q_in = '0;
  coef_t neg_tan = '0, k = COEF_ONE;
  logic out_valid;
  sample_t i_out, q_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pre_compensator dut (.clk, .rst_n, .in_valid, .i_in, .q_in, .neg_tan, .k,
                       .out_valid, .i_out, .q_out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_shift(input longint v);
    return (v + 8192) >>> 14;
  endfunction
  function automatic longint sat12(input longint v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : v;
  endfunction

  // apply one sample, return the outputs seen one cycle later
  task automatic step(input int ii, input int qq, output int io, output int qo);
    @(negedge clk);
    i_in = sample_t'(ii);
    q_in = sample_t'(qq);
    in_valid = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("out_valid missing one cycle after in_valid");
    end
    io = int'(i_out);
    qo = int'(q_out);
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid without input");
    end
  endtask

  initial begin
    int io, qo, ii, qq;
    real al, th, ri, rq;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // part 1: random
    for (int t = 0; t < 300; t++) begin
      neg_tan = coef_t'($signed($urandom_range(0, 8000)) - 4000);
      k = coef_t'($urandom_range(12000, 24000));
      ii = $signed($urandom_range(0, 4095)) - 2048;
      qq = $signed($urandom_range(0, 4095)) - 2048;
      step(ii, qq, io, qo);
      checks++;
      if (io != sat12(ii + rnd_shift(longint'(neg_tan) * qq)) ||
          qo != sat12(rnd_shift(longint'(k) * qq))) begin
        failures++;
        $display("random: in %0d %0d out %0d %0d", ii, qq, io, qo);
      end
    end
    // part 2: undo a known imbalance
    al = 1.0281;
    th = -3.2828 * 3.14159265358979 / 180.0;
    neg_tan = coef_t'($rtoi($floor(-$tan(th) * 16384.0 + 0.5)));
    k = coef_t'($rtoi($floor(16384.0 / ($cos(th) * al) + 0.5)));
    for (int t = 0; t < 300; t++) begin
      ii = $signed($urandom_range(0, 2400)) - 1200;
      qq = $signed($urandom_range(0, 2400)) - 1200;
      step(ii, qq, io, qo);
      ri = real'(io) + al * $sin(th) * real'(qo);
      rq = al * $cos(th) * real'(qo);
      checks++;
      if ((ri - ii) > 1.5 || (ii - ri) > 1.5 || (rq - qq) > 1.5 || (qq - rq) > 1.5) begin
        failures++;
        $display("imbalance not undone: in %0d %0d after TX %f %f", ii, qq, ri, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
