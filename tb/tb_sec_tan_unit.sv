// tb_sec_tan_unit: self-checking test of the one-cycle secant/tangent unit.
// Sweeps angles across +-0.25 rad and random angles inside it, compares with
// 1/cos and tan in real arithmetic (tolerance 2 LSB of Q2.14), and checks that
// the result appears one cycle after in_valid and that the unit is pipelined.
module tb_sec_tan_unit;
  import iq_cal_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  angle_t x = '0;
  logic out_valid;
  coef_t sec_o, tan_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sec_tan_unit dut (.clk, .rst_n, .in_valid, .x, .out_valid, .sec_o, .tan_o);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: inputs change on the falling edge, so just after a rising edge
  // in_valid and x still hold what that edge sampled; the outputs must show
  // the result for exactly that input.
  angle_t prev_x;
  logic   prev_v;
  always @(posedge clk) begin
    prev_v = in_valid;
    prev_x = x;
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid != prev_v) begin
        failures++;
        $display("out_valid timing wrong");
      end
      if (prev_v) begin
        real a, es, et, gs, gt;
        a  = real'(prev_x) / real'(1 << ANG_FRAC);
        es = 1.0 / $cos(a);
        et = $tan(a);
        gs = real'(sec_o) / real'(1 << COEF_FRAC);
        gt = real'(tan_o) / real'(1 << COEF_FRAC);
        checks++;
        if ((gs - es) > 1.3e-4 || (es - gs) > 1.3e-4 || (gt - et) > 1.3e-4 || (et - gt) > 1.3e-4) begin
          failures++;
          $display("x=%f sec %f/%f tan %f/%f", a, gs, es, gt, et);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int v = -2048; v <= 2048; v += 16) begin
      @(negedge clk);
      in_valid = 1'b1;
      x = angle_t'(v);
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x = angle_t'($signed($urandom_range(0, 4096)) - 2048);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
