// tb_pwm_gen: self-checking test of the duty stage and PWM carrier.
//
// Two instances run side by side, one with the default 2500-cycle carrier and
// one with a 100-cycle carrier. For random and corner-case commands, in
// hardware mode (vref) and software mode (sw_cmd), the test checks the
// 4-cycle latency of the duty stage, that the new duty is taken over only at
// the next carrier period, the direction output, and the number of high
// cycles counted on pwm_out over a whole period against
// min(|cmd| * PERIOD / 2048, PERIOD).
module tb_pwm_gen;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  sword_t vref = 0, sw_cmd = 0;
  logic sw_mode = 0;
  logic done_a, pwm_a, dir_a, ps_a;
  logic done_b, pwm_b, dir_b, ps_b;
  logic [11:0] duty_a;
  logic [6:0]  duty_b;
  int checks = 0, failures = 0;

  pwm_gen dut_a (.clk, .rst_n, .start, .vref, .sw_cmd, .sw_mode, .done(done_a),
                 .pwm_out(pwm_a), .dir_out(dir_a), .period_start(ps_a), .duty_active(duty_a));
  pwm_gen #(.PERIOD(100)) dut_b (.clk, .rst_n, .start, .vref, .sw_cmd, .sw_mode, .done(done_b),
                 .pwm_out(pwm_b), .dir_out(dir_b), .period_start(ps_b), .duty_active(duty_b));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int exp_duty(int cmd, int period);
    int m = (cmd < 0) ? -cmd : cmd;
    int d = (m * period) / 2048;
    return (d > period) ? period : d;
  endfunction

  // count pwm highs over the next full period of the chosen instance
  task automatic measure(bit which_b, output int highs, output bit dir);
    int period = which_b ? 100 : 2500;
    highs = 0;
    @(negedge clk);
    while (!(which_b ? ps_b : ps_a)) @(negedge clk);
    for (int c = 0; c < period; c++) begin
      @(negedge clk);
      highs += int'(which_b ? pwm_b : pwm_a);
    end
    dir = which_b ? dir_b : dir_a;
  endtask

  task automatic apply(int hw, int sw, bit mode, bit long_check);
    int lat, cmd, h;
    bit d;
    vref = sword_t'(hw);
    sw_cmd = sword_t'(sw);
    sw_mode = mode;
    cmd = mode ? sw : hw;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done_a) begin @(negedge clk); lat++; end
    check(lat == LAT_PWM && done_b, $sformatf("latency %0d", lat));
    measure(1'b1, h, d);
    check(h == exp_duty(cmd, 100) && d == (cmd < 0),
          $sformatf("P=100 cmd=%0d highs=%0d dir=%b expected %0d", cmd, h, d, exp_duty(cmd, 100)));
    if (long_check) begin
      measure(1'b0, h, d);
      check(h == exp_duty(cmd, 2500) && d == (cmd < 0),
            $sformatf("P=2500 cmd=%0d highs=%0d expected %0d", cmd, h, exp_duty(cmd, 2500)));
    end
  endtask

  initial begin
    int old;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    apply(0, 0, 0, 1);
    apply(2047, 0, 0, 1);
    apply(-2048, 0, 0, 1);
    apply(1024, -5, 0, 1);
    apply(-700, 1500, 1, 1);
    apply(300, -1900, 1, 1);
    for (int k = 0; k < 40; k++)
      apply(int'($urandom_range(0, 4095)) - 2048, int'($urandom_range(0, 4095)) - 2048,
            1'($urandom), k < 8);
    // the active duty changes only at a period boundary
    while (!ps_b) @(negedge clk);
    repeat (10) @(negedge clk);
    old = int'(duty_b);
    vref = (old > 50) ? 12'sd100 : 12'sd1900;
    sw_mode = 0;
    start = 1;
    @(negedge clk) start = 0;
    repeat (6) @(negedge clk);
    check(int'(duty_b) == old, "duty changed inside a carrier period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
