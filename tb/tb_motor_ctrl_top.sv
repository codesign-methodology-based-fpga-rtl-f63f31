// tb_motor_ctrl_top: end-to-end closed-loop test of the speed controller at
// its default parameters (50 MHz clock, 1 ms sampling period, 20 kHz PWM),
// with a DC motor and encoder model as the plant and an SPI master model in
// place of the Linux computer.
//
// Scenario: the computer writes Kp = 2.0, Ki = 1.0 and a speed reference of
// 600 counts per period; the loop must settle there. The reference is then
// raised beyond what the motor can reach (output saturates, anti-windup),
// brought back to 300 (must recover), reversed to -500 (direction output),
// and finally the computer switches to software mode and drives the PWM
// directly with an open-loop command, reading the speed back over SPI, and
// switches back. Every control cycle is checked for its 49-cycle execution
// time and for the measured speed against the encoder count of the model.
// Each mechanism (control cycle, SPI frame, SPI read-back, parameter update,
// saturation, recovery from saturation, reverse direction, mode switch, PWM
// period) is counted, and one that never happens counts as a failure.
module tb_motor_ctrl_top;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0;
  logic enc_a, enc_b, sclk = 0, cs_n = 1, mosi = 0, miso;
  logic pwm_out, dir_out, sw_mode, saturated, cycle_done, overrun, enc_err, busy, period_start;
  sword_t speed, vref;
  logic [15:0] exec_cycles;
  logic [7:0] frame_count;
  logic [11:0] duty_active;
  int counts;
  real w;
  int checks = 0, failures = 0;

  motor_ctrl_top dut (
    .clk, .rst_n, .enable, .enc_a, .enc_b,
    .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .pwm_out, .dir_out, .speed, .vref, .saturated, .exec_cycles, .cycle_done,
    .overrun, .enc_err, .busy, .sw_mode, .frame_count, .period_start, .duty_active
  );

  dc_motor_model plant (.clk, .pwm(pwm_out), .dir(dir_out), .enc_a, .enc_b, .counts, .w);

  always #10 clk = ~clk;  // 50 MHz

  // watchdog: 60 M cycles (1.2 s of motor time)
  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- per-cycle monitor ----------------
  int n_cycles = 0, n_sat = 0, n_recover = 0, n_reverse = 0, n_periods = 0;
  int win_start = 0, prev_counts = 0, bad_speed = 0, bad_exec = 0;
  bit was_sat = 0;
  int n_mode_switch = 0;
  logic mode_d = 0;
  logic busy_d = 0, cdone_d = 0;
  always @(posedge clk) begin
    busy_d <= busy;
    cdone_d <= cycle_done;
    // exec_cycles is updated by the edge that ends the cycle
    if (cdone_d && exec_cycles != 16'(LAT_TOTAL)) bad_exec++;
    if (busy && !busy_d) begin
      win_start   = counts;
      // the decoder lags the model by three cycles: allow +-1 count
    end
    if (period_start) n_periods++;
    if (sw_mode != mode_d) n_mode_switch++;
    mode_d <= sw_mode;
    if (cycle_done) begin
      int d;
      n_cycles++;
      d = win_start - prev_counts;
      prev_counts = win_start;
      if (d > 2047) d = 2047;
      if (d < -2048) d = -2048;
      if (int'(speed) - d > 1 || d - int'(speed) > 1) begin
        bad_speed++;
        if (bad_speed < 5) $display("speed %0d, model %0d", speed, d);
      end
      if (saturated) n_sat++;
      if (was_sat && !saturated) n_recover++;
      was_sat = saturated;
      if (dir_out && speed < 0) n_reverse++;
    end
  end

  // ---------------- SPI master ----------------
  int n_frames = 0, n_readback = 0;
  logic [15:0] last_status;
  task automatic spi_write(input logic [3:0] a, input logic [11:0] d);
    logic [15:0] rd = '0;
    cs_n = 0;
    repeat (6) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      mosi = (i >= 12) ? a[i - 12] : d[i];
      repeat (5) @(posedge clk);
      sclk = 1;
      rd = {rd[14:0], miso};
      repeat (5) @(posedge clk);
      sclk = 0;
    end
    repeat (6) @(posedge clk);
    cs_n = 1;
    repeat (6) @(posedge clk);
    n_frames++;
    last_status = rd;
  endtask

  task automatic run_samples(int n);
    int target = n_cycles + n;
    while (n_cycles < target) @(posedge clk);
  endtask

  // reads the status word and checks its speed field against the output
  task automatic read_speed(output int s);
    sword_t sp_now;
    @(posedge cycle_done);
    @(posedge clk);
    sp_now = speed;
    spi_write(4'hF, 12'h000);   // no register: read only
    s = int'($signed(last_status[11:0]));
    check(s == int'(sp_now), $sformatf("SPI read-back speed %0d, output %0d", s, sp_now));
    if (s == int'(sp_now)) n_readback++;
  endtask

  function automatic bit near(int a, int b, int tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    int s;
    int fc0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    fc0 = int'(frame_count);
    spi_write(REG_KP, 12'd512);    // Kp = 2.0
    spi_write(REG_KI, 12'd256);    // Ki = 1.0 -> Ki*Ts = 0.1
    spi_write(REG_REF, 12'd600);
    check(int'(frame_count) == fc0 + 3, "frame count");
    enable = 1;
    run_samples(150);
    check(near(int'(speed), 600, 12), $sformatf("did not settle at 600: %0d", speed));
    // unreachable reference: output saturates
    spi_write(REG_REF, 12'd1500);
    run_samples(60);
    check(saturated && vref == 12'sd2047, "no saturation at unreachable reference");
    spi_write(REG_REF, 12'd300);
    run_samples(8);
    check(!saturated, "still saturated 8 samples after the reference dropped");
    run_samples(120);
    check(near(int'(speed), 300, 12), $sformatf("did not settle at 300: %0d", speed));
    // reverse
    spi_write(REG_REF, -12'sd500);
    run_samples(150);
    check(near(int'(speed), -500, 12) && dir_out, $sformatf("did not settle at -500: %0d", speed));
    // software mode: open-loop command of half scale
    spi_write(REG_DUTY, 12'd1024);
    spi_write(REG_CTRL, 12'd1);
    run_samples(100);
    read_speed(s);
    check(near(s, 600, 15), $sformatf("open-loop speed %0d, expected about 600", s));
    check(last_status[15] == 1'b1, "status does not show software mode");
    check(int'(duty_active) == 1250, $sformatf("software-mode duty %0d", duty_active));
    // back to hardware mode, reference 200
    spi_write(REG_REF, 12'd200);
    spi_write(REG_CTRL, 12'd0);
    run_samples(250);
    check(near(int'(speed), 200, 12), $sformatf("did not settle at 200: %0d", speed));
    read_speed(s);
    check(last_status[15] == 1'b0, "status still shows software mode");
    // per-cycle results and mechanism counts
    check(bad_exec == 0, $sformatf("%0d cycles with wrong execution time", bad_exec));
    check(bad_speed == 0, $sformatf("%0d cycles with wrong measured speed", bad_speed));
    check(!overrun && !enc_err, "overrun or encoder error flagged");
    $display("mechanisms: cycles=%0d frames=%0d readbacks=%0d saturated=%0d recoveries=%0d reverse=%0d pwm_periods=%0d mode_switches=%0d",
             n_cycles, n_frames, n_readback, n_sat, n_recover, n_reverse, n_periods, n_mode_switch);
    check(n_cycles > 0, "no control cycle");
    check(n_frames > 0, "no SPI frame");
    check(n_readback > 0, "no SPI read-back");
    check(n_sat > 0, "no saturation");
    check(n_recover > 0, "no recovery from saturation");
    check(n_reverse > 0, "no reverse rotation");
    check(n_periods > 0, "no PWM period");
    check(n_mode_switch >= 2, "mode never switched there and back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
