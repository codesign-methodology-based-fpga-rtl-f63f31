// tb_global_ctrl: self-checking test of the sampling timer and the global
// control unit.
//
// The four modules are replaced by responders that answer each Start with an
// End pulse after the module's latency (15, 16, 14 and 4 cycles). The test
// checks the order of the Start pulses, that each Start comes in the same
// cycle as the previous End, the sampling period between cycles, the
// 49-cycle execution time, that nothing starts while enable is low, and that
// a stage stretched beyond the sampling period sets the overrun flag.
module tb_global_ctrl;
  import mc_pkg::*;

  localparam int TS = 200;

  logic clk = 0, rst_n = 0, enable = 0;
  logic start_speed, done_speed, start_spi, done_spi, start_pi, done_pi, start_pwm, done_pwm;
  logic busy, cycle_done, overrun;
  logic [15:0] exec_cycles;
  int checks = 0, failures = 0;
  int lat_pwm = LAT_PWM;

  global_ctrl #(.TS_CYCLES(TS)) dut (.clk, .rst_n, .enable,
    .start_speed, .done_speed, .start_spi, .done_spi, .start_pi, .done_pi,
    .start_pwm, .done_pwm, .busy, .cycle_done, .exec_cycles, .overrun);

  always #5 clk = ~clk;

  // responder: End pulse `lat` cycles after Start
  int cnt_speed = 0, cnt_spi = 0, cnt_pi = 0, cnt_pwm = 0;
  always_ff @(posedge clk) begin
    cnt_speed <= start_speed ? LAT_SPEED - 1 : (cnt_speed > 0 ? cnt_speed - 1 : 0);
    cnt_spi   <= start_spi   ? LAT_SPI - 1   : (cnt_spi > 0 ? cnt_spi - 1 : 0);
    cnt_pi    <= start_pi    ? LAT_PI - 1    : (cnt_pi > 0 ? cnt_pi - 1 : 0);
    cnt_pwm   <= start_pwm   ? lat_pwm - 1   : (cnt_pwm > 0 ? cnt_pwm - 1 : 0);
    done_speed <= (cnt_speed == 1);
    done_spi   <= (cnt_spi == 1);
    done_pi    <= (cnt_pi == 1);
    done_pwm   <= (cnt_pwm == 1);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor: cycle numbers of each pulse
  int cyc = 0, t_speed = -1, t_spi = -1, t_pi = -1, t_pwm = -1, t_end = -1, t_prev_speed = -1;
  int n_cycles = 0;
  always @(negedge clk) begin
    cyc++;
    if (start_speed) begin
      if (t_prev_speed >= 0)
        check(cyc - t_prev_speed == TS, $sformatf("sampling period %0d", cyc - t_prev_speed));
      t_prev_speed = cyc;
      t_speed = cyc;
    end
    if (start_spi) begin
      check(done_speed && t_speed >= 0 && cyc - t_speed == LAT_SPEED, "SPI start not at speed End");
      t_spi = cyc;
    end
    if (start_pi) begin
      check(done_spi && cyc - t_spi == LAT_SPI, "PI start not at SPI End");
      t_pi = cyc;
    end
    if (start_pwm) begin
      check(done_pi && cyc - t_pi == LAT_PI, "PWM start not at PI End");
      t_pwm = cyc;
    end
    if (cycle_done) begin
      check(done_pwm && cyc - t_pwm == lat_pwm, "cycle end not at PWM End");
      t_end = cyc;
      n_cycles++;
    end
    if ((start_spi && !done_speed) || (start_pi && !done_spi) || (start_pwm && !done_pi))
      check(0, "start without End");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * TS) @(negedge clk);
    check(n_cycles == 0 && t_prev_speed < 0, "cycle started while disabled");
    enable = 1;
    for (int c = 0; c < 6 * TS && n_cycles < 5; c++) @(negedge clk);
    check(n_cycles == 5, $sformatf("%0d cycles completed in 6 sampling periods", n_cycles));
    @(negedge clk);
    check(exec_cycles == 16'(LAT_TOTAL), $sformatf("execution time %0d", exec_cycles));
    check(!overrun, "overrun without cause");
    // stretch the PWM stage beyond the sampling period
    lat_pwm = TS + 20;
    for (int c = 0; c < 3 * TS && n_cycles < 6; c++) @(negedge clk);
    check(n_cycles == 6, "stretched cycle did not complete");
    @(negedge clk);
    check(overrun, "overrun not flagged");
    check(exec_cycles == 16'(LAT_SPEED + LAT_SPI + LAT_PI + TS + 20), "stretched execution time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
