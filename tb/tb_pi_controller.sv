// tb_pi_controller: self-checking test of the anti-windup PI controller.
//
// A reference model written here in plain integer arithmetic (error,
// proportional term, clamped integrator, output clamp and conditional
// integration) runs alongside the controller over random and directed
// sequences. Each computation is checked for its 14-cycle latency, vref and
// the saturation flag. A directed sequence holds a large error long enough
// to saturate and then reverses it: with anti-windup the output must leave
// saturation on the very next sample.
module tb_pi_controller;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  sword_t speed_ref = 0, speed = 0, vref;
  uword_t kp = 0, ki_ts = 0;
  logic done, saturated;
  int checks = 0, failures = 0;
  int m_acc = 0;   // model integrator, Q.8
  int n_sat = 0;

  pi_controller dut (.clk, .rst_n, .start, .speed_ref, .speed, .kp, .ki_ts,
                     .done, .vref, .saturated);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  task automatic step(int r, int s, int p, int i);
    int e, up, accn, v, vs, lat;
    bit shi, slo;
    speed_ref = sword_t'(r);
    speed     = sword_t'(s);
    kp        = uword_t'(p);
    ki_ts     = uword_t'(i);
    // model
    e    = clampi(r - s, -2048, 2047);
    up   = (p * e) >>> 8;
    accn = clampi(m_acc + i * e, -2047 * 256, 2047 * 256);
    v    = up + (accn >>> 8);
    shi  = v > 2047;
    slo  = v < -2047;
    vs   = clampi(v, -2047, 2047);
    if (!((shi && e > 0) || (slo && e < 0))) m_acc = accn;
    if (shi || slo) n_sat++;
    // DUT
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == LAT_PI, $sformatf("latency %0d", lat));
    check(int'(vref) == vs && saturated == (shi || slo),
          $sformatf("r=%0d s=%0d kp=%0d ki=%0d: vref=%0d sat=%b, expected %0d %b",
                    r, s, p, i, vref, saturated, vs, shi || slo));
  endtask

  initial begin
    int first_unsat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // random operation, moderate gains
    for (int k = 0; k < 200; k++)
      step(int'($urandom_range(0, 1000)) - 500, int'($urandom_range(0, 1000)) - 500,
           int'($urandom_range(0, 1024)), int'($urandom_range(0, 200)));
    // full-range random
    for (int k = 0; k < 200; k++)
      step(int'($urandom_range(0, 4095)) - 2048, int'($urandom_range(0, 4095)) - 2048,
           int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)));
    // wind-up test: long positive error, then reversed error
    for (int k = 0; k < 40; k++) step(1500, 0, 256, 128);
    check(saturated && vref == 12'sd2047, "not saturated high");
    step(-300, 0, 256, 128);
    check(!saturated && vref < 12'sd2047, "output stuck in saturation (wind-up)");
    // and negative
    for (int k = 0; k < 40; k++) step(-1500, 0, 256, 128);
    check(saturated && vref == -12'sd2047, "not saturated low");
    step(300, 0, 256, 128);
    check(!saturated, "output stuck in negative saturation");
    // a Start during a computation is ignored
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (5) @(negedge clk);
    start = 1;
    @(negedge clk) start = 0;
    first_unsat = 0;
    for (int c = 0; c < 30; c++) begin
      if (done) first_unsat++;
      @(negedge clk);
    end
    check(first_unsat == 1, $sformatf("%0d End pulses for overlapping Starts", first_unsat));
    check(n_sat > 20, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
