// tb_speed_capture: self-checking test of the speed capture module.
//
// A quadrature encoder model steps the A/B lines forward or backward a random
// number of counts per window (including windows large enough to saturate).
// After each window the test pulses Start, checks that End comes exactly 15
// cycles later, and compares the speed of two instances (scale 1.0 and 1.5)
// with the value computed here from the step count. It also makes a
// non-decodable double step and checks the encoder error flag.
module tb_speed_capture;
  import mc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic enc_a = 0, enc_b = 0, start = 0;
  logic done1, done2, err1, err2;
  sword_t speed1, speed2;
  int checks = 0, failures = 0;
  int encs = 0;

  speed_capture #(.KSPEED(12'd256)) dut1 (.clk, .rst_n, .enc_a, .enc_b, .start,
                                          .done(done1), .speed(speed1), .enc_err(err1));
  speed_capture #(.KSPEED(12'd384)) dut2 (.clk, .rst_n, .enc_a, .enc_b, .start,
                                          .done(done2), .speed(speed2), .enc_err(err2));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_enc(int s);
    logic [1:0] ab;
    case (s & 3)
      0: ab = 2'b00;
      1: ab = 2'b10;
      2: ab = 2'b11;
      default: ab = 2'b01;
    endcase
    {enc_a, enc_b} = ab;
  endtask

  task automatic move(int n);
    int d = (n > 0) ? 1 : -1;
    for (int i = 0; i < (n > 0 ? n : -n); i++) begin
      encs += d;
      set_enc(encs);
      repeat (3) @(posedge clk);
    end
  endtask

  function automatic int expect_speed(int n, int k);
    int dl = (n > 2047) ? 2047 : (n < -2048) ? -2048 : n;
    int m  = (dl < 0) ? -dl : dl;
    int s  = (m * k) >>> 8;
    if (s > 2047) s = 2047;
    return (dl < 0) ? -s : s;
  endfunction

  task automatic window(int n);
    int lat;
    move(n);
    repeat (5) @(posedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done1) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT_SPEED || !done2) begin
      failures++;
      $display("FAIL latency %0d (expected %0d)", lat, LAT_SPEED);
    end
    checks++;
    if (int'(speed1) != expect_speed(n, 256)) begin
      failures++;
      $display("FAIL n=%0d speed1=%0d expected %0d", n, speed1, expect_speed(n, 256));
    end
    checks++;
    if (int'(speed2) != expect_speed(n, 384)) begin
      failures++;
      $display("FAIL n=%0d speed2=%0d expected %0d", n, speed2, expect_speed(n, 384));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    window(0);
    window(1);
    window(-1);
    window(37);
    window(-200);
    window(1500);     // scale 1.5 saturates
    window(2100);     // count saturates
    window(-2100);
    for (int i = 0; i < 20; i++) window(int'($urandom_range(0, 1200)) - 600);
    checks++;
    if (err1) begin failures++; $display("FAIL error flag set by valid steps"); end
    // non-decodable step: both lines change at once
    encs += 2;
    set_enc(encs);
    repeat (6) @(posedge clk);
    checks++;
    if (!err1) begin failures++; $display("FAIL error flag not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
