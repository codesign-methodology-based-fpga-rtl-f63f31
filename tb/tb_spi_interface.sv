// tb_spi_interface: self-checking test of the SPI link and parameter stage.
//
// An SPI master model (mode 0, SCLK = clk/10) writes random Kp, Ki,
// reference, command and mode values and reads the status word back in the
// same frames. The test checks that writes stay invisible until the next
// Start, that End comes exactly 16 cycles after Start, that the published
// set matches the written values with Ki*Ts = Ki*TS_SCALE/4096, that a frame
// cut short is dropped, that an unknown address changes nothing, and that
// MISO carries the status word sampled at the start of each frame.
module tb_spi_interface;
  import mc_pkg::*;

  localparam logic [11:0] TSS = 12'd410;

  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [15:0] status_word = 16'h0;
  logic start = 0, done;
  ctrl_params_t params;
  logic [7:0] frame_count;
  int checks = 0, failures = 0;

  spi_interface #(.TS_SCALE(TSS)) dut (
    .clk, .rst_n, .spi_sclk(sclk), .spi_cs_n(cs_n), .spi_mosi(mosi), .spi_miso(miso),
    .status_word, .start, .done, .params, .frame_count
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one frame of `nbits` bits (16 for a full frame); returns the bits read
  task automatic frame(input logic [15:0] w, input int nbits, output logic [15:0] rd);
    rd = '0;
    cs_n = 0;
    repeat (6) @(posedge clk);
    for (int i = 15; i > 15 - nbits; i--) begin
      mosi = w[i];
      repeat (5) @(posedge clk);
      sclk = 1;
      rd = {rd[14:0], miso};
      repeat (5) @(posedge clk);
      sclk = 0;
    end
    repeat (6) @(posedge clk);
    cs_n = 1;
    repeat (6) @(posedge clk);
  endtask

  task automatic write(input logic [3:0] a, input logic [11:0] d);
    logic [15:0] rd, sw;
    sw = 16'($urandom);
    status_word = sw;
    frame({a, d}, 16, rd);
    check(rd == sw, $sformatf("readback %h expected %h", rd, sw));
  endtask

  task automatic run_stage();
    int lat = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == LAT_SPI, $sformatf("latency %0d", lat));
  endtask

  ctrl_params_t exp_p;
  logic [7:0] fc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(params.kp == 12'd256 && params.ki_ts == 0 && !params.sw_mode, "reset values");
    exp_p = params;
    for (int it = 0; it < 12; it++) begin
      logic [11:0] kp, ki, rf, cm;
      logic md;
      kp = 12'($urandom);
      ki = 12'($urandom);
      rf = 12'($urandom);
      cm = 12'($urandom);
      md = 1'($urandom);
      fc = frame_count;
      write(REG_KP, kp);
      write(REG_KI, ki);
      write(REG_REF, rf);
      write(REG_DUTY, cm);
      write(REG_CTRL, {11'd0, md});
      write(4'hB, 12'hFFF);   // unknown address: ignored
      check(frame_count == fc + 8'd6, "frame count");
      check(params == exp_p, "params changed before Start");
      exp_p = '{kp: kp, ki_ts: 12'((24'(ki) * 24'(TSS)) >> 12), speed_ref: rf, sw_cmd: cm, sw_mode: md};
      run_stage();
      check(params == exp_p, $sformatf("params kp=%h ki_ts=%h ref=%h cmd=%h m=%b",
            params.kp, params.ki_ts, params.speed_ref, params.sw_cmd, params.sw_mode));
    end
    // a frame cut short after 9 bits is dropped
    begin
      logic [15:0] rd;
      fc = frame_count;
      frame({REG_KP, 12'h001}, 9, rd);
      run_stage();
      check(params.kp == exp_p.kp && frame_count == fc, "short frame not dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
