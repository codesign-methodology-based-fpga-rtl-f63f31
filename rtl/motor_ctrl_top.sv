// motor_ctrl_top: FPGA part of the hardware/software DC-motor speed
// controller.
//
// The loop is closed entirely in hardware. Once per sampling period the
// global control unit runs, back to back, the speed capture (encoder counts
// -> measured speed), the SPI parameter stage (latest Kp, Ki, reference and
// mode from the Linux computer -> consistent parameter set), the anti-windup
// PI controller (-> voltage reference vref) and the PWM duty stage (-> duty
// for the next carrier period). One cycle takes 15+16+14+4 = 49 clock cycles,
// 0.98 us at 50 MHz, far below the 1 ms default sampling period.
//
// The computer talks to the FPGA only through the SPI port: it writes the
// registers of mc_pkg::reg_addr_e and reads back, in every frame, the status
// word {sw_mode, saturated, overrun, enc_err, speed[11:0]}. In software mode
// (REG_CTRL bit 0 = 1) the computer closes the loop itself from the speeds it
// reads and the PWM follows the command it writes to REG_DUTY; the FPGA keeps
// measuring speed and running the PI controller.
//
// Ports: clk (50 MHz), active-low asynchronous reset, enable for the periodic
// control cycle, encoder A/B, SPI slave pins, PWM and direction outputs for
// the bridge, and status outputs (measured speed, vref, execution time of
// the last cycle, SPI frame count, active PWM compare value).
module motor_ctrl_top
  import mc_pkg::*;
#(
  parameter int unsigned TS_CYCLES  = 50_000,
  parameter int unsigned PWM_PERIOD = 2500,
  parameter logic [11:0] KSPEED     = 12'd256,
  parameter logic [11:0] TS_SCALE   = 12'd410
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        enc_a,
  input  logic        enc_b,
  input  logic        spi_sclk,
  input  logic        spi_cs_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  output logic        pwm_out,
  output logic        dir_out,
  output sword_t      speed,
  output sword_t      vref,
  output logic        saturated,
  output logic [15:0] exec_cycles,
  output logic        cycle_done,
  output logic        overrun,
  output logic        enc_err,
  output logic        busy,          // a control cycle is running
  output logic        sw_mode,       // software mode in force
  output logic [7:0]  frame_count,   // SPI frames received
  output logic        period_start,  // PWM carrier period begins
  output logic [$clog2(PWM_PERIOD+1)-1:0] duty_active
);

  logic start_speed, done_speed, start_spi, done_spi;
  logic start_pi, done_pi, start_pwm, done_pwm;
  ctrl_params_t params;

  assign sw_mode = params.sw_mode;

  global_ctrl #(.TS_CYCLES(TS_CYCLES)) u_ctrl (
    .clk, .rst_n, .enable,
    .start_speed, .done_speed, .start_spi, .done_spi,
    .start_pi, .done_pi, .start_pwm, .done_pwm,
    .busy, .cycle_done, .exec_cycles, .overrun
  );

  speed_capture #(.KSPEED(KSPEED)) u_speed (
    .clk, .rst_n, .enc_a, .enc_b,
    .start(start_speed), .done(done_speed), .speed, .enc_err
  );

  spi_interface #(.TS_SCALE(TS_SCALE)) u_spi (
    .clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi, .spi_miso,
    .status_word({params.sw_mode, saturated, overrun, enc_err, speed}),
    .start(start_spi), .done(done_spi), .params, .frame_count
  );

  pi_controller u_pi (
    .clk, .rst_n, .start(start_pi),
    .speed_ref(params.speed_ref), .speed,
    .kp(params.kp), .ki_ts(params.ki_ts),
    .done(done_pi), .vref, .saturated
  );

  pwm_gen #(.PERIOD(PWM_PERIOD)) u_pwm (
    .clk, .rst_n, .start(start_pwm),
    .vref, .sw_cmd(params.sw_cmd), .sw_mode(params.sw_mode),
    .done(done_pwm), .pwm_out, .dir_out, .period_start, .duty_active
  );

endmodule
