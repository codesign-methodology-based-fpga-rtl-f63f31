// global_ctrl: sampling-period timer and global control unit of the speed
// control loop.
//
// A counter divides the clock into sampling periods of TS_CYCLES cycles and
// issues one Start pulse per period (while `enable` is high). The control
// unit is a small FSM that runs the four modules strictly one after another:
// the Start pulse starts speed capture; the End pulse of each module is
// passed on, in the same cycle, as the Start pulse of the next one
// (speed capture -> SPI parameter stage -> PI controller -> PWM duty stage);
// the End of the PWM stage closes the cycle. There is no gap between stages,
// so the execution time of one cycle is the sum of the module latencies.
// exec_cycles reports the cycles from the Start pulse to the PWM End pulse
// of the last completed cycle. A Start that falls due while a cycle is
// still running is skipped and sets the sticky flag overrun.
//
// The sequencing, the Start/End handshake and the periodic activation follow
// the controller's design; the value of the sampling period (1 ms at
// 50 MHz), the enable input and the overrun flag are this design's own.
module global_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned TS_CYCLES = 50_000  // sampling period in clock cycles
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  // module handshakes
  output logic        start_speed,
  input  logic        done_speed,
  output logic        start_spi,
  input  logic        done_spi,
  output logic        start_pi,
  input  logic        done_pi,
  output logic        start_pwm,
  input  logic        done_pwm,
  // status
  output logic        busy,
  output logic        cycle_done,    // one-cycle pulse at the end of a control cycle
  output logic [15:0] exec_cycles,
  output logic        overrun
);

  localparam int TW = $clog2(TS_CYCLES);

  typedef enum logic [2:0] {S_IDLE, S_SPEED, S_SPI, S_PI, S_PWM} state_e;
  state_e state;

  logic [TW-1:0] tcnt;
  logic          tick;
  logic [15:0]   ecnt;

  // sampling-period timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (!enable) begin
        tcnt <= '0;
      end else if (tcnt == TW'(TS_CYCLES - 1)) begin
        tcnt <= '0;
        tick <= 1'b1;
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end

  assign busy        = (state != S_IDLE);
  assign start_speed = (state == S_IDLE) && tick;
  assign start_spi   = (state == S_SPEED) && done_speed;
  assign start_pi    = (state == S_SPI) && done_spi;
  assign start_pwm   = (state == S_PI) && done_pi;
  assign cycle_done  = (state == S_PWM) && done_pwm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ecnt        <= '0;
      exec_cycles <= '0;
      overrun     <= 1'b0;
    end else begin
      if (busy) ecnt <= ecnt + 1'b1;
      if (busy && tick) overrun <= 1'b1;
      unique case (state)
        S_IDLE:  if (tick) begin state <= S_SPEED; ecnt <= 16'd1; end
        S_SPEED: if (done_speed) state <= S_SPI;
        S_SPI:   if (done_spi)   state <= S_PI;
        S_PI:    if (done_pi)    state <= S_PWM;
        S_PWM:   if (done_pwm) begin
          state       <= S_IDLE;
          exec_cycles <= ecnt;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (TS_CYCLES > LAT_TOTAL)
    else $error("sampling period shorter than the execution time");

endmodule
