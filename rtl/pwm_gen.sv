// pwm_gen: duty-cycle computation and PWM generation for the motor bridge.
//
// Duty stage (runs on Start, once per sampling period): the voltage command
// is the PI output vref, or in software mode the command written by the
// computer (sw_cmd). Its sign gives the bridge direction and its magnitude,
// a fraction of full scale 2048, is turned into a compare value
//   duty = min(|cmd| * PERIOD / 2048, PERIOD)
// Timing: Start in cycle 0 latches the inputs; cycle 1 selects the source
// and takes sign and magnitude; cycle 2 multiplies; cycle 3 scales and writes
// the shadow register; End is a one-cycle pulse in cycle 4 (LAT_PWM).
//
// Carrier: a free-running counter 0..PERIOD-1 at the clock rate. The shadow
// duty and direction are taken over only when the counter wraps, so a
// period is never cut short; pwm_out is high while the counter is below the
// active duty (edge-aligned). Output pins are registered.
//
// The module's role and its 4-cycle latency follow the controller's design;
// sign/magnitude drive, the carrier shape and the default 20 kHz carrier
// (PERIOD = 2500 cycles of a 50 MHz clock) are this design's own.
module pwm_gen
  import mc_pkg::*;
#(
  parameter int unsigned PERIOD = 2500  // carrier period in clock cycles
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  sword_t vref,
  input  sword_t sw_cmd,
  input  logic   sw_mode,
  output logic   done,
  output logic   pwm_out,
  output logic   dir_out,        // 1: reverse
  output logic   period_start,   // one-cycle pulse when a carrier period begins
  output logic [$clog2(PERIOD+1)-1:0] duty_active
);

  localparam int CW = $clog2(PERIOD + 1);

  logic [1:0]   step;
  logic         busy;
  sword_t       vref_r, cmd_r;
  logic         mode_r;
  logic [11:0]  mag;
  logic         dir_c, dir_sh, dir_act;
  logic [31:0]  prod;
  logic [CW-1:0] duty_sh, cnt;
  logic [31:0]  scaled;

  assign scaled = prod >> 11;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      step    <= '0;
      vref_r  <= '0;
      cmd_r   <= '0;
      mode_r  <= 1'b0;
      mag     <= '0;
      dir_c   <= 1'b0;
      prod    <= '0;
      duty_sh <= '0;
      dir_sh  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          vref_r <= vref;
          cmd_r  <= sw_cmd;
          mode_r <= sw_mode;
          busy   <= 1'b1;
          step   <= 2'd1;
        end
      end else begin
        unique case (step)
          2'd1: begin
            dir_c <= mode_r ? cmd_r[11] : vref_r[11];
            mag   <= mode_r ? (cmd_r[11] ? 12'(-cmd_r) : 12'(cmd_r))
                            : (vref_r[11] ? 12'(-vref_r) : 12'(vref_r));
          end
          2'd2: prod <= 32'(mag) * 32'(PERIOD);
          2'd3: begin
            duty_sh <= (scaled > 32'(PERIOD)) ? CW'(PERIOD) : CW'(scaled);
            dir_sh  <= dir_c;
            done    <= 1'b1;
            busy    <= 1'b0;
          end
          default: ;
        endcase
        step <= step + 1'b1;
      end
    end
  end

  // carrier
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      duty_active  <= '0;
      dir_act      <= 1'b0;
      pwm_out      <= 1'b0;
      dir_out      <= 1'b0;
      period_start <= 1'b0;
    end else begin
      period_start <= 1'b0;
      if (cnt == CW'(PERIOD - 1)) begin
        cnt          <= '0;
        duty_active  <= duty_sh;
        dir_act      <= dir_sh;
        period_start <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      pwm_out <= (cnt < duty_active);
      dir_out <= dir_act;
    end
  end

endmodule
