// mc_pkg: types and constants shared by the DC-motor speed controller.
//
// All controller signals use the 12-bit fixed-point format of the design:
// speeds, the speed error and the voltage reference are 12-bit two's
// complement integers, and the gains Kp and Ki are 12-bit unsigned numbers
// with KFRAC fractional bits (Q4.8). The latencies are the per-module cycle
// counts of the hardware architecture (15 + 16 + 14 + 4 = 49 cycles, i.e.
// 0.98 us at 50 MHz); each module is built so that its End pulse comes exactly
// that many cycles after its Start pulse.
package mc_pkg;

  localparam int unsigned DW    = 12;  // data word width
  localparam int unsigned KFRAC = 8;   // fractional bits of Kp, Ki and KSPEED

  localparam int unsigned LAT_SPEED = 15;
  localparam int unsigned LAT_SPI   = 16;
  localparam int unsigned LAT_PI    = 14;
  localparam int unsigned LAT_PWM   = 4;
  localparam int unsigned LAT_TOTAL = LAT_SPEED + LAT_SPI + LAT_PI + LAT_PWM;

  typedef logic signed [DW-1:0] sword_t;  // signed 12-bit sample
  typedef logic        [DW-1:0] uword_t;  // unsigned 12-bit sample / gain

  // SPI frame: 16 bits, MSB first, {addr[3:0], data[11:0]}.
  localparam int unsigned SPI_FRAME = 16;
  typedef enum logic [3:0] {
    REG_KP   = 4'h0,  // proportional gain, Q4.8
    REG_KI   = 4'h1,  // integral gain before scaling by the sampling period, Q4.8
    REG_REF  = 4'h2,  // speed reference, signed
    REG_DUTY = 4'h3,  // voltage command used in software mode, signed
    REG_CTRL = 4'h4   // bit 0: 1 = software mode (PWM follows REG_DUTY)
  } reg_addr_e;

  // Parameter set handed from the SPI interface to the rest of the loop.
  typedef struct packed {
    uword_t kp;       // Q4.8
    uword_t ki_ts;    // Ki * Ts scale, Q4.8
    sword_t speed_ref;
    sword_t sw_cmd;   // voltage command from the software controller
    logic   sw_mode;  // 1: PWM follows sw_cmd, 0: PWM follows the PI output
  } ctrl_params_t;

  function automatic sword_t sat_sword(input logic signed [31:0] v);
    if (v > 32'sd2047)       return sword_t'(12'sd2047);
    else if (v < -32'sd2048) return sword_t'(-12'sd2048);
    else                     return sword_t'(v[DW-1:0]);
  endfunction

endpackage
