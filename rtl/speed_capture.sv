// speed_capture: measured speed of the DC motor from its incremental encoder.
//
// The encoder is decoded continuously (x4, quad_decoder). Each Start pulse,
// given once per sampling period by the global control unit, closes one
// measurement window: the module takes the position change since the
// previous Start (counts per sampling period), saturates it to 12 bits and
// multiplies its magnitude by the scale factor KSPEED (Q4.8) on a serial
// shift-and-add multiplier, then restores the sign and saturates the result
// to the signed 12-bit speed word.
//
// Timing: Start in cycle 0; End is a one-cycle pulse in cycle 15 (LAT_SPEED),
// with speed valid from then until the next End. Cycle 0 latches the window,
// cycles 1..13 multiply, cycle 14 scales and saturates.
//
// The function, the 12-bit format and the 15-cycle latency follow the
// controller's design; measuring speed by counting encoder edges over the
// sampling period, and doing the scaling on a serial multiplier, are this
// design's choices.
module speed_capture
  import mc_pkg::*;
#(
  parameter int unsigned PW     = 16,   // encoder position counter width
  parameter logic [11:0] KSPEED = 12'd256  // speed = counts/Ts * KSPEED / 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   enc_a,
  input  logic   enc_b,
  input  logic   start,
  output logic   done,
  output sword_t speed,
  output logic   enc_err   // undecodable encoder step seen (sticky)
);

  logic [PW-1:0] pos, pos_prev;
  logic          dec_err;

  quad_decoder #(.PW(PW)) u_dec (
    .clk, .rst_n, .enc_a, .enc_b, .pos, .err(dec_err)
  );

  typedef enum logic [1:0] {S_IDLE, S_MSTART, S_MWAIT} state_e;
  state_e state;

  logic signed [PW-1:0] delta_full;
  sword_t               delta;      // window count, saturated
  logic                 neg;
  logic [11:0]          mag;
  logic                 m_start, m_busy, m_done;
  logic [23:0]          m_p;
  logic [23:0]          scaled;

  assign delta_full = $signed(pos - pos_prev);
  assign neg        = delta[11];
  assign mag        = neg ? 12'(-delta) : 12'(delta);
  assign m_start    = (state == S_MSTART);
  assign scaled     = m_p >> KFRAC;

  serial_mult #(.W(12)) u_mult (
    .clk, .rst_n, .start(m_start), .a(mag), .b(KSPEED),
    .busy(m_busy), .done(m_done), .p(m_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pos_prev <= '0;
      delta    <= '0;
      speed    <= '0;
      done     <= 1'b0;
      enc_err  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (dec_err) enc_err <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          pos_prev <= pos;
          delta    <= sat_sword(32'(delta_full));
          state    <= S_MSTART;
        end
        S_MSTART: state <= S_MWAIT;
        S_MWAIT: if (m_done) begin
          // magnitude up to 2048*4095/256; saturate symmetrically
          if (scaled > 24'd2047) speed <= neg ? -12'sd2047 : 12'sd2047;
          else                   speed <= neg ? -sword_t'(scaled[11:0]) : sword_t'(scaled[11:0]);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
