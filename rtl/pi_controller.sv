// pi_controller: anti-windup PI speed controller built as a factorized data
// path and a control unit.
//
// The control law, per sampling period, is
//   e    = speed_ref - speed
//   up   = Kp * e                       (Kp in Q4.8)
//   acc' = clamp(acc + Ki_ts * e, +-VMAX*256)   (integrator, Q.8)
//   v    = up + acc'/256
//   vref = clamp(v, VMIN, VMAX)
// with anti-windup by conditional integration: acc takes acc' only if v is
// not saturated in the direction in which e would push it further.
//
// The data path has one multiplier (13x12 bits, with registered operands and
// product, as in an FPGA hard multiplier), one 26-bit adder/subtractor whose
// operands are selected per step, and registers. A control unit (a step
// counter) routes the operands through these shared operators: this is the
// factorization of the data-flow graph onto a minimal set of operators.
//
// Timing: Start in cycle 0 latches the inputs; steps 1..13 run in cycles
// 1..13; End is a one-cycle pulse in cycle 14 (LAT_PI) together with the
// new vref, which holds until the next End. The schedule is
//   1 e=ref-meas   2 load Kp,e   3 multiply   4 up=p/256   5 load Ki,e
//   6 multiply     7 acc'=acc+p  8 clamp acc' 9 v=up+acc'/256
//   10 compare v   11 anti-windup update of acc   12 clamp v   13 output
// Start pulses that arrive while a computation runs are ignored.
//
// The structure (shared operators under a clocked control unit, Start/End
// handshake, anti-windup PI, 12-bit data, 14-cycle latency) follows the
// controller's design; the exact step schedule, the fixed-point formats and
// the anti-windup method are this design's own.
module pi_controller
  import mc_pkg::*;
#(
  parameter int VMAX = 2047,   // upper limit of vref
  parameter int VMIN = -2047   // lower limit of vref
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  sword_t speed_ref,
  input  sword_t speed,
  input  uword_t kp,      // Q4.8
  input  uword_t ki_ts,   // Q4.8
  output logic   done,
  output sword_t vref,
  output logic   saturated  // vref was clamped in the last computation
);

  localparam int AW = 26;
  localparam logic signed [AW-1:0] ILIM_HI = AW'(VMAX) <<< KFRAC;
  localparam logic signed [AW-1:0] ILIM_LO = AW'(VMIN) <<< KFRAC;

  logic [3:0] step;   // 0 = idle
  sword_t ref_r, meas_r, e_r;
  uword_t kp_r, ki_r;
  logic signed [12:0] ma;      // multiplier operand registers
  sword_t             mb;
  logic signed [AW-1:0] prod, up_r, acc, acc_new, v_r;
  logic sat_hi, sat_lo;
  sword_t vsat_r;

  // the shared adder
  logic signed [AW-1:0] add_a, add_b, add_y;
  always_comb begin
    unique case (step)
      4'd1:    begin add_a = AW'(ref_r); add_b = -AW'(meas_r); end
      4'd7:    begin add_a = acc;        add_b = prod;         end
      4'd9:    begin add_a = up_r;       add_b = acc_new >>> KFRAC; end
      default: begin add_a = '0;         add_b = '0;           end
    endcase
    add_y = add_a + add_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= '0;
      ref_r     <= '0;
      meas_r    <= '0;
      e_r       <= '0;
      kp_r      <= '0;
      ki_r      <= '0;
      ma        <= '0;
      mb        <= '0;
      prod      <= '0;
      up_r      <= '0;
      acc       <= '0;
      acc_new   <= '0;
      v_r       <= '0;
      sat_hi    <= 1'b0;
      sat_lo    <= 1'b0;
      vsat_r    <= '0;
      vref      <= '0;
      saturated <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (step)
        4'd0: if (start) begin
          ref_r  <= speed_ref;
          meas_r <= speed;
          kp_r   <= kp;
          ki_r   <= ki_ts;
          step   <= 4'd1;
        end
        4'd1:  e_r <= sat_sword(32'(add_y));
        4'd2:  begin ma <= $signed({1'b0, kp_r}); mb <= e_r; end
        4'd3:  prod <= AW'(ma * mb);
        4'd4:  up_r <= prod >>> KFRAC;
        4'd5:  begin ma <= $signed({1'b0, ki_r}); mb <= e_r; end
        4'd6:  prod <= AW'(ma * mb);
        4'd7:  acc_new <= add_y;
        4'd8:  begin
          if (acc_new > ILIM_HI)      acc_new <= ILIM_HI;
          else if (acc_new < ILIM_LO) acc_new <= ILIM_LO;
        end
        4'd9:  v_r <= add_y;
        4'd10: begin
          sat_hi <= (v_r > AW'(VMAX));
          sat_lo <= (v_r < AW'(VMIN));
        end
        4'd11: if (!((sat_hi && !e_r[11] && e_r != 0) || (sat_lo && e_r[11])))
                 acc <= acc_new;
        4'd12: vsat_r <= sat_hi ? sword_t'(VMAX) : sat_lo ? sword_t'(VMIN) : v_r[11:0];
        4'd13: begin
          vref      <= vsat_r;
          saturated <= sat_hi | sat_lo;
          done      <= 1'b1;
        end
        default: ;
      endcase
      if (step != 0) step <= (step == 4'd13) ? 4'd0 : step + 1'b1;
    end
  end

endmodule
