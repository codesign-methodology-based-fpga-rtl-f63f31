// dc_motor_model: behavioural model of the plant, a DC motor with an
// incremental encoder, driven by a PWM bridge. Not synthesizable.
//
// The bridge voltage is the PWM duty averaged over UPD clock cycles, signed
// by the direction input. The motor is first order: its speed w (encoder
// counts per clock) moves towards W_MAX * u with time constant TAU clock
// cycles. The shaft position integrates w every clock; its integer part
// drives the A/B lines in quadrature (A leads B when turning forward).
// `counts` is the integer encoder position, for the testbench's checks.
module dc_motor_model #(
  parameter real W_MAX = 0.024,     // counts per clock at full voltage
  parameter real TAU   = 500000.0,  // mechanical time constant, clock cycles
  parameter int  UPD   = 100        // averaging window of the bridge voltage
) (
  input  logic clk,
  input  logic pwm,
  input  logic dir,
  output logic enc_a,
  output logic enc_b,
  output int   counts,
  output real  w
);

  real pos = 0.0;
  int  highs = 0, n = 0;
  real u;

  initial begin
    w = 0.0;
    counts = 0;
    enc_a = 1'b0;
    enc_b = 1'b0;
  end

  always @(posedge clk) begin
    highs = highs + (pwm ? 1 : 0);
    n = n + 1;
    if (n == UPD) begin
      u = real'(highs) / real'(UPD);
      if (dir) u = -u;
      w = w + (W_MAX * u - w) * real'(UPD) / TAU;
      highs = 0;
      n = 0;
    end
    pos = pos + w;
    counts = $rtoi($floor(pos));
    case (counts & 3)
      0: {enc_a, enc_b} = 2'b00;
      1: {enc_a, enc_b} = 2'b10;
      2: {enc_a, enc_b} = 2'b11;
      default: {enc_a, enc_b} = 2'b01;
    endcase
  end

endmodule
