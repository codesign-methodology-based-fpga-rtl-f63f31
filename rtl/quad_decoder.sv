// quad_decoder: x4 decoder for the A/B outputs of an incremental encoder.
//
// A and B are brought into the clock domain by two flip-flops each. Every
// valid Gray-code step of {A,B} moves the position counter by one: +1 when A
// leads B, -1 when B leads A. A step in which both channels change at once is
// not decodable; it leaves the position alone and raises err for one cycle.
// The position counter wraps; users take differences of it. Timing: an edge
// on A or B shows up in pos three clock cycles later. The encoder must not
// step more than once per two clock cycles.
module quad_decoder #(
  parameter int unsigned PW = 16  // position counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enc_a,
  input  logic          enc_b,
  output logic [PW-1:0] pos,
  output logic          err
);

  logic [1:0] sync_a, sync_b;
  logic [1:0] prev, curr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
      prev   <= '0;
    end else begin
      sync_a <= {sync_a[0], enc_a};
      sync_b <= {sync_b[0], enc_b};
      prev   <= curr;
    end
  end

  assign curr = {sync_a[1], sync_b[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0;
      err <= 1'b0;
    end else begin
      err <= 1'b0;
      unique case ({prev, curr})
        // forward: 00 -> 10 -> 11 -> 01 -> 00 (A leads B)
        4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: pos <= pos + 1'b1;
        // reverse
        4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: pos <= pos - 1'b1;
        4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01: err <= 1'b1;
        default: ;  // no change
      endcase
    end
  end

endmodule
