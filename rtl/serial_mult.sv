// serial_mult: unsigned shift-and-add multiplier, one partial product per
// clock cycle.
//
// This is the word-level multiplier operator of the operator library used by
// the speed-capture and SPI modules. A Start pulse loads the operands; on each
// of the next W clock edges the multiplier examines one bit of b (LSB first)
// and adds the shifted multiplicand to the accumulator. Timing: if start is
// high in cycle 0, done is high for one cycle in cycle W+1 and p holds a*b
// from then until the next start. A start while busy restarts the operation.
module serial_mult #(
  parameter int unsigned W = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] p
);

  logic [2*W-1:0]       mcand;
  logic [W-1:0]         mplier;
  logic [$clog2(W+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p      <= '0;
      mcand  <= '0;
      mplier <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        p      <= '0;
        mcand  <= {{W{1'b0}}, a};
        mplier <= b;
        cnt    <= ($clog2(W+1))'(W);
        busy   <= 1'b1;
      end else if (busy) begin
        if (mplier[0]) p <= p + mcand;
        mcand  <= mcand << 1;
        mplier <= mplier >> 1;
        cnt    <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
