// spi_interface: SPI link to the Linux single-board computer and the PI
// parameter stage of the control cycle.
//
// Link side: an SPI slave, mode 0 (CPOL=0, CPHA=0), 16-bit frames sent MSB
// first as {addr[3:0], data[11:0]}. SCLK, CS_n and MOSI are brought into the
// system clock domain by two flip-flops each, so SCLK must stay at or below
// clk/8 and the master must wait four clk cycles after pulling CS_n low
// before its first SCLK edge. A complete frame writes one shadow register
// (see mc_pkg::reg_addr_e); frames with other addresses are ignored, and a
// frame cut short by CS_n going high is dropped. While the frame comes in,
// MISO returns status_word, sampled when CS_n falls: this is how the
// computer reads the measured speed for its display.
//
// Control-cycle side: the shadow registers are never used directly. On
// Start the module takes a snapshot of them, computes the discrete integral
// gain Ki*Ts = Ki * TS_SCALE / 4096 (truncated) on a serial multiplier and
// then publishes the whole parameter set on `params` at once, so that the
// PI controller always sees a consistent set. Timing: Start in cycle 0, End
// in cycle 16 (LAT_SPI): snapshot (1), multiply (13), scale (1), publish (1).
//
// The module's role (the PI gains come from the computer over SPI, 16-cycle
// stage) follows the controller's design; the frame format, the register
// map, the read-back word and the Ki*Ts computation are this design's own.
module spi_interface
  import mc_pkg::*;
#(
  parameter logic [11:0] TS_SCALE = 12'd410,  // sampling period factor, Q0.12
  parameter logic [11:0] KP_RESET = 12'd256   // Kp after reset (1.0)
) (
  input  logic         clk,
  input  logic         rst_n,
  // SPI slave pins
  input  logic         spi_sclk,
  input  logic         spi_cs_n,
  input  logic         spi_mosi,
  output logic         spi_miso,
  input  logic [15:0]  status_word,
  // control cycle
  input  logic         start,
  output logic         done,
  output ctrl_params_t params,
  output logic [7:0]   frame_count  // complete frames received (wraps)
);

  // ---------------- SPI slave ----------------
  logic [2:0] sclk_s, csn_s;
  logic [1:0] mosi_s;
  logic       sclk_rise, sclk_fall, csn_fall, csn_high;
  logic [15:0] rx_sr, tx_sr;
  logic [4:0]  bit_cnt;
  logic        frame_done;
  logic [15:0] frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      csn_s  <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      csn_s  <= {csn_s[1:0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
    end
  end

  assign sclk_rise = sclk_s[1] & ~sclk_s[2];
  assign sclk_fall = ~sclk_s[1] & sclk_s[2];
  assign csn_fall  = ~csn_s[1] & csn_s[2];
  assign csn_high  = csn_s[1];
  assign spi_miso  = tx_sr[15];
  assign frame     = {rx_sr[14:0], mosi_s[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr       <= '0;
      tx_sr       <= '0;
      bit_cnt     <= '0;
      frame_done  <= 1'b0;
      frame_count <= '0;
    end else begin
      frame_done <= 1'b0;
      if (csn_high) begin
        bit_cnt <= '0;
      end else begin
        if (csn_fall) tx_sr <= status_word;
        else if (sclk_fall) tx_sr <= {tx_sr[14:0], 1'b0};
        if (sclk_rise) begin
          rx_sr <= frame;
          if (bit_cnt == 5'(SPI_FRAME - 1)) begin
            bit_cnt     <= '0;
            frame_done  <= 1'b1;
            frame_count <= frame_count + 1'b1;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
      end
    end
  end

  // shadow registers, written by complete frames
  uword_t sh_kp, sh_ki;
  sword_t sh_ref, sh_cmd;
  logic   sh_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_kp   <= KP_RESET;
      sh_ki   <= '0;
      sh_ref  <= '0;
      sh_cmd  <= '0;
      sh_mode <= 1'b0;
    end else if (frame_done) begin
      unique case (rx_sr[15:12])
        REG_KP:   sh_kp   <= rx_sr[11:0];
        REG_KI:   sh_ki   <= rx_sr[11:0];
        REG_REF:  sh_ref  <= rx_sr[11:0];
        REG_DUTY: sh_cmd  <= rx_sr[11:0];
        REG_CTRL: sh_mode <= rx_sr[0];
        default: ;
      endcase
    end
  end

  // ---------------- parameter stage ----------------
  typedef enum logic [1:0] {S_IDLE, S_MSTART, S_MWAIT, S_PUBLISH} state_e;
  state_e       state;
  ctrl_params_t snap;
  logic         m_start, m_busy, m_done;
  logic [23:0]  m_p;

  assign m_start = (state == S_MSTART);

  serial_mult #(.W(12)) u_mult (
    .clk, .rst_n, .start(m_start), .a(snap.ki_ts), .b(TS_SCALE),
    .busy(m_busy), .done(m_done), .p(m_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      snap   <= '{kp: KP_RESET, ki_ts: '0, speed_ref: '0, sw_cmd: '0, sw_mode: 1'b0};
      params <= '{kp: KP_RESET, ki_ts: '0, speed_ref: '0, sw_cmd: '0, sw_mode: 1'b0};
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          // ki_ts holds the raw Ki until the product replaces it
          snap  <= '{kp: sh_kp, ki_ts: sh_ki, speed_ref: sh_ref, sw_cmd: sh_cmd, sw_mode: sh_mode};
          state <= S_MSTART;
        end
        S_MSTART: state <= S_MWAIT;
        S_MWAIT: if (m_done) begin
          snap.ki_ts <= m_p[23:12];  // a 12x12 product over 4096 always fits
          state      <= S_PUBLISH;
        end
        S_PUBLISH: begin
          params <= snap;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
