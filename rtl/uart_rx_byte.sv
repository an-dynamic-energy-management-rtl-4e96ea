// uart_rx_byte: oversampling serial byte receiver shared by the radio
// receiver and the sensor reader.
//
// Frame: one start bit (0), eight data bits LSB first, one stop bit (1);
// line idles high. The serial input is first synchronised to clk by two
// flip-flops. All bit timing is counted in ticks of the enable strobe `tick`,
// which must run at OVERSAMPLE times the bit rate (the A frequency). A
// falling edge starts a frame; the start bit is re-checked half a bit later
// and each following bit is sampled once per OVERSAMPLE ticks, i.e. near the
// bit centre. When the stop bit is sampled, byte_valid (stop bit 1) or
// frame_err (stop bit 0) is high for exactly one clk cycle with the byte on
// byte_data. en = 0 returns the receiver to idle at once.
//
// The 8N1 frame and the start/stop bits follow the published design; the 16x
// oversampling and the centre sampling are this design's choice.
module uart_rx_byte #(
  parameter int OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       tick,
  input  logic       rxd,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_err
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  localparam int CW = $clog2(OVERSAMPLE);

  rstate_e       state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [1:0]    sync_q;
  logic          rx_s;

  assign rx_s = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= 2'b11;
    else        sync_q <= {sync_q[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_IDLE;
      cnt        <= '0;
      bitn       <= '0;
      byte_data  <= '0;
      byte_valid <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      frame_err  <= 1'b0;
      if (!en) begin
        state <= R_IDLE;
        cnt   <= '0;
      end else if (tick) begin
        unique case (state)
          R_IDLE: begin
            cnt <= '0;
            if (!rx_s) state <= R_START;
          end
          R_START: begin
            if (cnt == CW'(OVERSAMPLE / 2 - 1)) begin
              cnt   <= '0;
              bitn  <= '0;
              state <= rx_s ? R_IDLE : R_DATA;   // glitch: back to idle
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          R_DATA: begin
            if (cnt == CW'(OVERSAMPLE - 1)) begin
              cnt       <= '0;
              byte_data <= {rx_s, byte_data[7:1]};
              bitn      <= bitn + 1'b1;
              if (bitn == 3'd7) state <= R_STOP;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          R_STOP: begin
            if (cnt == CW'(OVERSAMPLE - 1)) begin
              cnt        <= '0;
              state      <= R_IDLE;
              byte_valid <= rx_s;
              frame_err  <= !rx_s;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
          default: state <= R_IDLE;
        endcase
      end
    end
  end

endmodule
