// sensor_reader: generic sensor reader (GSRM).
//
// Reads one sample per wake-up from a serial sensor (for example an NMEA GPS
// sentence or an ultrasonic range report) and hands it to data processing
// as a packet payload. Bytes arrive through uart_rx_byte on the A frequency
// (tick = OVERSAMPLE x bit rate). They are stored until the sensor's line
// terminator SENSOR_EOL (not stored) or until MAX_BYTES bytes are held; the
// sample is then offered with the four-phase req/ack handshake used across
// the node. Bytes with a bad stop bit are dropped and counted on frame_err.
//
// sensor_pwr powers the sensor from the moment the sync module enables the
// reader until the sample has been taken; after that the sensor is switched
// off for the rest of the wake-up, and a new sample is read only after en
// has been low again. A terminator with no byte before it is ignored.
//
// From the published design: a generic reader that reads the sensor data and forms it
// for processing, on the A frequency, enabled by sync. One sample per cycle,
// the terminator and the power-off after the sample are this design's.
module sensor_reader
  import wsn_pkg::*;
#(
  parameter int MAX_BYTES  = SENSOR_MAX,
  parameter int OVERSAMPLE = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      tick,
  input  logic                      sensor_rxd,
  output logic                      sensor_pwr,
  output logic                      req,
  output logic [7:0]                len,
  output logic [MAX_BYTES-1:0][7:0] data,
  input  logic                      ack,
  output logic                      frame_err
);

  typedef enum logic [1:0] {S_COLLECT, S_OFFER, S_RELEASE, S_DONE} sstate_e;

  sstate_e    state;
  logic       bv, fe;
  logic [7:0] bd;
  logic       rx_en;

  assign rx_en      = en && (state == S_COLLECT);
  assign sensor_pwr = rx_en;

  uart_rx_byte #(.OVERSAMPLE(OVERSAMPLE)) u_byte (
    .clk, .rst_n, .en(rx_en), .tick, .rxd(sensor_rxd),
    .byte_valid(bv), .byte_data(bd), .frame_err(fe)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      len       <= '0;
      data      <= '0;
      req       <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      frame_err <= fe;
      unique case (state)
        S_COLLECT: begin
          if (!en) begin
            len <= '0;
          end else if (bv) begin
            if (bd == SENSOR_EOL) begin
              if (len != 8'd0) begin
                req   <= 1'b1;
                state <= S_OFFER;
              end
            end else begin
              data[len] <= bd;
              len       <= len + 1'b1;
              if (int'(len) + 1 == MAX_BYTES) begin
                req   <= 1'b1;
                state <= S_OFFER;
              end
            end
          end
        end
        S_OFFER: begin
          if (ack) begin
            req   <= 1'b0;
            state <= S_RELEASE;
          end else if (!en) begin
            req   <= 1'b0;
            state <= S_RELEASE;
          end
        end
        S_RELEASE: if (!ack) state <= S_DONE;
        S_DONE: begin
          if (!en) begin
            len   <= '0;
            state <= S_COLLECT;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  a_req_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                  (req && !ack && en) |=> req);

endmodule
