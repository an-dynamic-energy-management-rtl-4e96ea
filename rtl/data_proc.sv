// data_proc: data processing module of the sensor node.
//
// Runs on the B frequency: all state changes happen on clk cycles where
// tick is high, and only while the sync module enables it (en). One
// processing cycle, as the published design defines it, runs from the arrival of the
// data to be processed until the acknowledgment of the packet this node
// sent:
//   1. A sensor sample from the sensor reader is wrapped into a DATA packet
//      (type, NODE_ID, sequence number, sample bytes) and passed to the
//      transmitter.
//   2. A DATA packet received from another node is answered with an ACK
//      packet (type, NODE_ID, the received sequence number, and this node's
//      current sleep time so the receiver can align its schedule).
//   3. An ACK that carries the sequence number of this node's DATA packet
//      ends the cycle: cycle_done goes high, and the sleep time it carries
//      is passed to the sync module on sched_sleep with a one-tick
//      sched_valid. It is passed on only when it is not 0 and the
//      acknowledging node has a lower node id than this one: the lowest id
//      in reach acts as the time reference, so two nodes never keep
//      swapping their sleep times.
// Any other received packet is consumed and dropped. Only one DATA packet is
// sent per wake-up; the sequence number advances after each wake-up in which
// one was sent. Received packets take precedence over the sensor sample so
// acknowledgments are not delayed.
//
// All three links (receiver, sensor reader, transmitter) use the node's
// four-phase req/ack handshake. When en falls, the module drops its requests
// and acknowledgments and waits idle for the next wake-up.
//
// From the published design: the data paths RX -> processing, sensor -> processing,
// processing -> TX, the B frequency, the cycle ending on the
// acknowledgment. The packet fields and the ordering rules are this
// design's.
module data_proc
  import wsn_pkg::*;
#(
  parameter int         MAX_BYTES = PKT_MAX_BYTES,
  parameter int         SR_BYTES  = SENSOR_MAX,
  parameter logic [7:0] NODE_ID   = 8'd1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      tick,
  // from the receiver
  input  logic                      rx_req,
  input  logic [7:0]                rx_len,
  input  logic [MAX_BYTES-1:0][7:0] rx_data,
  output logic                      rx_ack,
  // from the sensor reader
  input  logic                      sr_req,
  input  logic [7:0]                sr_len,
  input  logic [SR_BYTES-1:0][7:0]  sr_data,
  output logic                      sr_ack,
  // to the transmitter
  output logic                      tx_req,
  output logic [7:0]                tx_len,
  output logic [MAX_BYTES-1:0][7:0] tx_data,
  input  logic                      tx_ack,
  // to / from the sync module
  input  logic [TIME_W-1:0]         sleep_cur,
  output logic                      cycle_done,
  output logic                      sched_valid,
  output logic [TIME_W-1:0]         sched_sleep
);

  typedef enum logic [2:0] {D_IDLE, D_WAIT, D_SEND, D_SENT, D_DONE} dstate_e;

  dstate_e    state;
  logic [7:0] seq;
  logic       sent_data;

  assign cycle_done = (state == D_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= D_IDLE;
      seq         <= '0;
      sent_data   <= 1'b0;
      rx_ack      <= 1'b0;
      sr_ack      <= 1'b0;
      tx_req      <= 1'b0;
      tx_len      <= '0;
      tx_data     <= '0;
      sched_valid <= 1'b0;
      sched_sleep <= '0;
    end else if (tick) begin
      sched_valid <= 1'b0;
      if (!en) begin
        if (sent_data) seq <= seq + 1'b1;
        state     <= D_IDLE;
        sent_data <= 1'b0;
        rx_ack    <= 1'b0;
        sr_ack    <= 1'b0;
        tx_req    <= 1'b0;
      end else begin
        // release of the input handshakes
        if (!rx_req) rx_ack <= 1'b0;
        if (!sr_req) sr_ack <= 1'b0;
        unique case (state)
          D_IDLE: state <= D_WAIT;
          D_WAIT: begin
            if (rx_req && !rx_ack) begin
              rx_ack <= 1'b1;
              if (rx_len >= 8'(HDR_BYTES) && rx_data[0] == PKT_DATA) begin
                tx_data    <= '0;
                tx_data[0] <= PKT_ACK;
                tx_data[1] <= NODE_ID;
                tx_data[2] <= rx_data[2];
                for (int i = 0; i < TIME_W / 8; i++)
                  tx_data[HDR_BYTES + i] <= sleep_cur[TIME_W - 8*i - 1 -: 8];
                tx_len     <= 8'(ACK_LEN);
                state      <= D_SEND;
              end else if (rx_len >= 8'(ACK_LEN) && rx_data[0] == PKT_ACK &&
                           sent_data && rx_data[2] == seq) begin
                for (int i = 0; i < TIME_W / 8; i++)
                  sched_sleep[TIME_W - 8*i - 1 -: 8] <= rx_data[HDR_BYTES + i];
                sched_valid <= (rx_data[HDR_BYTES +: TIME_W/8] != '0) &&
                               (rx_data[1] < NODE_ID);
                state       <= D_DONE;
              end
            end else if (sr_req && !sr_ack && !sent_data) begin
              sr_ack     <= 1'b1;
              sent_data  <= 1'b1;
              tx_data    <= '0;
              tx_data[0] <= PKT_DATA;
              tx_data[1] <= NODE_ID;
              tx_data[2] <= seq;
              for (int i = 0; i < SR_BYTES && HDR_BYTES + i < MAX_BYTES; i++)
                tx_data[HDR_BYTES + i] <= sr_data[i];
              tx_len     <= 8'(HDR_BYTES) + sr_len;
              state      <= D_SEND;
            end
          end
          D_SEND: begin
            tx_req <= 1'b1;
            if (tx_req && tx_ack) begin
              tx_req <= 1'b0;
              state  <= D_SENT;
            end
          end
          D_SENT: if (!tx_ack) state <= D_WAIT;
          D_DONE: ;
          default: state <= D_IDLE;
        endcase
      end
    end
  end

endmodule
