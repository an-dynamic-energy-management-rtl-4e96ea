// wsn_top: logical architecture of an energy-managed wireless sensor node.
//
// The node reads a serial sensor, sends the sample over a serial radio
// transceiver, acknowledges the samples of other nodes and sleeps between
// communication cycles. Dynamic power is kept low in two ways: the logic
// runs on divided frequencies (frequency splitter) and a scheduler (sync)
// stops every other module and switches off the radio and the sensor
// between cycles.
//
//   clk (10 MHz logical clock)
//     -> freq_splitter : tick_a (A frequency, I/O modules), tick_b (B)
//     -> uart_tx       : runs on clk itself, bit time cfg_baud_div clocks
//   tick_a -> uart_rx (radio_dout), sensor_reader (sensor_rxd)
//   tick_b -> data_proc, sync_ctrl
//   sync_ctrl.awake enables uart_rx, uart_tx, sensor_reader, data_proc and
//   the A divider; data_proc reports the end of the cycle back to sync_ctrl.
//
// Run-time configuration (hold stable while the node runs):
//   cfg_div_a       clk cycles per A tick = 10 MHz / (OVERSAMPLE x bit rate)
//                   (130 for 4800 bps with OVERSAMPLE = 16; for rates above
//                   about 57600 bps choose OVERSAMPLE = 8 or 4 so that the
//                   divisor stays large enough to hit the rate within 2 %)
//   cfg_div_b       clk cycles per B tick (100 -> 100 kHz, 10 -> 1 MHz)
//   cfg_baud_div    clk cycles per transmitted bit (2083 for 4800 bps)
//   cfg_sleep_ticks first sleep time in B ticks (later taken from ACKs)
//   cfg_wake_ticks  longest wake-up in B ticks
// External lines: radio_din (to the radio's serial input), radio_dout (from
// its serial output), radio_sleep_rq (1 = radio may sleep), sensor_rxd and
// sensor_pwr. Status: awake, sleep_len, cycles, ok_cycles and one-cycle
// receiver error pulses.
//
// Block structure, the A/B frequency assignment and the transmitter on the
// logical clock follow the published design; the clock-enable style and the packet
// handshakes are this design's.
module wsn_top
  import wsn_pkg::*;
#(
  parameter logic [7:0] NODE_ID    = 8'd1,
  parameter int         OVERSAMPLE = 16    // A ticks per received bit
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       cfg_div_a,
  input  logic [15:0]       cfg_div_b,
  input  logic [15:0]       cfg_baud_div,
  input  logic [TIME_W-1:0] cfg_sleep_ticks,
  input  logic [TIME_W-1:0] cfg_wake_ticks,
  // radio transceiver
  output logic              radio_din,
  input  logic              radio_dout,
  output logic              radio_sleep_rq,
  // sensor
  input  logic              sensor_rxd,
  output logic              sensor_pwr,
  // status
  output logic              awake,
  output logic [TIME_W-1:0] sleep_len,
  output logic [15:0]       cycles,
  output logic [15:0]       ok_cycles,
  output logic              rx_frame_err,
  output logic              rx_len_err,
  output logic              rx_overrun,
  output logic              sensor_frame_err
);

  logic tick_a, tick_b;

  // receiver -> data processing
  logic                          rx_req, rx_ack;
  logic [7:0]                    rx_len;
  logic [PKT_MAX_BYTES-1:0][7:0] rx_data;
  // sensor reader -> data processing
  logic                          sr_req, sr_ack;
  logic [7:0]                    sr_len;
  logic [SENSOR_MAX-1:0][7:0]    sr_data;
  // data processing -> transmitter
  logic                          tx_req, tx_ack;
  logic [7:0]                    tx_len;
  logic [PKT_MAX_BYTES-1:0][7:0] tx_data;
  logic                          tx_radio_on, rx_radio_on;
  // data processing <-> sync
  logic                          cycle_done, sched_valid;
  logic [TIME_W-1:0]             sched_sleep;

  freq_splitter u_splitter (
    .clk, .rst_n,
    .div_a (cfg_div_a),
    .div_b (cfg_div_b),
    .en_a  (awake),
    .tick_a, .tick_b
  );

  sync_ctrl u_sync (
    .clk, .rst_n,
    .tick            (tick_b),
    .cfg_sleep_ticks,
    .cfg_wake_ticks,
    .cycle_done,
    .sched_valid,
    .sched_sleep,
    .awake,
    .sleep_len,
    .cycles,
    .ok_cycles
  );

  uart_rx #(.OVERSAMPLE(OVERSAMPLE)) u_rx (
    .clk, .rst_n,
    .en        (awake),
    .tick      (tick_a),
    .rxd       (radio_dout),
    .req       (rx_req),
    .len       (rx_len),
    .data      (rx_data),
    .ack       (rx_ack),
    .radio_on  (rx_radio_on),
    .frame_err (rx_frame_err),
    .len_err   (rx_len_err),
    .overrun   (rx_overrun)
  );

  sensor_reader #(.OVERSAMPLE(OVERSAMPLE)) u_sensor (
    .clk, .rst_n,
    .en         (awake),
    .tick       (tick_a),
    .sensor_rxd,
    .sensor_pwr,
    .req        (sr_req),
    .len        (sr_len),
    .data       (sr_data),
    .ack        (sr_ack),
    .frame_err  (sensor_frame_err)
  );

  data_proc #(.NODE_ID(NODE_ID)) u_proc (
    .clk, .rst_n,
    .en       (awake),
    .tick     (tick_b),
    .rx_req, .rx_len, .rx_data, .rx_ack,
    .sr_req, .sr_len, .sr_data, .sr_ack,
    .tx_req, .tx_len, .tx_data, .tx_ack,
    .sleep_cur (sleep_len),
    .cycle_done,
    .sched_valid,
    .sched_sleep
  );

  uart_tx u_tx (
    .clk, .rst_n,
    .en       (awake),
    .baud_div (cfg_baud_div),
    .req      (tx_req),
    .len      (tx_len),
    .data     (tx_data),
    .ack      (tx_ack),
    .txd      (radio_din),
    .radio_on (tx_radio_on),
    .busy     ()
  );

  assign radio_sleep_rq = !(tx_radio_on || rx_radio_on);

endmodule
