// wsn_pkg: constants and types shared by the sensor-node architecture.
//
// Packet format used on the radio link (the published design fixes only that packets
// are sent byte by byte with start/stop bits, that their size varies and is
// detected by the receiver, and that a size limit exists; the layout below
// is this design's choice):
//
//   wire order : LEN, B0, B1, ... B(LEN-1)      (LEN = 1 .. PKT_MAX_BYTES)
//   B0         : packet type (PKT_DATA or PKT_ACK)
//   B1         : source node id
//   B2         : sequence number
//   DATA       : B3 .. = sensor sample bytes
//   ACK        : B3..B5 = sleep time of the acknowledging node, in B ticks,
//                most significant byte first (used to align schedules)
//
// PKT_MAX_BYTES = 24 bytes (192 bits) covers the largest packet size the
// published design evaluates (190 bits).
package wsn_pkg;

  localparam int PKT_MAX_BYTES = 24;
  localparam int HDR_BYTES     = 3;
  localparam int SENSOR_MAX    = PKT_MAX_BYTES - HDR_BYTES;
  localparam int TIME_W        = 24;   // width of sleep / wake timers (B ticks)
  localparam int ACK_LEN       = HDR_BYTES + TIME_W / 8;

  typedef enum logic [7:0] {
    PKT_DATA = 8'h01,
    PKT_ACK  = 8'h02
  } pkt_type_e;

  // Sample terminator of the serial sensors (carriage return)
  localparam logic [7:0] SENSOR_EOL = 8'h0D;


endpackage
