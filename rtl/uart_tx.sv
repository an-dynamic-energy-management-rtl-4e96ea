// uart_tx: packet transmitter towards the radio transceiver.
//
// Sends one packet per request as a sequence of serial bytes: first the
// length byte, then `len` packet bytes (index 0 first). Every byte is framed
// with a start bit (0) and a stop bit (1), data LSB first, line idle high.
// Bit timing is counted directly on the logical clock: each bit lasts
// baud_div clk cycles (10 MHz / baud_div = bit rate, e.g. 2083 for
// 4800 bps), because a transmitter needs a finer rate than the A frequency
// gives.
//
// Handshake with the data processing module (four-phase, level based, so the
// two sides may run on different clock enables): the producer raises req
// with len/data stable; the transmitter takes the packet when idle and
// enabled, sends it, then raises ack and holds it until req falls. A length
// above MAX_BYTES is cut to MAX_BYTES, a length of 0 sends only the length
// byte.
//
// radio_on asks the radio to wake for exactly the time of the transfer
// (activate, transmit, disable). en comes from the sync module; when it
// falls mid-packet the transfer is abandoned, txd returns high and ack is
// given so the producer is not left waiting.
//
// From the published design: byte-by-byte transfer with start and stop bits, 1200 ..
// 230400 bps, a size limit, runs on the logical clock, enabled by sync,
// controls the radio. The length byte and the handshake are this design's.
module uart_tx
  import wsn_pkg::*;
#(
  parameter int MAX_BYTES = PKT_MAX_BYTES,
  parameter int DIV_W     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [DIV_W-1:0]         baud_div,
  input  logic                     req,
  input  logic [7:0]               len,
  input  logic [MAX_BYTES-1:0][7:0] data,
  output logic                     ack,
  output logic                     txd,
  output logic                     radio_on,
  output logic                     busy
);

  typedef enum logic [1:0] {T_IDLE, T_SEND, T_ACK} tstate_e;

  tstate_e                    state;
  logic [MAX_BYTES-1:0][7:0]  buf_q;
  logic [7:0]                 len_q;
  logic [7:0]                 idx;      // 0 = length byte, k = data[k-1]
  logic [9:0]                 shreg;    // {stop, data, start}, sent LSB first
  logic [3:0]                 bitn;
  logic [DIV_W-1:0]           bcnt;

  function automatic logic [7:0] clamp_len(logic [7:0] l);
    return (int'(l) > MAX_BYTES) ? 8'(MAX_BYTES) : l;
  endfunction

  assign busy = (state == T_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      buf_q    <= '0;
      len_q    <= '0;
      idx      <= '0;
      shreg    <= '1;
      bitn     <= '0;
      bcnt     <= '0;
      ack      <= 1'b0;
      txd      <= 1'b1;
      radio_on <= 1'b0;
    end else begin
      unique case (state)
        T_IDLE: begin
          txd <= 1'b1;
          if (en && req) begin
            buf_q    <= data;
            len_q    <= clamp_len(len);
            shreg    <= {1'b1, clamp_len(len), 1'b0};
            idx      <= '0;
            bitn     <= '0;
            bcnt     <= '0;
            radio_on <= 1'b1;
            state    <= T_SEND;
          end
        end
        T_SEND: begin
          if (!en) begin
            txd      <= 1'b1;
            radio_on <= 1'b0;
            ack      <= 1'b1;
            state    <= T_ACK;
          end else begin
            txd <= shreg[0];
            if (bcnt + 1'b1 >= baud_div) begin
              bcnt  <= '0;
              shreg <= {1'b1, shreg[9:1]};
              if (bitn == 4'd9) begin
                bitn <= '0;
                if (idx == len_q) begin
                  // last stop bit done
                  radio_on <= 1'b0;
                  ack      <= 1'b1;
                  txd      <= 1'b1;
                  state    <= T_ACK;
                end else begin
                  shreg <= {1'b1, buf_q[idx], 1'b0};
                  idx   <= idx + 1'b1;
                end
              end else begin
                bitn <= bitn + 1'b1;
              end
            end else begin
              bcnt <= bcnt + 1'b1;
            end
          end
        end
        T_ACK: begin
          txd <= 1'b1;
          if (!req) begin
            ack   <= 1'b0;
            state <= T_IDLE;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The producer must hold its request until it is acknowledged.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
                                (req && !ack && state != T_IDLE) |=> req);

endmodule
