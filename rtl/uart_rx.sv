// uart_rx: dynamic packet receiver fed by the radio transceiver.
//
// Runs on the A frequency (tick, OVERSAMPLE x bit rate) through the shared
// byte receiver uart_rx_byte. The first byte of a packet is its length; the
// receiver then collects exactly that many bytes, so any packet size from 1
// to MAX_BYTES is taken without configuration. A length of 0 or above
// MAX_BYTES raises len_err; the following `length` bytes are then counted
// and dropped, so the receiver stays aligned to the next packet. A byte with
// a bad stop bit raises frame_err and discards the packet being collected.
//
// A complete packet is offered to data processing with the four-phase
// handshake also used by uart_tx: req high with len/data stable, the
// consumer answers ack, req falls, and the receiver waits for ack to fall
// before it offers the next packet. Bytes arriving while a packet is still
// held are dropped (overrun pulse).
//
// en comes from the sync module: while it is low the receiver is idle and
// any partial or not yet consumed packet is discarded; radio_on follows en, so the radio is
// awake for reception only while the receiver is.
//
// From the published design: byte-by-byte reception with start/stop bits, the size of
// the packet is found during reception, enabling by sync together with the
// radio. Length byte, error handling and handshake are this design's.
module uart_rx
  import wsn_pkg::*;
#(
  parameter int MAX_BYTES  = PKT_MAX_BYTES,
  parameter int OVERSAMPLE = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      tick,
  input  logic                      rxd,
  output logic                      req,
  output logic [7:0]                len,
  output logic [MAX_BYTES-1:0][7:0] data,
  input  logic                      ack,
  output logic                      radio_on,
  output logic                      frame_err,
  output logic                      len_err,
  output logic                      overrun
);

  typedef enum logic [2:0] {P_LEN, P_BODY, P_SKIP, P_OFFER, P_RELEASE} pstate_e;

  pstate_e    state;
  logic [7:0] cnt;
  logic [7:0] skip_len;
  logic       bv, fe;
  logic [7:0] bd;

  uart_rx_byte #(.OVERSAMPLE(OVERSAMPLE)) u_byte (
    .clk, .rst_n, .en, .tick, .rxd,
    .byte_valid(bv), .byte_data(bd), .frame_err(fe)
  );

  assign radio_on = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_LEN;
      cnt       <= '0;
      skip_len  <= '0;
      len       <= '0;
      data      <= '0;
      req       <= 1'b0;
      frame_err <= 1'b0;
      len_err   <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      frame_err <= 1'b0;
      len_err   <= 1'b0;
      overrun   <= 1'b0;
      if (!en && state != P_RELEASE) begin
        // window closed: drop partial or unconsumed packet
        state <= (state == P_OFFER) ? P_RELEASE : P_LEN;
        req   <= 1'b0;
        cnt   <= '0;
      end else begin
        unique case (state)
          P_LEN: begin
            cnt <= '0;
            if (fe) frame_err <= 1'b1;
            else if (bv) begin
              if (bd == 8'd0 || int'(bd) > MAX_BYTES) begin
                len_err  <= 1'b1;
                skip_len <= bd;
                state    <= (bd == 8'd0) ? P_LEN : P_SKIP;
              end else begin
                len   <= bd;
                state <= P_BODY;
              end
            end
          end
          P_BODY: begin
            if (fe) begin
              frame_err <= 1'b1;
              state     <= P_LEN;
            end else if (bv) begin
              data[cnt] <= bd;
              cnt       <= cnt + 1'b1;
              if (cnt + 1'b1 == len) begin
                req   <= 1'b1;
                state <= P_OFFER;
              end
            end
          end
          P_SKIP: begin
            if (bv || fe) begin
              cnt <= cnt + 1'b1;
              if (cnt + 1'b1 == skip_len) state <= P_LEN;
            end
          end
          P_OFFER: begin
            if (bv || fe) overrun <= 1'b1;
            if (ack) begin
              req   <= 1'b0;
              state <= P_RELEASE;
            end
          end
          P_RELEASE: begin
            if (bv || fe) overrun <= 1'b1;
            if (!ack) state <= P_LEN;
          end
          default: state <= P_LEN;
        endcase
      end
    end
  end

  a_req_stable : assert property (@(posedge clk) disable iff (!rst_n)
                                  (req && !ack) |=> req);

endmodule
