// tb_uart_rx: drives serial packets into uart_rx from a bit-level model
// (8N1, bit time = 16 A ticks) and checks what the receiver offers: length
// and bytes of packets of 1, 16 and 24 bytes, the four-phase handshake, the
// rejection of a length above the limit (len_err) followed by correct
// reception of the next packet, a bad stop bit (frame_err, packet dropped),
// bytes arriving while a packet is held (overrun), and that nothing is
// received and the radio is off while en is low. A second instance with
// 8x oversampling receives a packet sent with no gaps between bytes.
module tb_uart_rx;
  import wsn_pkg::*;
  localparam int MB   = PKT_MAX_BYTES;
  localparam int TDIV = 4;              // clk cycles per A tick
  localparam int BIT  = 16 * TDIV;      // clk cycles per bit

  logic clk = 0, rst_n = 0, en = 1;
  logic tick = 0, rxd = 1;
  logic req, ack = 0;
  logic [7:0] len;
  logic [MB-1:0][7:0] data;
  logic radio_on, frame_err, len_err, overrun;
  int checks = 0, failures = 0;
  int n_len_err = 0, n_frame_err = 0, n_overrun = 0;

  uart_rx dut (.*);

  // second receiver with 8x oversampling (for high bit rates)
  localparam int BIT8 = 8 * TDIV;
  logic rxd8 = 1, req8, ack8 = 0, radio_on8, fe8, le8, ov8;
  logic [7:0] len8;
  logic [MB-1:0][7:0] data8;
  uart_rx #(.OVERSAMPLE(8)) dut8 (
    .clk, .rst_n, .en, .tick, .rxd(rxd8), .req(req8), .len(len8), .data(data8), .ack(ack8),
    .radio_on(radio_on8), .frame_err(fe8), .len_err(le8), .overrun(ov8));

  task automatic send_byte8(input logic [7:0] b);
    rxd8 <= 1'b0; repeat (BIT8) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd8 <= b[i]; repeat (BIT8) @(posedge clk); end
    rxd8 <= 1'b1; repeat (BIT8) @(posedge clk);
  endtask

  always #50 clk = ~clk;

  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TDIV - 1) ? 0 : tc + 1;
    tick <= (tc == TDIV - 1);
  end

  // error pulses are counted mid-cycle, away from the clock edge
  always @(negedge clk) begin
    if (len_err)   n_len_err++;
    if (frame_err) n_frame_err++;
    if (overrun)   n_overrun++;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b, input logic stop = 1'b1);
    rxd <= 1'b0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (BIT) @(posedge clk); end
    rxd <= stop; repeat (BIT) @(posedge clk);
    rxd <= 1'b1; repeat (2) @(posedge clk);
  endtask

  logic [7:0] pkt [MB];

  task automatic send_pkt(input int n);
    for (int i = 0; i < n; i++) pkt[i] = 8'($urandom);
    send_byte(8'(n));
    for (int i = 0; i < n; i++) send_byte(pkt[i]);
  endtask

  task automatic take_and_check(input int n);
    int w = 0;
    while (!req && w < 20 * BIT) begin @(posedge clk); w++; end
    check($sformatf("packet of %0d offered", n), req === 1'b1);
    check($sformatf("length %0d", n), len == 8'(n));
    for (int i = 0; i < n; i++)
      check($sformatf("byte %0d", i), data[i] == pkt[i]);
    repeat (7) @(posedge clk);
    check("req held until ack", req === 1'b1);
    ack <= 1;
    repeat (3) @(posedge clk);
    check("req drops after ack", req === 1'b0);
    ack <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check("radio on while enabled", radio_on === 1'b1);
    send_pkt(1);  take_and_check(1);
    send_pkt(16); take_and_check(16);
    send_pkt(24); take_and_check(24);
    // oversized: announced 30, 30 bytes follow, then a good packet
    send_byte(8'd30);
    for (int i = 0; i < 30; i++) send_byte(8'hA5);
    check("oversized packet not offered", req === 1'b0);
    check($sformatf("len_err raised (%0d)", n_len_err), n_len_err == 1);
    send_pkt(5); take_and_check(5);
    // frame error in the body
    send_byte(8'd3); send_byte(8'h11); send_byte(8'h22, 1'b0);
    repeat (BIT) @(posedge clk);
    check("frame_err raised", n_frame_err == 1);
    check("broken packet not offered", req === 1'b0);
    send_pkt(2); take_and_check(2);
    // overrun: packet held, another byte arrives
    send_pkt(3);
    repeat (BIT) @(posedge clk);
    send_byte(8'h55);
    check($sformatf("overrun flagged (%0d)", n_overrun), n_overrun == 1);
    take_and_check(3);
    // disabled: radio off, nothing received, partial packet dropped
    send_byte(8'd4); send_byte(8'h01);
    en <= 0;
    repeat (5) @(posedge clk);
    check("radio off while disabled", radio_on === 1'b0);
    send_byte(8'd1); send_byte(8'h77);
    check("nothing received while disabled", req === 1'b0);
    en <= 1;
    repeat (BIT) @(posedge clk);
    send_pkt(4); take_and_check(4);
    // 8x oversampling receiver: 10-byte packet, no gap between bytes
    for (int i = 0; i < 10; i++) pkt[i] = 8'($urandom);
    send_byte8(8'd10);
    for (int i = 0; i < 10; i++) send_byte8(pkt[i]);
    repeat (BIT8) @(posedge clk);
    check("8x: packet offered", req8 === 1'b1 && len8 == 8'd10);
    for (int i = 0; i < 10; i++) check($sformatf("8x: byte %0d", i), data8[i] == pkt[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
