// tb_uart_tx: sends packets of several lengths through uart_tx and decodes
// the serial line independently (sampling at the bit centres computed from
// baud_div). Checks the length byte and every data byte, the start/stop
// framing, the transfer time of (len+1) x 10 bit times, radio_on around the
// transfer, the four-phase req/ack sequence, the clamp of an oversized
// length to MAX_BYTES, and the abort when en falls mid-packet.
module tb_uart_tx;
  import wsn_pkg::*;
  localparam int MB  = PKT_MAX_BYTES;
  localparam int DIV = 20;

  logic clk = 0, rst_n = 0, en = 1;
  logic [15:0] baud_div = 16'(DIV);
  logic req = 0;
  logic [7:0] len = 0;
  logic [MB-1:0][7:0] data;
  logic ack, txd, radio_on, busy;
  int checks = 0, failures = 0;

  uart_tx dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Decode one 8N1 byte: wait for the falling edge, then sample centres.
  task automatic get_byte(output logic [7:0] b, output logic ok);
    int w = 0;
    ok = 1;
    b  = '0;
    while (txd !== 1'b0 && w < 30 * DIV) begin @(posedge clk); w++; end
    if (txd !== 1'b0) begin ok = 0; return; end
    repeat (DIV / 2) @(posedge clk);
    if (txd !== 1'b0) ok = 0;
    for (int i = 0; i < 8; i++) begin
      repeat (DIV) @(posedge clk);
      b[i] = txd;
    end
    repeat (DIV) @(posedge clk);
    if (txd !== 1'b1) ok = 0;
  endtask

  task automatic send_and_check(input int n);
    logic [7:0] b; logic ok; int t0, t1; int exp_n;
    exp_n = (n > MB) ? MB : n;
    for (int i = 0; i < MB; i++) data[i] = 8'($urandom);
    len = 8'(n);
    @(posedge clk); req <= 1;
    t0 = int'($time / 100);
    @(posedge clk); @(posedge clk);
    check("radio_on during transfer", radio_on === 1'b1);
    get_byte(b, ok);
    check("length byte framed", ok);
    check($sformatf("length byte %0d", exp_n), b == 8'(exp_n));
    for (int i = 0; i < exp_n; i++) begin
      get_byte(b, ok);
      check($sformatf("byte %0d framing", i), ok);
      check($sformatf("byte %0d value", i), b == data[i]);
    end
    for (int w = 0; w < 30 * DIV && !ack; w++) @(posedge clk);
    t1 = int'($time / 100);
    // transfer time: (exp_n+1) bytes of 10 bits, plus a few cycles latency
    check($sformatf("duration %0d vs %0d", t1 - t0, (exp_n + 1) * 10 * DIV),
          (t1 - t0) >= (exp_n + 1) * 10 * DIV && (t1 - t0) <= (exp_n + 1) * 10 * DIV + 4);
    check("radio off after transfer", radio_on === 1'b0);
    check("line idle high", txd === 1'b1);
    repeat (5) @(posedge clk);
    check("ack held while req", ack === 1'b1);
    req <= 0;
    repeat (3) @(posedge clk);
    check("ack released", ack === 1'b0);
  endtask

  initial begin
    data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check("idle line high", txd === 1'b1 && radio_on === 1'b0);
    send_and_check(1);
    send_and_check(16);   // 127-bit class packet
    send_and_check(24);   // 190-bit class packet
    send_and_check(30);   // above the limit -> clamped to 24
    // abort: en falls mid-packet
    len = 8'd10;
    @(posedge clk); req <= 1;
    repeat (DIV * 25) @(posedge clk);
    en <= 0;
    repeat (3) @(posedge clk);
    check("abort gives ack", ack === 1'b1);
    check("abort releases radio", radio_on === 1'b0 && txd === 1'b1);
    req <= 0;
    repeat (3) @(posedge clk);
    // disabled: a request is not taken
    req <= 1;
    repeat (DIV * 3) @(posedge clk);
    check("no transfer while disabled", txd === 1'b1 && radio_on === 1'b0 && ack === 1'b0);
    req <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
