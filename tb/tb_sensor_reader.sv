// tb_sensor_reader: plays a serial sensor (8N1, bit time = 16 A ticks)
// into sensor_reader. Checks a terminated sample (bytes without the CR),
// the handshake, that the sensor is powered only until the sample is taken
// and that no second sample is read in the same enable window, a new sample
// after en has been low, the cut at MAX_BYTES for an over-long line, that a
// lone terminator is ignored, and that nothing is read while en is low.
module tb_sensor_reader;
  import wsn_pkg::*;
  localparam int MB   = SENSOR_MAX;
  localparam int TDIV = 3;
  localparam int BIT  = 16 * TDIV;

  logic clk = 0, rst_n = 0, en = 0;
  logic tick = 0, sensor_rxd = 1;
  logic sensor_pwr, req, ack = 0, frame_err;
  logic [7:0] len;
  logic [MB-1:0][7:0] data;
  int checks = 0, failures = 0;

  sensor_reader dut (.*);

  always #50 clk = ~clk;

  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == TDIV - 1) ? 0 : tc + 1;
    tick <= (tc == TDIV - 1);
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

  task automatic send_byte(input logic [7:0] b);
    sensor_rxd <= 1'b0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin sensor_rxd <= b[i]; repeat (BIT) @(posedge clk); end
    sensor_rxd <= 1'b1; repeat (BIT + 2) @(posedge clk);
  endtask

  task automatic send_line(input string s);
    for (int i = 0; i < s.len(); i++) send_byte(s[i]);
    send_byte(8'h0D);
  endtask

  task automatic take_and_check(input string s);
    int n;
    n = (s.len() > MB) ? MB : s.len();
    repeat (5) @(posedge clk);
    check($sformatf("sample '%s' offered", s), req === 1'b1);
    check($sformatf("length %0d", n), len == 8'(n));
    for (int i = 0; i < n; i++) check($sformatf("char %0d", i), data[i] == s[i]);
    check("sensor off once sample held", sensor_pwr === 1'b0);
    ack <= 1; repeat (3) @(posedge clk);
    check("req released", req === 1'b0);
    ack <= 0; repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check("sensor off while disabled", sensor_pwr === 1'b0);
    send_line("R123");
    check("nothing read while disabled", req === 1'b0);
    en <= 1;
    repeat (3) @(posedge clk);
    check("sensor powered when enabled", sensor_pwr === 1'b1);
    send_byte(8'h0D);                  // lone terminator: ignored
    check("empty line ignored", req === 1'b0);
    send_line("R045");
    take_and_check("R045");
    send_line("R999");                 // same window: not read
    check("one sample per window", req === 1'b0 && sensor_pwr === 1'b0);
    en <= 0; repeat (5) @(posedge clk);
    en <= 1; repeat (5) @(posedge clk);
    send_line("$GPGGA,1234,N");
    take_and_check("$GPGGA,1234,N");
    en <= 0; repeat (5) @(posedge clk);
    en <= 1; repeat (5) @(posedge clk);
    // 25 characters without a terminator in the first MB: cut at MB
    for (int i = 0; i < MB; i++) send_byte(8'(8'h41 + i));
    begin
      string s = "";
      for (int i = 0; i < MB; i++) s = {s, string'(8'(8'h41 + i))};
      take_and_check(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
