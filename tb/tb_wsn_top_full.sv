// tb_wsn_top_full: one complete communication cycle of two nodes at the
// node's default parameters and the published design's normal operating point
// (mode 2): receiver and sensor at 4800 bps (A divisor 130, i.e. 16 x
// 4808 bps), transmitter bit time 2080 clocks of the 10 MHz logical clock,
// B frequency 100 kHz, 12-byte sensor lines (15-byte packets, within the
// 127-bit class). Both nodes wake after reset, read their sensors, exchange
// DATA and ACK packets, sleep for 1000 B ticks (10 ms) and wake again.
// Checks both cycles are acknowledged, the delivered payloads, the length of
// the sleep and the cycle time against the serial transfer time.
module tb_wsn_top_full;
  import wsn_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic din1, dout1, srq1, srx1, spwr1, awake1;
  logic din2, dout2, srq2, srx2, spwr2, awake2;
  logic [TIME_W-1:0] slen1, slen2;
  logic [15:0] cyc1, cyc2, ok1, ok2;
  logic fe1, le1, ov1, sfe1, fe2, le2, ov2, sfe2;
  logic [SENSOR_MAX-1:0][7:0] samp1, samp2;
  int sl1, sl2, lines1, lines2;

  localparam int BITC = 2080;

  always #50 clk = ~clk;

  wsn_top n1 (
    .clk, .rst_n, .cfg_div_a(16'd130), .cfg_div_b(16'd100), .cfg_baud_div(16'(BITC)),
    .cfg_sleep_ticks(24'd1000), .cfg_wake_ticks(24'd50000),
    .radio_din(din1), .radio_dout(dout1), .radio_sleep_rq(srq1),
    .sensor_rxd(srx1), .sensor_pwr(spwr1),
    .awake(awake1), .sleep_len(slen1), .cycles(cyc1), .ok_cycles(ok1),
    .rx_frame_err(fe1), .rx_len_err(le1), .rx_overrun(ov1), .sensor_frame_err(sfe1));

  wsn_top n2 (
    .clk, .rst_n, .cfg_div_a(16'd130), .cfg_div_b(16'd100), .cfg_baud_div(16'(BITC)),
    .cfg_sleep_ticks(24'd1000), .cfg_wake_ticks(24'd50000),
    .radio_din(din2), .radio_dout(dout2), .radio_sleep_rq(srq2),
    .sensor_rxd(srx2), .sensor_pwr(spwr2),
    .awake(awake2), .sleep_len(slen2), .cycles(cyc2), .ok_cycles(ok2),
    .rx_frame_err(fe2), .rx_len_err(le2), .rx_overrun(ov2), .sensor_frame_err(sfe2));

  radio_link_model link (
    .a_din(din1), .a_sleep_rq(srq1), .b_din(din2), .b_sleep_rq(srq2),
    .link_up(1'b1), .a_dout(dout1), .b_dout(dout2));

  serial_sensor_model #(.TAG("G")) s1 (
    .clk, .pwr(spwr1), .bit_clks(BITC), .delay_clks(20000), .nbytes(12),
    .txd(srx1), .sample(samp1), .sample_len(sl1), .lines(lines1));
  serial_sensor_model #(.TAG("S")) s2 (
    .clk, .pwr(spwr2), .bit_clks(BITC), .delay_clks(30000), .nbytes(12),
    .txd(srx2), .sample(samp2), .sample_len(sl2), .lines(lines2));

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // payload seen by node 2 from node 1
  logic [SENSOR_MAX-1:0][7:0] got2;
  logic [7:0] got2_len;
  logic rxa2_q = 0;
  always @(negedge clk) begin
    if (n2.rx_ack && !rxa2_q && n2.rx_data[0] == PKT_DATA) begin
      got2_len = n2.rx_len;
      for (int i = 0; i < SENSOR_MAX; i++) got2[i] = n2.rx_data[HDR_BYTES + i];
    end
    rxa2_q <= n2.rx_ack;
  end

  int ncyc = 0, t_sleep = 0, t_wake = 0;
  always @(posedge clk) ncyc <= ncyc + 1;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (awake1 || awake2) @(posedge clk);
    t_sleep = ncyc;
    check("node 1 cycle acknowledged", ok1 == 1);
    check("node 2 cycle acknowledged", ok2 == 1);
    check("payload length", got2_len == 8'(HDR_BYTES + 12));
    for (int i = 0; i < 12; i++) check($sformatf("payload byte %0d", i), got2[i] == samp1[i]);
    // slower sensor delay + 13 sensor bytes, 16-byte DATA, 7-byte ACK, 10 bits
    // each (the last stop bit is taken half a bit early)
    check($sformatf("cycle time %0d clocks", t_sleep),
          t_sleep >= 30000 + (13 + 16 + 7) * 10 * BITC - BITC && t_sleep <= 30000 + (13 + 16 + 7 + 16) * 10 * BITC);
    while (!(awake1 && awake2)) @(posedge clk);
    t_wake = ncyc;
    check($sformatf("sleep %0d clocks", t_wake - t_sleep),
          t_wake - t_sleep >= 1000 * 100 - 200 && t_wake - t_sleep <= 1000 * 100 + 400);
    check("second wake-up counted", cyc1 == 2 && cyc2 == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
