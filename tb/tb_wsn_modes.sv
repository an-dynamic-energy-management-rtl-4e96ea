// tb_wsn_modes: runs the five operating modes the node is evaluated in, on
// two nodes at default parameters with serial links at 4800 bps (A divisor
// 130 = 16 x 4808 bps, transmitter bit time 2080 clocks):
//   mode 1  sleep: only sync runs (checked over every sleep interval: no A
//           tick, radio asleep, sensor off, data processing idle)
//   mode 2  B = 100 kHz, packets up to 127 bits (12-byte sensor lines,
//           15-byte / 120-bit DATA packets)
//   mode 3  as 2 with B = 1 MHz
//   mode 4  as 2 with packets up to 190 bits (20-byte lines, 23-byte /
//           184-bit DATA packets)
//   mode 5  as 4 with B = 1 MHz
// Each of modes 2..5 must complete one acknowledged cycle on both nodes with
// the sensor line delivered intact; the B frequency is changed while both
// nodes sleep. Prints the wake time of each mode in clocks.
module tb_wsn_modes;
  import wsn_pkg::*;

  localparam int BITC = 2080;

  logic clk = 0, rst_n = 0;
  logic [15:0] div_b = 100;
  int nbytes = 12;
  int checks = 0, failures = 0;

  logic din1, dout1, srq1, srx1, spwr1, awake1;
  logic din2, dout2, srq2, srx2, spwr2, awake2;
  logic [TIME_W-1:0] slen1, slen2;
  logic [15:0] cyc1, cyc2, ok1, ok2;
  logic fe1, le1, ov1, sfe1, fe2, le2, ov2, sfe2;
  logic [SENSOR_MAX-1:0][7:0] samp1, samp2;
  int sl1, sl2, lines1, lines2;

  always #50 clk = ~clk;

  wsn_top n1 (
    .clk, .rst_n, .cfg_div_a(16'd130), .cfg_div_b(div_b), .cfg_baud_div(16'(BITC)),
    .cfg_sleep_ticks(24'd1000), .cfg_wake_ticks(24'd200000),
    .radio_din(din1), .radio_dout(dout1), .radio_sleep_rq(srq1),
    .sensor_rxd(srx1), .sensor_pwr(spwr1),
    .awake(awake1), .sleep_len(slen1), .cycles(cyc1), .ok_cycles(ok1),
    .rx_frame_err(fe1), .rx_len_err(le1), .rx_overrun(ov1), .sensor_frame_err(sfe1));

  wsn_top n2 (
    .clk, .rst_n, .cfg_div_a(16'd130), .cfg_div_b(div_b), .cfg_baud_div(16'(BITC)),
    .cfg_sleep_ticks(24'd1000), .cfg_wake_ticks(24'd200000),
    .radio_din(din2), .radio_dout(dout2), .radio_sleep_rq(srq2),
    .sensor_rxd(srx2), .sensor_pwr(spwr2),
    .awake(awake2), .sleep_len(slen2), .cycles(cyc2), .ok_cycles(ok2),
    .rx_frame_err(fe2), .rx_len_err(le2), .rx_overrun(ov2), .sensor_frame_err(sfe2));

  radio_link_model link (
    .a_din(din1), .a_sleep_rq(srq1), .b_din(din2), .b_sleep_rq(srq2),
    .link_up(1'b1), .a_dout(dout1), .b_dout(dout2));

  serial_sensor_model #(.TAG("G")) s1 (
    .clk, .pwr(spwr1), .bit_clks(BITC), .delay_clks(20000), .nbytes,
    .txd(srx1), .sample(samp1), .sample_len(sl1), .lines(lines1));
  serial_sensor_model #(.TAG("S")) s2 (
    .clk, .pwr(spwr2), .bit_clks(BITC), .delay_clks(30000), .nbytes,
    .txd(srx2), .sample(samp2), .sample_len(sl2), .lines(lines2));

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mode 1 watch: once a node has slept for 4 B periods, only sync may run
  int sleep_clk1 = 0, sleep_clk2 = 0, mode1_clocks = 0, mode1_viol = 0;
  always @(negedge clk) if (rst_n) begin
    sleep_clk1 = awake1 ? 0 : sleep_clk1 + 1;
    sleep_clk2 = awake2 ? 0 : sleep_clk2 + 1;
    if (sleep_clk1 > 4 * int'(div_b)) begin
      mode1_clocks++;
      if (n1.tick_a || !srq1 || spwr1 || n1.u_proc.state != 3'd0 || n1.u_tx.busy) mode1_viol++;
    end
    if (sleep_clk2 > 4 * int'(div_b)) begin
      mode1_clocks++;
      if (n2.tick_a || !srq2 || spwr2 || n2.u_proc.state != 3'd0 || n2.u_tx.busy) mode1_viol++;
    end
  end

  // payload check on node 2 (from node 1)
  int rx_ok = 0, rx_bad = 0;
  logic rxa2_q = 0;
  always @(negedge clk) begin
    if (n2.rx_ack && !rxa2_q && n2.rx_data[0] == PKT_DATA) begin
      logic ok;
      ok = (n2.rx_len == 8'(HDR_BYTES + sl1));
      for (int i = 0; i < sl1; i++) ok &= (n2.rx_data[HDR_BYTES + i] == samp1[i]);
      if (ok) rx_ok++; else rx_bad++;
    end
    rxa2_q <= n2.rx_ack;
  end

  int ncyc = 0;
  always @(posedge clk) ncyc <= ncyc + 1;

  task automatic run_mode(input int mode, input int db, input int nb);
    int t0, bits;
    div_b = 16'(db); nbytes = nb;
    while (!(awake1 && awake2)) @(posedge clk);
    t0 = ncyc;
    while (awake1 || awake2) @(posedge clk);
    bits = (HDR_BYTES + nb) * 8;
    check($sformatf("mode %0d: both nodes acknowledged", mode), ok1 == 16'(mode - 1) && ok2 == 16'(mode - 1));
    check($sformatf("mode %0d: payload delivered", mode), rx_ok == mode - 1 && rx_bad == 0);
    check($sformatf("mode %0d: packet %0d bits within %0d", mode, bits, nb > 12 ? 190 : 127),
          bits <= (nb > 12 ? 190 : 127));
    $display("mode %0d: B divisor %0d, %0d-byte DATA packets, wake time %0d clocks",
             mode, db, HDR_BYTES + nb, ncyc - t0);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // the first cycle after reset starts at once with mode 2 settings
    run_mode(2, 100, 12);
    run_mode(3, 10, 12);
    run_mode(4, 100, 20);
    run_mode(5, 10, 20);
    check($sformatf("mode 1 observed for %0d clocks", mode1_clocks), mode1_clocks > 100000);
    check($sformatf("mode 1: nothing but sync ran (%0d violations)", mode1_viol), mode1_viol == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
