// tb_wsn_top: end-to-end test of two sensor nodes (ids 1 and 2) sharing a
// radio link, each with its own serial sensor. Runs several communication
// cycles and counts each mechanism of the node:
//   wake-up / sleep, sensor sample read, DATA and ACK sent, cycle ended by
//   an acknowledgment, sleep time adopted from the lower-id node (and the
//   wake-ups of both nodes then aligned), A frequency and radio stopped in
//   sleep, switch of the B frequency from 100 kHz to 1 MHz (mode 3), a
//   failed cycle closed by the wake window when the link is down, an
//   oversized packet rejected by the receiver, and a 190-bit packet.
// Also compares every DATA payload delivered to a node with the line its
// peer's sensor produced. A mechanism that never happened is a failure.
// Serial rate: 104167 bps (A divisor 6, bit time 96 clocks) to keep the
// run short; the node's logic does not depend on the rate.
module tb_wsn_top;
  import wsn_pkg::*;

  localparam int DIV_A = 6;
  localparam int BITC  = 16 * DIV_A;

  logic clk = 0, rst_n = 0;
  logic [15:0] div_b = 100;
  logic [TIME_W-1:0] sleep1 = 1000, sleep2 = 1500, wake = 20000;
  logic link_up = 1;
  logic inject = 0, inj_line = 1;
  int   nbytes = 12;
  int checks = 0, failures = 0;

  // node signals
  logic din1, dout1, srq1, srx1, spwr1, awake1;
  logic din2, dout2, srq2, srx2, spwr2, awake2, link_dout2;
  logic [TIME_W-1:0] slen1, slen2;
  logic [15:0] cyc1, cyc2, ok1, ok2;
  logic fe1, le1, ov1, sfe1, fe2, le2, ov2, sfe2;
  logic [SENSOR_MAX-1:0][7:0] samp1, samp2;
  int slen_1, slen_2, lines1, lines2;

  always #50 clk = ~clk;   // 10 MHz logical clock

  wsn_top #(.NODE_ID(8'd1)) n1 (
    .clk, .rst_n, .cfg_div_a(16'(DIV_A)), .cfg_div_b(div_b), .cfg_baud_div(16'(BITC)),
    .cfg_sleep_ticks(sleep1), .cfg_wake_ticks(wake),
    .radio_din(din1), .radio_dout(dout1), .radio_sleep_rq(srq1),
    .sensor_rxd(srx1), .sensor_pwr(spwr1),
    .awake(awake1), .sleep_len(slen1), .cycles(cyc1), .ok_cycles(ok1),
    .rx_frame_err(fe1), .rx_len_err(le1), .rx_overrun(ov1), .sensor_frame_err(sfe1));

  wsn_top #(.NODE_ID(8'd2)) n2 (
    .clk, .rst_n, .cfg_div_a(16'(DIV_A)), .cfg_div_b(div_b), .cfg_baud_div(16'(BITC)),
    .cfg_sleep_ticks(sleep2), .cfg_wake_ticks(wake),
    .radio_din(din2), .radio_dout(dout2), .radio_sleep_rq(srq2),
    .sensor_rxd(srx2), .sensor_pwr(spwr2),
    .awake(awake2), .sleep_len(slen2), .cycles(cyc2), .ok_cycles(ok2),
    .rx_frame_err(fe2), .rx_len_err(le2), .rx_overrun(ov2), .sensor_frame_err(sfe2));

  radio_link_model link (
    .a_din(din1), .a_sleep_rq(srq1), .b_din(din2), .b_sleep_rq(srq2),
    .link_up, .a_dout(dout1), .b_dout(link_dout2));
  assign dout2 = inject ? inj_line : link_dout2;

  serial_sensor_model #(.TAG("G")) s1 (
    .clk, .pwr(spwr1), .bit_clks(BITC), .delay_clks(3000), .nbytes,
    .txd(srx1), .sample(samp1), .sample_len(slen_1), .lines(lines1));
  serial_sensor_model #(.TAG("S")) s2 (
    .clk, .pwr(spwr2), .bit_clks(BITC), .delay_clks(5000), .nbytes,
    .txd(srx2), .sample(samp2), .sample_len(slen_2), .lines(lines2));

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_wake = 0, n_sleep = 0, n_sample = 0, n_data_tx = 0, n_ack_tx = 0;
  int n_adopt = 0, n_len_err = 0, n_tick_a_sleep = 0, n_radio_on_sleep = 0;
  int n_data_rx_ok = 0, n_data_rx_bad = 0, n_big_pkt = 0;
  logic aw1_q = 1, aw2_q = 1, txr1_q = 0, txr2_q = 0, sra1_q = 0, sra2_q = 0;

  always @(negedge clk) if (rst_n) begin
    if (awake1 && !aw1_q) n_wake++;
    if (!awake1 && aw1_q) n_sleep++;
    if (awake2 && !aw2_q) n_wake++;
    if (!awake2 && aw2_q) n_sleep++;
    aw1_q <= awake1; aw2_q <= awake2;
    if (!awake1 && n1.tick_a) n_tick_a_sleep++;
    if (!awake2 && n2.tick_a) n_tick_a_sleep++;
    if (!awake1 && !srq1) n_radio_on_sleep++;
    if (!awake2 && !srq2) n_radio_on_sleep++;
    if (n1.sr_ack && !sra1_q) n_sample++;
    if (n2.sr_ack && !sra2_q) n_sample++;
    sra1_q <= n1.sr_ack; sra2_q <= n2.sr_ack;
    if (n1.tx_req && !txr1_q) begin
      if (n1.tx_data[0] == PKT_DATA) n_data_tx++; else n_ack_tx++;
      if (n1.tx_len > 8'd15) n_big_pkt++;
    end
    if (n2.tx_req && !txr2_q) begin
      if (n2.tx_data[0] == PKT_DATA) n_data_tx++; else n_ack_tx++;
      if (n2.tx_len > 8'd15) n_big_pkt++;
    end
    txr1_q <= n1.tx_req; txr2_q <= n2.tx_req;
    if (n1.sched_valid && n1.tick_b) n_adopt++;
    if (n2.sched_valid && n2.tick_b) n_adopt++;
    if (le1 || le2) n_len_err++;
  end

  // DATA payload delivered to node 2 must be node 1's sensor line, and back
  function automatic logic payload_ok(input logic [7:0] len, input logic [PKT_MAX_BYTES-1:0][7:0] d,
                                      input logic [7:0] src, input logic [SENSOR_MAX-1:0][7:0] samp,
                                      input int n);
    logic ok;
    ok = (len == 8'(HDR_BYTES + n)) && d[1] == src;
    for (int i = 0; i < n; i++) ok &= (d[HDR_BYTES + i] == samp[i]);
    return ok;
  endfunction

  logic rxa1_q = 0, rxa2_q = 0;
  always @(negedge clk) begin
    if (n2.rx_ack && !rxa2_q && n2.rx_data[0] == PKT_DATA) begin
      if (payload_ok(n2.rx_len, n2.rx_data, 8'd1, samp1, slen_1)) n_data_rx_ok++;
      else n_data_rx_bad++;
    end
    if (n1.rx_ack && !rxa1_q && n1.rx_data[0] == PKT_DATA) begin
      if (payload_ok(n1.rx_len, n1.rx_data, 8'd2, samp2, slen_2)) n_data_rx_ok++;
      else n_data_rx_bad++;
    end
    rxa1_q <= n1.rx_ack; rxa2_q <= n2.rx_ack;
  end

  task automatic inj_byte(input logic [7:0] b);
    inj_line <= 1'b0; repeat (BITC) @(posedge clk);
    for (int i = 0; i < 8; i++) begin inj_line <= b[i]; repeat (BITC) @(posedge clk); end
    inj_line <= 1'b1; repeat (BITC) @(posedge clk);
  endtask

  task automatic wait_both_asleep();
    while (awake1 || awake2) @(posedge clk);
  endtask
  task automatic wait_both_awake();
    while (!(awake1 && awake2)) @(posedge clk);
  endtask

  int t1, t2, ok_before;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // ---- cycle 1: mode 2 settings (B = 100 kHz), 12-byte samples
    wait_both_asleep();
    check("cycle 1 acknowledged on node 1", ok1 == 1);
    check("cycle 1 acknowledged on node 2", ok2 == 1);
    check("node 2 adopted node 1 sleep time", slen2 == 1000 && slen1 == 1000);
    // wake-ups now aligned: compare wake times
    fork
      begin while (!awake1) @(posedge clk); t1 = int'($time / 100); end
      begin while (!awake2) @(posedge clk); t2 = int'($time / 100); end
    join
    check($sformatf("aligned wake-up (%0d vs %0d clocks)", t1, t2),
          (t1 > t2 ? t1 - t2 : t2 - t1) < 20 * 100 + 2 * BITC * 10);
    // ---- cycle 2: finish, then switch B to 1 MHz (mode 3) while asleep
    wait_both_asleep();
    check("cycle 2 acknowledged", ok1 == 2 && ok2 == 2);
    div_b = 10;
    wait_both_awake();
    wait_both_asleep();
    check("cycle 3 (B = 1 MHz) acknowledged", ok1 == 3 && ok2 == 3);
    // ---- cycle 4: link down -> wake window expires; oversized packet
    link_up = 0;
    wait_both_awake();
    inject = 1;
    inj_byte(8'd40);
    for (int i = 0; i < 40; i++) inj_byte(8'hEE);
    inject = 0;
    wait_both_asleep();
    check("failed cycle not counted as acknowledged", ok1 == 3 && ok2 == 3);
    check("failed cycle still counted as a wake-up", cyc1 == 4 && cyc2 == 4);
    link_up = 1;
    // ---- cycle 5: 190-bit class packets (20-byte samples, 23-byte packets)
    nbytes = 20;
    wait_both_awake();
    wait_both_asleep();
    check("cycle 5 (190-bit packets) acknowledged", ok1 == 4 && ok2 == 4);
    // ---- mechanism coverage
    check($sformatf("wake-ups %0d", n_wake), n_wake >= 8);
    check($sformatf("sleeps %0d", n_sleep), n_sleep >= 10);
    check($sformatf("sensor samples %0d", n_sample), n_sample == 10);
    check($sformatf("DATA sent %0d", n_data_tx), n_data_tx == 10);
    check($sformatf("ACK sent %0d", n_ack_tx), n_ack_tx == 8);
    check($sformatf("DATA delivered intact %0d", n_data_rx_ok), n_data_rx_ok == 8 && n_data_rx_bad == 0);
    check($sformatf("sleep time adoptions %0d", n_adopt), n_adopt >= 1);
    check($sformatf("oversized packets rejected %0d", n_len_err), n_len_err == 1);
    check($sformatf("190-bit packets sent %0d", n_big_pkt), n_big_pkt == 2);
    check($sformatf("A ticks during sleep %0d", n_tick_a_sleep), n_tick_a_sleep == 0);
    check($sformatf("radio awake during sleep %0d", n_radio_on_sleep), n_radio_on_sleep == 0);
    $display("mechanisms: wake=%0d sleep=%0d sample=%0d data=%0d ack=%0d adopt=%0d len_err=%0d big=%0d",
             n_wake, n_sleep, n_sample, n_data_tx, n_ack_tx, n_adopt, n_len_err, n_big_pkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
