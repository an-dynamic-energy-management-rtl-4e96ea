// tb_data_proc: plays the receiver, the sensor reader and the transmitter
// around data_proc (all with the four-phase req/ack handshake) and checks
// the packets it builds against packets assembled in the testbench:
// a DATA packet from a sensor sample (type, node id, sequence, sample),
// an ACK for a received DATA packet (type, node id, echoed sequence, current
// sleep time), that a received DATA packet is served before a waiting
// sample, that an ACK with a wrong sequence number is ignored, that the
// right ACK ends the cycle and passes its sleep time on (sched_valid), that
// one sample only is sent per wake-up and the sequence number advances
// after it, and that only a node with a lower id sets the sleep time.
module tb_data_proc;
  import wsn_pkg::*;
  localparam int MB = PKT_MAX_BYTES;
  localparam int SB = SENSOR_MAX;
  localparam logic [7:0] ID = 8'h5C;

  logic clk = 0, rst_n = 0, en = 0, tick = 0;
  logic rx_req = 0, rx_ack, sr_req = 0, sr_ack, tx_req, tx_ack = 0;
  logic [7:0] rx_len = 0, sr_len = 0, tx_len;
  logic [MB-1:0][7:0] rx_data = '0, tx_data;
  logic [SB-1:0][7:0] sr_data = '0;
  logic [TIME_W-1:0] sleep_cur = 24'h0A0B0C;
  logic cycle_done, sched_valid;
  logic [TIME_W-1:0] sched_sleep;
  int checks = 0, failures = 0;
  int n_sched = 0;
  logic [TIME_W-1:0] last_sched;

  data_proc #(.NODE_ID(ID)) dut (.*);

  always #50 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == 3) ? 0 : tc + 1;
    tick <= (tc == 3);
  end
  always @(negedge clk) if (sched_valid && tick) begin n_sched++; last_sched = sched_sleep; end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic offer_rx(input logic [7:0] n, input logic [MB-1:0][7:0] d);
    rx_len <= n; rx_data <= d; rx_req <= 1;
    while (!rx_ack) @(posedge clk);
    rx_req <= 0;
    while (rx_ack) @(posedge clk);
  endtask

  task automatic offer_sr(input logic [7:0] n, input logic [SB-1:0][7:0] d);
    sr_len <= n; sr_data <= d; sr_req <= 1;
    while (!sr_ack) @(posedge clk);
    sr_req <= 0;
    while (sr_ack) @(posedge clk);
  endtask

  // take one packet from the transmitter side
  task automatic take_tx(output logic [7:0] n, output logic [MB-1:0][7:0] d, output logic got);
    int w = 0;
    while (!tx_req && w < 400) begin @(posedge clk); w++; end
    got = tx_req;
    n = tx_len; d = tx_data;
    if (got) begin
      repeat (9) @(posedge clk);
      tx_ack <= 1;
      while (tx_req) @(posedge clk);
      tx_ack <= 0;
      repeat (2) @(posedge clk);
    end
  endtask

  function automatic logic [MB-1:0][7:0] mk(input logic [7:0] t, input logic [7:0] src,
                                            input logic [7:0] sq, input logic [23:0] tail);
    logic [MB-1:0][7:0] d = '0;
    d[0] = t; d[1] = src; d[2] = sq; d[3] = tail[23:16]; d[4] = tail[15:8]; d[5] = tail[7:0];
    return d;
  endfunction

  logic [7:0] n; logic [MB-1:0][7:0] d; logic got;
  logic [SB-1:0][7:0] s;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // disabled: a sample is not taken
    s = '0; s[0] = "A"; s[1] = "B"; s[2] = "C";
    sr_len <= 3; sr_data <= s; sr_req <= 1;
    repeat (40) @(posedge clk);
    check("no work while disabled", sr_ack === 1'b0 && tx_req === 1'b0);
    sr_req <= 0;
    en <= 1;
    // 1: sensor sample -> DATA
    fork offer_sr(3, s); take_tx(n, d, got); join
    check("DATA sent", got);
    check("DATA length", n == 6);
    check("DATA header", d[0] == PKT_DATA && d[1] == ID && d[2] == 8'd0);
    check("DATA payload", d[3] == "A" && d[4] == "B" && d[5] == "C");
    // 2: received DATA -> ACK with our sleep time
    fork offer_rx(6, mk(PKT_DATA, 8'h07, 8'h33, 24'h414243)); take_tx(n, d, got); join
    check("ACK sent", got);
    check("ACK length", n == 8'(ACK_LEN));
    check("ACK content", d[0] == PKT_ACK && d[1] == ID && d[2] == 8'h33 &&
                         d[3] == 8'h0A && d[4] == 8'h0B && d[5] == 8'h0C);
    // 3: ACK with wrong sequence: ignored
    offer_rx(6, mk(PKT_ACK, 8'h07, 8'h01, 24'h000050));
    repeat (20) @(posedge clk);
    check("wrong-seq ACK ignored", cycle_done === 1'b0 && n_sched == 0);
    // 4: correct ACK ends the cycle
    offer_rx(6, mk(PKT_ACK, 8'h07, 8'h00, 24'h000123));
    repeat (20) @(posedge clk);
    check("cycle done", cycle_done === 1'b1);
    check("sleep time passed on once", n_sched == 1 && last_sched == 24'h000123);
    // 5: new wake-up: RX DATA and sample both waiting -> ACK first
    en <= 0; repeat (20) @(posedge clk);
    check("cycle_done cleared in sleep", cycle_done === 1'b0);
    en <= 1;
    s[0] = "x";
    fork
      offer_sr(1, s);
      begin repeat (1) @(posedge clk); offer_rx(6, mk(PKT_DATA, 8'h09, 8'h44, 24'h0)); end
      begin
        repeat (2) @(posedge clk);
        take_tx(n, d, got);
        check("ACK served first", got && d[0] == PKT_ACK && d[2] == 8'h44);
        take_tx(n, d, got);
        check("then DATA with next sequence", got && d[0] == PKT_DATA && d[2] == 8'd1 && d[3] == "x" && n == 4);
      end
    join
    // 6: a second sample in the same wake-up is not taken
    sr_len <= 1; sr_data <= s; sr_req <= 1;
    repeat (40) @(posedge clk);
    check("one DATA per wake-up", sr_ack === 1'b0 && tx_req === 1'b0);
    sr_req <= 0;
    // 7: ACK from a node with a higher id ends the cycle, time not adopted
    offer_rx(6, mk(PKT_ACK, 8'h70, 8'h01, 24'h000777));
    repeat (20) @(posedge clk);
    check("cycle done on ACK from higher id", cycle_done === 1'b1);
    check("higher id does not set the time", n_sched == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
