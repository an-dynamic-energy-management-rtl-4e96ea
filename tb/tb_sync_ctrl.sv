// tb_sync_ctrl: checks the sleep / wake schedule of sync_ctrl against a
// count of B ticks kept by the testbench: the node wakes after reset, a wake
// window closes after cfg_wake_ticks ticks when no cycle completes, the
// sleep lasts cfg_sleep_ticks ticks, a completed cycle ends the wake-up at
// once, a sleep time carried by an acknowledgment replaces the configured
// one for the following sleeps, and the cycle counters.
module tb_sync_ctrl;
  import wsn_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [TIME_W-1:0] cfg_sleep_ticks = 40, cfg_wake_ticks = 25;
  logic cycle_done = 0, sched_valid = 0;
  logic [TIME_W-1:0] sched_sleep = 0;
  logic awake;
  logic [TIME_W-1:0] sleep_len;
  logic [15:0] cycles, ok_cycles;
  int checks = 0, failures = 0;

  sync_ctrl dut (.*);

  always #50 clk = ~clk;

  // B tick every 3 clk
  int tc = 0;
  always @(posedge clk) begin
    tc   <= (tc == 2) ? 0 : tc + 1;
    tick <= (tc == 2);
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // count B ticks while awake has value v
  task automatic phase_len(input logic v, output int n);
    n = 0;
    while (awake === v) begin
      if (tick) n++;
      @(negedge clk);
    end
  endtask

  int n;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("awake after reset", awake === 1'b1);
    check("cycles starts at 1", cycles == 1);
    phase_len(1'b1, n);
    check($sformatf("wake window %0d ticks", n), n == 25);
    check("first sleep uses cfg", sleep_len == 40);
    phase_len(1'b0, n);
    check($sformatf("sleep %0d ticks", n), n == 40);
    check("second wake counted", cycles == 2 && ok_cycles == 0);
    // cycle finishes early with a new sleep time
    repeat (5) @(posedge tick);
    @(negedge clk);
    cycle_done = 1; sched_valid = 1; sched_sleep = 17;
    @(posedge tick); @(negedge clk);
    sched_valid = 0;
    @(negedge clk);
    check("sleeps right after cycle done", awake === 1'b0);
    cycle_done = 0;
    check("ok cycle counted", ok_cycles == 1);
    check("adopted sleep time", sleep_len == 17);
    phase_len(1'b0, n);
    check($sformatf("adopted sleep %0d ticks", n), n == 16 || n == 17);
    phase_len(1'b1, n);
    phase_len(1'b0, n);
    check($sformatf("next sleep keeps adopted time (%0d)", n), n == 17);
    check("cycle counter", cycles == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
