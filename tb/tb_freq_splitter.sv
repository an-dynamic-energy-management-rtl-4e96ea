// tb_freq_splitter: checks the A and B strobe rates of freq_splitter for
// several divisors (including the 4800 bps x16 and 100 kHz / 1 MHz
// settings), that A stops while en_a is low and B does not, and that a
// divisor of 0 behaves like 1. Expected periods are the divisors themselves.
module tb_freq_splitter;
  logic clk = 0, rst_n = 0;
  logic [15:0] div_a, div_b;
  logic en_a;
  logic tick_a, tick_b;
  int checks = 0, failures = 0;

  freq_splitter dut (.*);

  always #50 clk = ~clk;   // 10 MHz

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure distance between successive strobes
  task automatic measure(input int n, output int per_a, output int per_b, output int cnt_a);
    int last_a = -1, last_b = -1;
    per_a = -1; per_b = -1; cnt_a = 0;
    for (int t = 0; t < n; t++) begin
      @(posedge clk);
      #1;
      if (tick_a) begin
        if (last_a >= 0) per_a = t - last_a;
        last_a = t; cnt_a++;
      end
      if (tick_b) begin
        if (last_b >= 0) per_b = t - last_b;
        last_b = t;
      end
    end
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int pa, pb, ca;
  initial begin
    div_a = 130; div_b = 100; en_a = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(1000, pa, pb, ca);
    expect_eq("A period 130", pa, 130);
    expect_eq("B period 100", pb, 100);
    div_a = 5; div_b = 10;
    measure(400, pa, pb, ca);
    expect_eq("A period 5", pa, 5);
    expect_eq("B period 10 (1 MHz)", pb, 10);
    div_a = 0; div_b = 1;
    measure(50, pa, pb, ca);
    expect_eq("A period div 0", pa, 1);
    expect_eq("B period div 1", pb, 1);
    div_a = 7; div_b = 33; en_a = 0;
    measure(500, pa, pb, ca);
    expect_eq("A stopped while en_a=0", ca, 0);
    expect_eq("B runs while en_a=0", pb, 33);
    en_a = 1;
    measure(500, pa, pb, ca);
    expect_eq("A resumes", pa, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
