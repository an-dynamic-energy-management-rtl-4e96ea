// serial_sensor_model: behavioural model of a serial sensor (a GPS engine or
// an ultrasonic range finder with a serial output). Each time it is powered
// it waits `delay_clks` clock cycles, then sends one line of `nbytes`
// printable characters followed by a carriage return, 8N1 at `bit_clks`
// clock cycles per bit. The line is tag, then decimal digits of a reading
// that increments per line. The line last sent is on `sample`/`sample_len`.
module serial_sensor_model #(
  parameter int         MAXB = 21,
  parameter logic [7:0] TAG  = "R"
) (
  input  logic                 clk,
  input  logic                 pwr,
  input  int                   bit_clks,
  input  int                   delay_clks,
  input  int                   nbytes,
  output logic                 txd,
  output logic [MAXB-1:0][7:0] sample,
  output int                   sample_len,
  output int                   lines
);
  int reading = 100;

  task automatic send_byte(input logic [7:0] b);
    txd <= 1'b0; repeat (bit_clks) @(posedge clk);
    for (int i = 0; i < 8; i++) begin txd <= b[i]; repeat (bit_clks) @(posedge clk); end
    txd <= 1'b1; repeat (bit_clks) @(posedge clk);
  endtask

  initial begin
    txd = 1'b1; sample = '0; sample_len = 0; lines = 0;
    forever begin
      @(posedge clk);
      if (pwr) begin
        int n, v;
        repeat (delay_clks) @(posedge clk);
        n = (nbytes > MAXB) ? MAXB : nbytes;
        v = reading;
        sample = '0;
        sample[0] = TAG;
        for (int i = n - 1; i >= 1; i--) begin
          sample[i] = 8'(8'h30 + v % 10);
          v = v / 10;
        end
        sample_len = n;
        for (int i = 0; i < n; i++) send_byte(sample[i]);
        send_byte(8'h0D);
        reading++;
        lines++;
        while (pwr) @(posedge clk);
      end
    end
  end
endmodule
