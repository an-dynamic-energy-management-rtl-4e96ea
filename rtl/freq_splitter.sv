// freq_splitter: programmable frequency splitter (dynamic programmable clock
// divider) of the sensor node.
//
// From the 10 MHz logical clock it derives the two operating frequencies of
// the architecture:
//   A : used by the modules wired to the external I/O (receiver and sensor
//       reader). Set to OVERSAMPLE x the serial bit rate (600 .. 115200 bps).
//   B : used by the internal modules (data processing and sync),
//       100 kHz .. 1 MHz.
// The transmitter is not fed from here; it runs on the logical clock itself.
//
// Each frequency is delivered as a one-clock-wide enable strobe (tick_a,
// tick_b) at the divided rate, not as a separate clock net, so the whole
// node stays in one clock domain; a module does work only on the cycles its
// strobe is high. The divisors are run-time inputs (a divisor of 0 acts as 1)
// and take effect at the next wrap of the counter. en_a stops the A divider
// while the node sleeps; B keeps running because the sync module needs it.
//
// Follows the published design: one logical clock in, A and B out, A for I/O modules,
// B for internal ones, 100 kHz .. 1 MHz for B. This design's choice: strobes
// instead of divided clocks, 16-bit divisors, the gating input en_a.
module freq_splitter #(
  parameter int DIV_W = 16
) (
  input  logic             clk,      // 10 MHz logical clock
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_a,    // clk cycles per A tick
  input  logic [DIV_W-1:0] div_b,    // clk cycles per B tick
  input  logic             en_a,     // 0: A frequency stopped (sleep)
  output logic             tick_a,   // A strobe, never high while en_a = 0
  output logic             tick_b
);

  logic [DIV_W-1:0] cnt_a, cnt_b;
  logic             tick_a_q;

  // gated so that no A tick is seen in the cycle en_a falls
  assign tick_a = tick_a_q && en_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_a  <= '0;
      tick_a_q <= 1'b0;
    end else if (!en_a) begin
      cnt_a  <= '0;
      tick_a_q <= 1'b0;
    end else if (cnt_a + 1'b1 >= div_a) begin
      cnt_a  <= '0;
      tick_a_q <= 1'b1;
    end else begin
      cnt_a  <= cnt_a + 1'b1;
      tick_a_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_b  <= '0;
      tick_b <= 1'b0;
    end else if (cnt_b + 1'b1 >= div_b) begin
      cnt_b  <= '0;
      tick_b <= 1'b1;
    end else begin
      cnt_b  <= cnt_b + 1'b1;
      tick_b <= 1'b0;
    end
  end

endmodule
