// sample_rate_gen: sample-period tick for the load monitor.
//
// A down-counter reloads every CLK_HZ/SAMPLE_HZ clocks and pulses `tick` for
// one clock at each reload. With the defaults (50 MHz clock, 1 Hz sample rate)
// the tick arrives once per second; it freezes the load counters, starts the
// UART report and advances the LCD self-test. The 1 Hz rate follows the
// design description; making it a single-cycle enable pulse instead of a
// derived clock is this design's choice.
//
// Timing: the first tick comes CLK_HZ/SAMPLE_HZ clocks after reset is
// released, then one every CLK_HZ/SAMPLE_HZ clocks.
module sample_rate_gen #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned PERIOD = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CNT_W  = $clog2(PERIOD + 1);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CNT_W'(PERIOD - 1);
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= CNT_W'(PERIOD - 1);
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
