// uart_rx_model: testbench receiver for the monitor's serial report.
//
// Waits for a falling start edge on `rxd`, samples the middle of every bit
// (DIV clocks per bit), checks the start bit and both stop bits and pulses
// `valid` for one clock with the received byte. `frame_errors` counts bytes
// whose start or stop bits were wrong.
module uart_rx_model #(
  parameter int unsigned DIV = 434
) (
  input  logic       clk,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output int         frame_errors
);

  initial begin
    valid = 1'b0;
    data = '0;
    frame_errors = 0;
    // let the line settle out of reset first
    repeat (4 * DIV) @(negedge clk);
    forever begin
      @(negedge rxd);
      repeat (DIV / 2) @(negedge clk);
      if (rxd !== 1'b0) frame_errors++;
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        data[i] = rxd;
      end
      repeat (DIV) @(negedge clk);
      if (rxd !== 1'b1) frame_errors++;
      repeat (DIV) @(negedge clk);
      if (rxd !== 1'b1) frame_errors++;
      valid = 1'b1;
      @(negedge clk);
      valid = 1'b0;
    end
  end

endmodule
