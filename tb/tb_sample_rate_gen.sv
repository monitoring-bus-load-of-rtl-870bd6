// tb_sample_rate_gen: checks the sample tick period and pulse width.
//
// Outputs are sampled on the falling clock edge. The generator runs with
// CLK_HZ = 1000 and SAMPLE_HZ = 1 (a 1000-clock period). The testbench checks
// that ticks are one clock wide, that the first comes on the 1000th rising
// edge after the one that releases reset (falling edge number 1001), and that
// every later one follows exactly 1000 clocks after the previous.
module tb_sample_rate_gen;

  localparam int unsigned CLK_HZ = 1000;
  localparam int unsigned PERIOD = CLK_HZ;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;
  always #5 clk = ~clk;

  sample_rate_gen #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(1)) dut (.clk, .rst_n, .tick);

  int checks = 0, failures = 0;
  longint cyc = 0, last = 0;
  int n_ticks = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    last = -1;
    forever begin
      @(negedge clk);
      cyc++;
      if (tick) begin
        checks++;
        if (last < 0) begin
          if (cyc != PERIOD + 1) begin failures++; $display("FAIL: first tick at %0d", cyc); end
        end else if (cyc - last != PERIOD) begin
          failures++;
          $display("FAIL: tick period %0d", cyc - last);
        end
        last = cyc;
        n_ticks++;
        @(negedge clk);
        cyc++;
        checks++;
        if (tick) begin failures++; $display("FAIL: tick wider than one clock"); end
        if (n_ticks == 8) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
