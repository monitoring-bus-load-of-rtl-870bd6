// tb_uart_tx: serial frame format and bit timing.
//
// At the default 50 MHz / 115200 baud (434 clocks per bit) the testbench
// sends 0x00, 0xFF, 0x55, 0xA5, 0x01 and random bytes, some back to back as
// soon as busy falls. A receiver in the testbench waits for the falling
// start edge and samples the line in the middle of each bit: start bit 0,
// eight data bits least significant first, two stop bits 1. It also checks
// that the start bit lasts exactly 434 clocks, that busy stays high for
// 11 x 434 clocks, and that a start strobe during a transmission is ignored.
module tb_uart_tx;

  localparam int unsigned CLK_HZ = 50_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int unsigned DIV    = 434;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [7:0] data = '0;
  logic txd, busy;
  always #5 clk = ~clk;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .start, .data, .txd, .busy);

  int checks = 0, failures = 0;
  logic [7:0] sent_q [$];
  int n_rx = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // receiver
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      repeat (DIV / 2) @(negedge clk);
      check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(negedge clk);
      check(txd == 1'b1, "stop bit 1");
      repeat (DIV) @(negedge clk);
      check(txd == 1'b1, "stop bit 2");
      check(sent_q.size() > 0 && b == sent_q[0], $sformatf("byte %h", b));
      if (sent_q.size() > 0) void'(sent_q.pop_front());
      n_rx++;
    end
  end

  task automatic send(input logic [7:0] v, input bit measure);
    int busy_cnt, low_cnt;
    @(negedge clk);
    data = v;
    start = 1'b1;
    sent_q.push_back(v);
    @(negedge clk);
    start = 1'b0;
    data = ~v;
    busy_cnt = 0;
    low_cnt = 0;
    while (busy) begin
      if (busy_cnt == 100) begin
        // a strobe in the middle of a byte must be ignored
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        busy_cnt++;
        if (!txd && busy_cnt <= DIV + 1) low_cnt++;
        continue;
      end
      if (!txd && busy_cnt < DIV + 5) low_cnt++;
      @(negedge clk);
      busy_cnt++;
    end
    if (measure) begin
      check(busy_cnt == 11 * DIV, $sformatf("busy for %0d clocks", busy_cnt));
      if (v[0]) check(low_cnt == DIV, $sformatf("start bit %0d clocks", low_cnt));
    end
  endtask

  initial begin
    logic [7:0] fixed [5] = '{8'h00, 8'hFF, 8'h55, 8'hA5, 8'h01};
    repeat (2) @(negedge clk);
    check(txd == 1'b1, "line idles high in reset");
    @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    check(txd == 1'b1 && !busy, "idle after reset");
    foreach (fixed[i]) send(fixed[i], 1'b1);
    repeat (12) send(8'($urandom), 1'b1);
    repeat (2 * DIV) @(posedge clk);
    check(n_rx == 17, $sformatf("%0d bytes received", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 12 * DIV) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
