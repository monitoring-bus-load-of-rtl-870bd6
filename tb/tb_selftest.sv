// tb_selftest: the LCD self-test sequence.
//
// Ticks arrive every 10 clocks. Before the first tick both lines must be
// blank; after tick k (k = 1..26) the screen of step k-1 must show: the four
// instruction screens for four ticks each, then both lines filled with the
// digit 0, 1, ... 9. `finished` must rise with the 26th tick, and later ticks
// must leave the digit-9 screen in place.
module tb_selftest;
  import can_mon_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick = 1'b0;
  lcd_line_t line1, line2;
  logic finished;
  always #5 clk = ~clk;

  selftest dut (.clk, .rst_n, .tick, .line1, .line2, .finished);

  int checks = 0, failures = 0;

  function automatic lcd_line_t to_line(input string s);
    lcd_line_t l;
    for (int i = 0; i < 16; i++) l[127 - 8 * i -: 8] = s.getc(i);
    return l;
  endfunction

  task automatic expect_screen(input string a, input string b, input bit fin, input int k);
    checks += 3;
    if (line1 !== to_line(a)) begin failures++; $display("FAIL: tick %0d line1 \"%s\"", k, line1); end
    if (line2 !== to_line(b)) begin failures++; $display("FAIL: tick %0d line2 \"%s\"", k, line2); end
    if (finished !== fin) begin failures++; $display("FAIL: tick %0d finished=%0b", k, finished); end
  endtask

  initial begin
    string t1 [4] = '{"CAN bus monitor ", "CAN wire: GPIO1 ", "GND: GPIO1 pin12", "UART: GPIO0     "};
    string t2 [4] = '{"   self-test    ", "pin 2 (blue)    ", "test running    ", "pins 2-12 (even)"};
    string dl;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(negedge clk);
    expect_screen("                ", "                ", 1'b0, 0);
    for (int k = 1; k <= 30; k++) begin
      @(negedge clk);
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      repeat (8) @(negedge clk);
      if (k <= 16) begin
        expect_screen(t1[(k - 1) / 4], t2[(k - 1) / 4], 1'b0, k);
      end else begin
        dl = "";
        for (int i = 0; i < 16; i++) dl = {dl, $sformatf("%0d", (k <= 26) ? k - 17 : 9)};
        expect_screen(dl, dl, k >= 26, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
