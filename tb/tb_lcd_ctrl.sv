// tb_lcd_ctrl: LCD driver against a model of the display.
//
// The driver runs with EN_CYCLES = 4 and CMD_DELAY = 20. A small model of an
// HD44780 display takes RS and the data byte on every falling edge of EN:
// 0x01 clears the display, 0x80|a sets the write address, data bytes are
// stored at the address, which then advances. The testbench checks the five
// initialisation entries (0x38, 0x0C, 0x01, 0x06, 0x80), that after the last
// character of line 2 the next entry is the 0x80 command again (not the
// initialisation), the EN pulse width (EN_CYCLES clocks) and the entry period
// (EN_CYCLES + CMD_DELAY + 3 clocks), that RW stays 0, and that the display
// contents equal line1/line2 after a pass, and the new text after the lines
// change.
module tb_lcd_ctrl;
  import can_mon_pkg::*;

  localparam int unsigned EN_CYCLES = 4;
  localparam int unsigned CMD_DELAY = 20;
  localparam int unsigned ENTRY = EN_CYCLES + CMD_DELAY + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  lcd_line_t  line1, line2;
  logic [7:0] lcd_data;
  logic       lcd_rw, lcd_en, lcd_rs, lcd_on, lcd_blon;

  lcd_ctrl #(.EN_CYCLES(EN_CYCLES), .CMD_DELAY(CMD_DELAY)) dut (
    .clk, .rst_n, .line1, .line2, .lcd_data, .lcd_rw, .lcd_en, .lcd_rs, .lcd_on, .lcd_blon
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // display model
  logic [7:0] ddram [128];
  logic [6:0] addr;
  logic [8:0] log_q [$];
  longint cyc = 0, en_rise = 0, last_fall = -1;
  logic en_d = 1'b0;
  int n_entries = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_d <= lcd_en;
    if (rst_n) begin
      if (lcd_rw !== 1'b0) begin failures++; $display("FAIL: RW high"); end
      if (lcd_en && !en_d) en_rise <= cyc;
      if (!lcd_en && en_d) begin
        // the display latches here
        checks++;
        if (cyc - en_rise != EN_CYCLES) begin failures++; $display("FAIL: EN width %0d", cyc - en_rise); end
        if (last_fall >= 0) begin
          checks++;
          if (cyc - last_fall != ENTRY) begin failures++; $display("FAIL: entry period %0d", cyc - last_fall); end
        end
        last_fall <= cyc;
        n_entries <= n_entries + 1;
        log_q.push_back({lcd_rs, lcd_data});
        if (!lcd_rs) begin
          if (lcd_data == 8'h01) begin
            foreach (ddram[i]) ddram[i] = 8'h20;
            addr = '0;
          end else if (lcd_data[7]) begin
            addr = lcd_data[6:0];
          end
        end else begin
          ddram[addr] = lcd_data;
          addr = addr + 1'b1;
        end
      end
    end
  end

  function automatic bit shows(input lcd_line_t a, input lcd_line_t b);
    for (int i = 0; i < 16; i++) begin
      if (ddram[i] !== a[127 - 8 * i -: 8]) return 1'b0;
      if (ddram[64 + i] !== b[127 - 8 * i -: 8]) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    logic [8:0] init_exp [5] = '{9'h038, 9'h00C, 9'h001, 9'h006, 9'h080};
    foreach (ddram[i]) ddram[i] = 8'h00;
    addr = '0;
    line1 = "CAN bus load    ";
    line2 = "0123456789abcdef";
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (n_entries == 38);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 5; i++) check(log_q[i] == init_exp[i], $sformatf("init entry %0d = %h", i, log_q[i]));
    check(log_q[21] == 9'h0C0, "line 2 address command");
    check(shows(line1, line2), "display shows both lines after the first pass");
    check(lcd_on && lcd_blon, "display and backlight on");
    wait (n_entries == 39);
    repeat (2) @(posedge clk);
    check(log_q[38] == 9'h080, "loops back to the line 1 address command");
    // change the text; one more full pass (34 entries) must show it
    line1 = "Overall:   5,71%";
    line2 = "Mod 13:   5,71% ";
    wait (n_entries == 39 + 34 + 34);
    repeat (2) @(posedge clk);
    check(shows(line1, line2), "display shows the new text");
    check(log_q[39 + 33] == 9'h080, "second loop starts at 0x080");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * ENTRY) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
