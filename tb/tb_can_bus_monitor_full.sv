// tb_can_bus_monitor_full: one complete one-second measurement at full size.
//
// The monitor runs with all parameters at their defaults: 50 MHz clock,
// 48 clocks per CAN bit, a 1 Hz sample tick, 115200 baud and the real LCD
// timing. During the first second the bus carries the first message group
// of the evaluation: eleven extended data frames with IDs 0..10 and eight
// data bytes (128 bits each), every message repeated every 50 ms, i.e. 20
// times. After the tick (50 million clocks) the testbench decodes the serial
// report and expects 2560 bits for each of modules 0..10, zero for the other
// modules and 28160 bits overall; after one LCD refresh pass it expects
// "Overall:   2,68%" and, with module 5 selected, "Mod  5:   0,24%" (both
// computed here from the bit counts). Two behavioural dividers stand in for
// the external floating point divider.
module tb_can_bus_monitor_full;
  import can_mon_pkg::*;
  import can_tb_pkg::*;

  localparam longint PERIOD = 50_000_000;
  localparam int unsigned DIV = 434;
  localparam int unsigned BIT = 48;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10 clk = ~clk;

  logic [17:0] SW = 18'd5;
  logic [6:0]  HEX [8];
  logic [7:0]  LCD_DATA;
  logic        LCD_ON, LCD_BLON, LCD_RW, LCD_EN, LCD_RS, TxDWire;
  logic        CANbusWire = 1'b1;
  logic [31:0] fdiv_dataa [2];
  logic [31:0] fdiv_datab;
  logic [31:0] fdiv_result [2];

  can_bus_monitor dut (
    .CLOCK_50(clk), .rst_n, .SW,
    .HEX0(HEX[0]), .HEX1(HEX[1]), .HEX2(HEX[2]), .HEX3(HEX[3]),
    .HEX4(HEX[4]), .HEX5(HEX[5]), .HEX6(HEX[6]), .HEX7(HEX[7]),
    .LCD_DATA, .LCD_ON, .LCD_BLON, .LCD_RW, .LCD_EN, .LCD_RS, .TxDWire, .CANbusWire,
    .fdiv_dataa, .fdiv_datab, .fdiv_result
  );

  fp_div_model u_div0 (.clk, .dataa(fdiv_dataa[0]), .datab(fdiv_datab), .result(fdiv_result[0]));
  fp_div_model u_div1 (.clk, .dataa(fdiv_dataa[1]), .datab(fdiv_datab), .result(fdiv_result[1]));

  logic       rx_valid;
  logic [7:0] rx_byte;
  int         rx_frame_errors;
  uart_rx_model #(.DIV(DIV)) u_rx (.clk, .rxd(TxDWire), .valid(rx_valid), .data(rx_byte),
                                   .frame_errors(rx_frame_errors));

  logic [127:0] lcd1, lcd2;
  int           lcd_entries;
  lcd_model u_lcd (.clk, .lcd_en(LCD_EN), .lcd_rs(LCD_RS), .lcd_data(LCD_DATA),
                   .line1(lcd1), .line2(lcd2), .entries(lcd_entries));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  int n_ticks = 0;
  longint tick_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.sample_tick) begin
      n_ticks <= n_ticks + 1;
      tick_cyc <= cyc;
    end
  end

  int exp_load [NUM_MODULES];
  int exp_overall = 0;

  // serial report
  logic [7:0]  bytes_q [$];
  logic [31:0] words_q [$];
  always @(posedge clk) begin
    if (rx_valid) begin
      bytes_q.push_back(rx_byte);
      if (bytes_q.size() == 4) begin
        words_q.push_back({bytes_q[0], bytes_q[1], bytes_q[2], bytes_q[3]});
        bytes_q = {};
      end
    end
  end

  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, 1'b1, d[51:29]} + 25'(d[28]);
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic string pct_text(input int bits);
    logic [31:0] q;
    real v;
    longint h;
    int e;
    q = to_single(real'(bits) / 10485.759765625);
    if (q == 32'h0) return "   0,00";
    e = int'(q[30:23]) - 127;
    v = (1.0 + real'(q[22:13]) / 1024.0) * (2.0 ** e);
    h = longint'($floor(v * 100.0));
    return $sformatf("%4d,%02d", h / 100, h % 100);
  endfunction

  function automatic logic [127:0] to_line(input string s);
    logic [127:0] l;
    for (int i = 0; i < 16; i++) l[127 - 8 * i -: 8] = s.getc(i);
    return l;
  endfunction

  initial begin
    bitq_t raw, line_bits;
    longint burst_start;
    int entries_at_tick;
    string l1, l2;
    foreach (exp_load[i]) exp_load[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (1000) @(posedge clk);
    // 20 bursts, one every 50 ms
    for (int burst = 0; burst < 20; burst++) begin
      burst_start = cyc;
      for (int id = 0; id <= 10; id++) begin
        build_frame(29'(id), 1'b1, 1'b0, 4'd8,
                    {8'(8 * id + 1), 8'(8 * id + 2), 8'(8 * id + 3), 8'(8 * id + 4),
                     8'(8 * id + 5), 8'(8 * id + 6), 8'(8 * id + 7), 8'(8 * id + 8)}, raw, line_bits);
        foreach (line_bits[i]) begin
          @(posedge clk);
          CANbusWire <= line_bits[i];
          repeat (BIT - 1) @(posedge clk);
        end
        @(posedge clk);
        CANbusWire <= 1'b1;
        repeat (4 * BIT) @(posedge clk);
        exp_load[id] += raw.size();
        exp_overall += raw.size();
      end
      if (burst < 19) wait (cyc >= burst_start + PERIOD / 20);
    end
    check(n_ticks == 0, "all traffic inside the first second");
    wait (n_ticks == 1);
    check(tick_cyc > PERIOD - 10 && tick_cyc < PERIOD + 10, $sformatf("sample tick after %0d clocks", tick_cyc));
    entries_at_tick = lcd_entries;
    // serial report: 34 words, 11 bits per byte
    wait (words_q.size() == 34);
    check(cyc - tick_cyc < 34 * 4 * 11 * DIV + 2000, $sformatf("report took %0d clocks", cyc - tick_cyc));
    check(words_q[0] == UART_START_WORD, "start word");
    for (int i = 0; i < NUM_MODULES; i++)
      check(words_q[i + 1] == {8'(i), 3'b000, LOAD_W'(exp_load[i])},
            $sformatf("module %0d word %h expected %0d", i, words_q[i + 1], exp_load[i]));
    check(words_q[33] == {8'd32, 3'b000, LOAD_W'(exp_overall)}, $sformatf("overall word %h", words_q[33]));
    check(exp_overall == 28160 && exp_load[0] == 2560, "group 1 sizes: 220 frames of 128 bits");
    check(rx_frame_errors == 0, "serial framing");
    // one full LCD pass after the freeze
    wait (lcd_entries >= entries_at_tick + 40);
    repeat (10) @(posedge clk);
    l1 = {"Overall:", pct_text(exp_overall), "%"};
    l2 = $sformatf("Mod %2d: %s%%", 5, pct_text(exp_load[5]));
    check(lcd1 == to_line(l1), $sformatf("LCD line 1 \"%s\" expected \"%s\"", lcd1, l1));
    check(lcd2 == to_line(l2), $sformatf("LCD line 2 \"%s\" expected \"%s\"", lcd2, l2));
    $display("LCD: \"%s\" / \"%s\"", lcd1, lcd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
