// tb_can_bus_monitor: end-to-end test of the CAN bus load monitor.
//
// The monitor runs at a shortened sample period (SAMPLE_HZ = 250, i.e.
// 200000 clocks), a 5 Mbaud serial line (10 clocks per bit) and a fast LCD
// timing, so that seven sample periods take 1.4 million clocks. Two
// behavioural dividers stand in for the external floating point divider, a
// serial receiver decodes the report and a display model shows what the
// LCD driver wrote.
//
// Traffic per sample period (CAN bit time 48 clocks unless noted):
//   0  nothing (an empty period)
//   1  the evaluation's first message group (extended frames, IDs 0..10,
//      8 data bytes) plus a standard frame with ID 0 (shares module 0 with
//      extended ID 0), two frames from ID 13, an ID above 31, an extended
//      29-bit ID, a remote frame and a DLC of 12
//   2  second group (extended, no data) at 50 clocks per bit
//   3  third group (standard, 8 bytes of 0x01) at 47 clocks per bit
//   4  fourth group (standard, no data), and one frame timed so that it
//      completes in the same clock as the sample tick
//   5  random standard frames, self-test display switched on
//   6  random frames, self-test switched off again
// For each period the testbench keeps its own bit counts and checks the
// serial report that follows the tick (start word, 32 module words and the
// overall word) and both LCD lines (percent of 2^20 bit/s, computed here
// from the counts). It counts each mechanism - standard and extended
// frames, stuffed frames, identifiers outside 0..31, remote frames, DLC
// above 8, shared module 0, empty period, frame and tick in the same clock,
// bit-time resynchronisation at 47 and 50 clocks, module selection, self-test
// display - and fails if one never happened.
module tb_can_bus_monitor;
  import can_mon_pkg::*;
  import can_tb_pkg::*;

  localparam int unsigned CLK_HZ    = 50_000_000;
  localparam int unsigned SAMPLE_HZ = 250;
  localparam int unsigned PERIOD    = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned BAUD      = 5_000_000;
  localparam int unsigned DIV       = 10;
  localparam int unsigned NPER      = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [17:0] SW = '0;
  logic [6:0]  HEX [8];
  logic [7:0]  LCD_DATA;
  logic        LCD_ON, LCD_BLON, LCD_RW, LCD_EN, LCD_RS, TxDWire;
  logic        CANbusWire = 1'b1;
  logic [31:0] fdiv_dataa [2];
  logic [31:0] fdiv_datab;
  logic [31:0] fdiv_result [2];

  can_bus_monitor #(
    .CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .BAUD(BAUD),
    .LCD_EN_CYCLES(2), .LCD_CMD_DELAY(10)
  ) dut (
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

  // ------------------------------------------------------------ timing probes
  longint cyc = 0;
  int     n_ticks = 0;
  longint tick_cyc = 0, valid_cyc = 0;
  int     n_coincide = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.sample_tick) begin
      n_ticks  <= n_ticks + 1;
      tick_cyc <= cyc;
    end
    if (dut.msg_valid) valid_cyc <= cyc;
    if (rst_n && dut.sample_tick && dut.msg_valid) n_coincide <= n_coincide + 1;
  end

  // ------------------------------------------------------------ reference model
  int exp_load [NPER][NUM_MODULES];
  int exp_overall [NPER];
  int exp_sel [NPER];
  bit std0_seen [NPER], ext0_seen [NPER];
  int n_std = 0, n_ext = 0, n_stuffed = 0, n_outside = 0, n_remote = 0, n_dlc_gt8 = 0;
  int n_bit47 = 0, n_bit50 = 0;
  int lat = -1;

  task automatic send_frame(input logic [28:0] id, input bit ext, input bit rtr, input logic [3:0] dlc,
                            input logic [63:0] data, input int bit_clks);
    bitq_t raw, line_bits;
    int p;
    longint last_drive;
    build_frame(id, ext, rtr, dlc, data, raw, line_bits);
    foreach (line_bits[i]) begin
      @(posedge clk);
      CANbusWire <= line_bits[i];
      if (i == line_bits.size() - 1) last_drive = cyc;
      repeat (bit_clks - 1) @(posedge clk);
    end
    @(posedge clk);
    CANbusWire <= 1'b1;
    repeat (3 * bit_clks + 20) @(posedge clk);
    if (bit_clks == 48) lat = int'(valid_cyc - last_drive);
    p = n_ticks;
    exp_overall[p] += raw.size();
    if (id < NUM_MODULES) exp_load[p][id] += raw.size();
    else n_outside++;
    if (ext) n_ext++;
    else n_std++;
    if (line_bits.size() > raw.size()) n_stuffed++;
    if (rtr) n_remote++;
    if (dlc > 8) n_dlc_gt8++;
    if (id == 0 && ext) ext0_seen[p] = 1'b1;
    if (id == 0 && !ext) std0_seen[p] = 1'b1;
    if (bit_clks == 47) n_bit47++;
    if (bit_clks == 50) n_bit50++;
  endtask

  // expected LCD number field for a bit count
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
    q = to_single(real'(bits) / 10485.759765625);  // divisor as stored in single precision
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

  // ------------------------------------------------------------ report checker
  logic [31:0] words [34];
  int          wcount = -1;
  logic [7:0]  bytes_q [$];
  int          n_reports = 0, n_reports_ok = 0, n_empty_reports = 0;

  always @(posedge clk) begin
    if (rx_valid) begin
      bytes_q.push_back(rx_byte);
      if (bytes_q.size() == 4) begin
        logic [31:0] w;
        w = {bytes_q[0], bytes_q[1], bytes_q[2], bytes_q[3]};
        bytes_q = {};
        if (w == UART_START_WORD && wcount < 0) begin
          wcount = 0;
        end else if (wcount >= 0) begin
          words[wcount] = w;
          wcount++;
          if (wcount == 33) begin
            automatic int r = n_reports;
            automatic bit ok = 1'b1;
            automatic bit empty = 1'b1;
            for (int i = 0; i < NUM_MODULES; i++) begin
              if (words[i] != {8'(i), 3'b000, LOAD_W'(exp_load[r][i])}) begin
                ok = 1'b0;
                $display("FAIL: report %0d module %0d word %h expected load %0d", r, i, words[i], exp_load[r][i]);
              end
              if (exp_load[r][i] != 0) empty = 1'b0;
            end
            if (words[32] != {8'd32, 3'b000, LOAD_W'(exp_overall[r])}) begin
              ok = 1'b0;
              $display("FAIL: report %0d overall word %h expected %0d", r, words[32], exp_overall[r]);
            end
            checks++;
            if (!ok) failures++;
            else n_reports_ok++;
            if (ok && empty && exp_overall[r] == 0) n_empty_reports++;
            n_reports++;
            wcount = -1;
          end
        end else begin
          failures++;
          $display("FAIL: word %h outside a report", w);
        end
      end
    end
  end

  // check the display for period p some time after its freeze
  int n_lcd_ok = 0, n_selftest_shown = 0;
  task automatic check_lcd(input int p);
    string l1, l2;
    l1 = {"Overall:", pct_text(exp_overall[p]), "%"};
    l2 = $sformatf("Mod %2d: %s%%", exp_sel[p], pct_text(exp_load[p][exp_sel[p]]));
    check(lcd1 == to_line(l1), $sformatf("period %0d LCD line 1 \"%s\" expected \"%s\"", p, lcd1, l1));
    check(lcd2 == to_line(l2), $sformatf("period %0d LCD line 2 \"%s\" expected \"%s\"", p, lcd2, l2));
    if (lcd1 == to_line(l1) && lcd2 == to_line(l2)) n_lcd_ok++;
  endtask

  // wait for tick number k, record the module selected at that tick
  task automatic wait_tick(input int k);
    wait (n_ticks == k);
    exp_sel[k - 1] = int'(SW[4:0]);
    repeat (200) @(posedge clk);
  endtask

  task automatic after_tick_checks(input int p);
    repeat (3000) @(posedge clk);
    if (SW[17] == 1'b0) check_lcd(p);
  endtask

  localparam logic [63:0] GROUP1_DATA [11] = '{
    64'h0102030405060708, 64'h090A0B0C0D0E0F10, 64'h1112131415161718, 64'h191A1B1C1D1E1F20,
    64'h2122232425262728, 64'h292A2B2C2D2E2F30, 64'h3132333435363738, 64'h393A3B3C3D3E3F40,
    64'h4142434445464748, 64'h494A4B4C4D4E4F50, 64'h5152535455565758};

  initial begin
    bitq_t raw, line_bits;
    longint start_at;
    foreach (exp_overall[p]) begin
      exp_overall[p] = 0;
      std0_seen[p] = 1'b0;
      ext0_seen[p] = 1'b0;
      foreach (exp_load[p][i]) exp_load[p][i] = 0;
    end
    SW = 18'd5;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // period 0: idle bus
    wait_tick(1);
    after_tick_checks(0);
    check(HEX[0] == 7'h7F && HEX[7] == 7'h7F, "seven-segment digits off");

    // period 1: first message group and special cases
    SW = 18'd13;
    for (int i = 0; i <= 10; i++) send_frame(29'(i), 1'b1, 1'b0, 4'd8, GROUP1_DATA[i], 48);
    send_frame(29'd0, 1'b0, 1'b0, 4'd0, 64'h0, 48);
    send_frame(29'd13, 1'b0, 1'b0, 4'd8, 64'h0102030405060708, 48);
    send_frame(29'd13, 1'b0, 1'b0, 4'd8, 64'h0102030405060708, 48);
    send_frame(29'd100, 1'b0, 1'b0, 4'd2, 64'hABCD_0000_0000_0000, 48);
    send_frame(29'h12345, 1'b1, 1'b0, 4'd1, 64'h5500_0000_0000_0000, 48);
    send_frame(29'd3, 1'b0, 1'b1, 4'd8, 64'h0, 48);
    send_frame(29'd4, 1'b0, 1'b0, 4'd12, 64'hFFFF_0000_FFFF_0000, 48);
    wait_tick(2);
    after_tick_checks(1);

    // period 2: second group at 50 clocks per bit
    SW = 18'd0;
    for (int i = 0; i <= 10; i++) send_frame(29'(i), 1'b1, 1'b0, 4'd0, 64'h0, 50);
    wait_tick(3);
    after_tick_checks(2);

    // period 3: third group at 47 clocks per bit
    SW = 18'd10;
    for (int i = 0; i <= 10; i++) send_frame(29'(i), 1'b0, 1'b0, 4'd8, 64'h0101010101010101, 47);
    wait_tick(4);
    after_tick_checks(3);

    // period 4: fourth group, then a frame that completes with the tick
    SW = 18'd31;
    for (int i = 0; i <= 10; i++) send_frame(29'(i), 1'b0, 1'b0, 4'd0, 64'h0, 48);
    build_frame(29'd31, 1'b0, 1'b0, 4'd2, 64'h1234_0000_0000_0000, raw, line_bits);
    start_at = tick_cyc + PERIOD - lat - longint'(line_bits.size() - 1) * 48;
    check(lat > 0 && start_at > cyc + 100, "coincident frame can be scheduled");
    wait (cyc == start_at);
    foreach (line_bits[i]) begin
      @(posedge clk);
      CANbusWire <= line_bits[i];
      repeat (47) @(posedge clk);
    end
    @(posedge clk);
    CANbusWire <= 1'b1;
    // update, then sample: the frame belongs to period 4
    exp_overall[4] += raw.size();
    exp_load[4][31] += raw.size();
    wait_tick(5);
    after_tick_checks(4);

    // period 5: self-test text on the LCD
    SW = 18'd7 | (18'd1 << 17);
    repeat (5) send_frame(29'($urandom_range(0, 31)), 1'b0, 1'b0, 4'($urandom_range(0, 8)), {$urandom, $urandom}, 48);
    wait_tick(6);
    after_tick_checks(5);
    // six ticks so far: the self-test shows its second screen
    check(lcd1 == to_line("CAN wire: GPIO1 ") && lcd2 == to_line("pin 2 (blue)    "),
          $sformatf("self-test screen \"%s\" \"%s\"", lcd1, lcd2));
    if (lcd1 == to_line("CAN wire: GPIO1 ")) n_selftest_shown++;

    // period 6: back to the load display
    SW = 18'd2;
    repeat (5) send_frame(29'($urandom), 1'($urandom), 1'b0, 4'($urandom_range(0, 8)), {$urandom, $urandom}, 48);
    wait_tick(7);
    after_tick_checks(6);
    wait (n_reports == 7);
    repeat (10) @(posedge clk);

    // mechanisms
    check(n_reports_ok == 7, $sformatf("%0d of 7 reports correct", n_reports_ok));
    check(rx_frame_errors == 0, "serial framing");
    check(n_std > 0, "standard frames");
    check(n_ext > 0, "extended frames");
    check(n_stuffed > 0, "stuffed frames");
    check(n_outside > 0, "identifiers outside 0..31");
    check(n_remote > 0, "remote frame");
    check(n_dlc_gt8 > 0, "DLC above 8");
    check(std0_seen[1] && ext0_seen[1], "standard and extended ID 0 share module 0");
    check(n_empty_reports > 0, "empty sample period");
    check(n_coincide > 0, "frame and sample tick in the same clock");
    check(n_bit47 > 0 && n_bit50 > 0, "resynchronisation at 47 and 50 clocks per bit");
    check(n_lcd_ok >= 6, $sformatf("%0d LCD checks passed", n_lcd_ok));
    check(n_selftest_shown > 0, "self-test display");
    $display("mechanisms: std %0d ext %0d stuffed %0d outside %0d remote %0d dlc>8 %0d coincide %0d empty %0d lcd %0d reports %0d",
             n_std, n_ext, n_stuffed, n_outside, n_remote, n_dlc_gt8, n_coincide, n_empty_reports, n_lcd_ok, n_reports_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NPER + 2) * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
