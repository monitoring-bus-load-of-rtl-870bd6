// can_bus_monitor: CAN bus load monitor, top level.
//
// The monitor listens to the receive wire of a 1 Mbit/s CAN bus and reports,
// once per sample period (1 s), how many bits each of the modules 0..31 and
// the bus as a whole put on the wire. The report goes to a PC over a one-way
// UART at 115200 baud and, as a percentage of 2^20 bit/s, to the 2x16
// character LCD.
//
// Monitor part:
//   sample_rate_gen  1 Hz tick
//   can_rx           samples and destuffs CAN frames, reports each frame's length
//   load_calc        per-identifier and overall bit counters, frozen on each tick
// Output part:
//   uart_protocol -> uart_word_sender -> uart_tx        report on TxDWire
//   int_to_float -> external divider -> float_to_string -> display_format
//   selftest (SW[17] on) or the load display -> lcd_ctrl -> LCD pins
//
// The floating point divider is not part of this RTL. The two dividends
// (overall load and selected module load as IEEE754 singles) leave on
// `fdiv_dataa[0]` and `fdiv_dataa[1]`, the divisor 2^20/100 on `fdiv_datab`,
// and the two quotients (the loads in percent) must come back on
// `fdiv_result[0]` and `fdiv_result[1]`. The divider may be pipelined: the
// operands are held for a whole sample period and the display path is
// combinational from `fdiv_result`.
//
// SW[4:0] selects the module shown on LCD line 2. The seven-segment digits
// are switched off. `rst_n` is an active-low reset added by this design.
// Pin names follow the DE2 board assignment of the design description;
// LCD_DATA is an output here because the display is only written.
module can_bus_monitor
  import can_mon_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned SAMPLE_HZ     = 1,
  parameter int unsigned CLKS_PER_BIT  = 48,
  parameter int unsigned SAMPLE_POINT  = 31,
  parameter int unsigned BAUD          = 115_200,
  parameter int unsigned LCD_EN_CYCLES = 16,
  parameter int unsigned LCD_CMD_DELAY = 100_000
) (
  input  logic        CLOCK_50,
  input  logic        rst_n,
  input  logic [17:0] SW,
  output logic [6:0]  HEX0,
  output logic [6:0]  HEX1,
  output logic [6:0]  HEX2,
  output logic [6:0]  HEX3,
  output logic [6:0]  HEX4,
  output logic [6:0]  HEX5,
  output logic [6:0]  HEX6,
  output logic [6:0]  HEX7,
  output logic [7:0]  LCD_DATA,
  output logic        LCD_ON,
  output logic        LCD_BLON,
  output logic        LCD_RW,
  output logic        LCD_EN,
  output logic        LCD_RS,
  output logic        TxDWire,
  input  logic        CANbusWire,
  output logic [31:0] fdiv_dataa [2],
  output logic [31:0] fdiv_datab,
  input  logic [31:0] fdiv_result [2]
);

  logic clk;
  assign clk = CLOCK_50;

  // ------------------------------------------------------------ monitor part
  logic     sample_tick;
  can_msg_t msg;
  msg_len_t msg_len;
  logic     msg_valid;

  load_t                load_freeze [NUM_MODULES];
  load_t                overall_freeze, module_freeze;
  logic [MOD_IDX_W-1:0] module_sel_freeze;
  logic                 data_ready;

  sample_rate_gen #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_sample (
    .clk, .rst_n, .tick(sample_tick)
  );

  can_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .SAMPLE_POINT(SAMPLE_POINT)) u_can_rx (
    .clk, .rst_n, .rx(CANbusWire), .msg, .msg_len, .msg_valid
  );

  load_calc u_load (
    .clk, .rst_n, .msg, .msg_len, .msg_valid, .sample_tick,
    .module_sel(SW[MOD_IDX_W-1:0]),
    .load_freeze, .overall_freeze, .module_freeze, .module_sel_freeze, .data_ready
  );

  // ------------------------------------------------------------- UART report
  logic        word_send, word_done;
  logic [31:0] word;
  logic        tx_start, tx_busy;
  logic [7:0]  tx_byte;

  uart_protocol u_protocol (
    .clk, .rst_n, .data_ready, .load_freeze, .overall_freeze,
    .word_done, .word_send, .word
  );

  uart_word_sender u_words (
    .clk, .rst_n, .data_ready(word_send), .data_in(word), .tx_busy,
    .send(tx_start), .byte_out(tx_byte), .done(word_done)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .start(tx_start), .data(tx_byte), .txd(TxDWire), .busy(tx_busy)
  );

  // ------------------------------------------------------------- LCD display
  num_field_t overall_text, module_text;
  lcd_line_t  load_line1, load_line2, test_line1, test_line2, lcd_line1, lcd_line2;
  logic       test_finished;

  int_to_float #(.IN_W(LOAD_W)) u_i2f_overall (.value(overall_freeze), .result(fdiv_dataa[0]));
  int_to_float #(.IN_W(LOAD_W)) u_i2f_module  (.value(module_freeze),  .result(fdiv_dataa[1]));
  assign fdiv_datab = PERCENT_DIVISOR;

  float_to_string u_f2s_overall (.value(fdiv_result[0]), .text(overall_text));
  float_to_string u_f2s_module  (.value(fdiv_result[1]), .text(module_text));

  display_format u_format (
    .overall_text, .module_text, .module_num(module_sel_freeze),
    .line1(load_line1), .line2(load_line2)
  );

  selftest u_selftest (
    .clk, .rst_n, .tick(sample_tick), .line1(test_line1), .line2(test_line2),
    .finished(test_finished)
  );

  assign lcd_line1 = SW[17] ? test_line1 : load_line1;
  assign lcd_line2 = SW[17] ? test_line2 : load_line2;

  lcd_ctrl #(.EN_CYCLES(LCD_EN_CYCLES), .CMD_DELAY(LCD_CMD_DELAY)) u_lcd (
    .clk, .rst_n, .line1(lcd_line1), .line2(lcd_line2),
    .lcd_data(LCD_DATA), .lcd_rw(LCD_RW), .lcd_en(LCD_EN), .lcd_rs(LCD_RS),
    .lcd_on(LCD_ON), .lcd_blon(LCD_BLON)
  );

  // --------------------------------------------------- seven-segment digits
  // active-low segments, all off
  assign HEX0 = 7'h7F;
  assign HEX1 = 7'h7F;
  assign HEX2 = 7'h7F;
  assign HEX3 = 7'h7F;
  assign HEX4 = 7'h7F;
  assign HEX5 = 7'h7F;
  assign HEX6 = 7'h7F;
  assign HEX7 = 7'h7F;

endmodule
