// lcd_ctrl: driver for a 2x16 character LCD with an HD44780-style 8-bit bus.
//
// A table of 38 nine-bit entries {RS, byte} is written out one entry at a
// time: the initialisation commands 0x38 (8-bit bus, two lines), 0x0C
// (display on), 0x01 (clear), 0x06 (entry mode), then 0x80 (cursor to line 1),
// the 16 characters of `line1`, 0xC0 (cursor to line 2) and the 16 characters
// of `line2`. After the last character the driver returns to the 0x80 entry
// and writes both lines again, so a changed text appears on the next pass;
// this endless refresh from the line-1 address is the behaviour the design
// description asks of the driver. The command values and all timing are this
// design's choice.
//
// Each entry: RS and the data byte are set up one clock before EN rises, EN
// is high for EN_CYCLES clocks (the display latches on the falling edge), then
// the driver waits CMD_DELAY clocks; one entry takes EN_CYCLES + CMD_DELAY + 3
// clocks. With the defaults (16 clocks,
// 100000 clocks = 2 ms at 50 MHz) one full pass takes about 68 ms. RW is held
// at 0 (write only); LCD_ON and the backlight are on.
module lcd_ctrl
  import can_mon_pkg::*;
#(
  parameter int unsigned EN_CYCLES = 16,
  parameter int unsigned CMD_DELAY = 100_000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  lcd_line_t line1,
  input  lcd_line_t line2,
  output logic [7:0] lcd_data,
  output logic      lcd_rw,
  output logic      lcd_en,
  output logic      lcd_rs,
  output logic      lcd_on,
  output logic      lcd_blon
);

  localparam int unsigned LUT_SIZE   = 38;
  localparam int unsigned LINE1_ADDR = 4;   // entry holding command 0x080
  localparam int unsigned LINE1_CHAR = 5;
  localparam int unsigned LINE2_ADDR = 21;
  localparam int unsigned LINE2_CHAR = 22;
  localparam int unsigned CNT_MAX    = (EN_CYCLES > CMD_DELAY) ? EN_CYCLES : CMD_DELAY;
  localparam int unsigned CNT_W      = $clog2(CNT_MAX + 1);

  typedef enum logic [1:0] {L_SETUP, L_PULSE, L_HOLD, L_NEXT} lcd_state_t;

  lcd_state_t       state;
  logic [5:0]       idx;
  logic [CNT_W-1:0] cnt;
  logic [8:0]       entry;

  always_comb begin
    if (idx < 6'(LINE1_CHAR)) begin
      unique case (idx)
        6'd0:    entry = 9'h038;
        6'd1:    entry = 9'h00C;
        6'd2:    entry = 9'h001;
        6'd3:    entry = 9'h006;
        default: entry = 9'h080;
      endcase
    end else if (idx < 6'(LINE2_ADDR)) begin
      entry = {1'b1, line1[127 - 8 * (int'(idx) - LINE1_CHAR) -: 8]};
    end else if (idx == 6'(LINE2_ADDR)) begin
      entry = 9'h0C0;
    end else begin
      entry = {1'b1, line2[127 - 8 * (int'(idx) - LINE2_CHAR) -: 8]};
    end
  end

  assign lcd_rw   = 1'b0;
  assign lcd_on   = 1'b1;
  assign lcd_blon = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_SETUP;
      idx      <= '0;
      cnt      <= '0;
      lcd_data <= '0;
      lcd_rs   <= 1'b0;
      lcd_en   <= 1'b0;
    end else begin
      unique case (state)
        L_SETUP: begin
          lcd_rs   <= entry[8];
          lcd_data <= entry[7:0];
          cnt      <= '0;
          state    <= L_PULSE;
        end
        L_PULSE: begin
          if (cnt == CNT_W'(EN_CYCLES)) begin
            lcd_en <= 1'b0;
            cnt    <= '0;
            state  <= L_HOLD;
          end else begin
            lcd_en <= 1'b1;
            cnt    <= cnt + 1'b1;
          end
        end
        L_HOLD: begin
          if (cnt == CNT_W'(CMD_DELAY - 1)) state <= L_NEXT;
          else                              cnt   <= cnt + 1'b1;
        end
        L_NEXT: begin
          idx   <= (idx == 6'(LUT_SIZE - 1)) ? 6'(LINE1_ADDR) : idx + 1'b1;
          state <= L_SETUP;
        end
        default: state <= L_SETUP;
      endcase
    end
  end

endmodule
