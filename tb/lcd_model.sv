// lcd_model: testbench model of a 2x16 HD44780-style character display.
//
// On every falling edge of `lcd_en` it takes RS and the data byte: command
// 0x01 clears the display memory to blanks, a command with bit 7 set moves
// the write address, a data byte is stored at the address, which then
// advances. `line1`/`line2` show display addresses 0x00-0x0F and 0x40-0x4F,
// first character in bits 127:120; `entries` counts latched bytes.
module lcd_model (
  input  logic         clk,
  input  logic         lcd_en,
  input  logic         lcd_rs,
  input  logic [7:0]   lcd_data,
  output logic [127:0] line1,
  output logic [127:0] line2,
  output int           entries
);

  logic [7:0] ddram [128];
  logic [6:0] addr = '0;
  logic       en_d = 1'b0;

  initial begin
    foreach (ddram[i]) ddram[i] = 8'h20;
    entries = 0;
  end

  always @(posedge clk) begin
    en_d <= lcd_en;
    if (en_d && !lcd_en) begin
      entries <= entries + 1;
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

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      line1[127 - 8 * i -: 8] = ddram[i];
      line2[127 - 8 * i -: 8] = ddram[64 + i];
    end
  end

endmodule
