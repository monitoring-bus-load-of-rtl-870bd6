// display_format: the two LCD lines of the load monitor.
//
// Line 1 shows the overall bus load, line 2 the load of the module selected
// with the switches:
//   "Overall: hhh,hh%"      "Overall:" + 7-character number field + "%"
//   "Mod nn:  hhh,hh%"      "Mod nn: " + 7-character number field + "%"
// The number fields come from float_to_string and sit in bits 63:8 of each
// 128-bit line (first character in bits 127:120), as in the design
// description. Printing the module number (two digits, leading zero blanked)
// in the second label is this design's reading of the base layout.
//
// Purely combinational.
module display_format
  import can_mon_pkg::*;
(
  input  num_field_t           overall_text,
  input  num_field_t           module_text,
  input  logic [MOD_IDX_W-1:0] module_num,
  output lcd_line_t            line1,
  output lcd_line_t            line2
);

  logic [7:0] tens, ones;

  always_comb begin
    tens = 8'(int'(module_num) / 10);
    ones = 8'(int'(module_num) % 10);
    line1 = {"Overall:", overall_text, "%"};
    line2 = {"Mod ", (tens == 8'd0) ? 8'h20 : 8'h30 + tens, 8'h30 + ones, ": ", module_text, "%"};
  end

endmodule
