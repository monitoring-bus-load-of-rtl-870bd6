// tb_display_format: the two LCD lines.
//
// Drives number fields and every module number 0..31 and compares both lines
// with strings built by the testbench ("Overall:" + field + "%" and
// "Mod nn: " + field + "%", the module number right-aligned in two places).
module tb_display_format;
  import can_mon_pkg::*;

  num_field_t           overall_text, module_text;
  logic [MOD_IDX_W-1:0] module_num;
  lcd_line_t            line1, line2;

  display_format dut (.overall_text, .module_text, .module_num, .line1, .line2);

  int checks = 0, failures = 0;

  function automatic lcd_line_t to_line(input string s);
    lcd_line_t l;
    for (int i = 0; i < 16; i++) l[127 - 8 * i -: 8] = s.getc(i);
    return l;
  endfunction

  function automatic num_field_t to_field(input string s);
    num_field_t f;
    for (int i = 0; i < 7; i++) f[55 - 8 * i -: 8] = s.getc(i);
    return f;
  endfunction

  initial begin
    for (int m = 0; m < NUM_MODULES; m++) begin
      overall_text = "  12,34";
      module_text  = to_field($sformatf("%4d,%02d", m * 3, m));
      module_num   = MOD_IDX_W'(m);
      #1;
      checks += 2;
      if (line1 !== to_line("Overall:  12,34%")) begin failures++; $display("FAIL: line1 \"%s\"", line1); end
      if (line2 !== to_line($sformatf("Mod %2d: %4d,%02d%%", m, m * 3, m))) begin
        failures++;
        $display("FAIL: line2 \"%s\"", line2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
