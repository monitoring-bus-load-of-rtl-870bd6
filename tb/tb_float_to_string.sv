// tb_float_to_string: percent value to decimal text.
//
// Inputs are single-precision numbers: 0, 100.0, the example load of
// 59950 bit/s (5.717 %, shown as 5,71 because only ten mantissa bits are
// used), values around every power of two, a negative number, a value above
// 1000 and 3000 random loads between 0 and 2^20 bits divided by 10485.76.
// The expected text is computed in the testbench with real arithmetic from
// the leading one and the first ten mantissa bits, formatted with
// $sformatf("%4d,%02d").
module tb_float_to_string;
  import can_mon_pkg::*;

  logic [31:0] value;
  num_field_t  text;

  float_to_string dut (.value, .text);

  int checks = 0, failures = 0;

  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d = $realtobits(r);
    if (r == 0.0) return 32'h0;
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic string expected(input logic [31:0] f);
    int e;
    real m, v;
    longint h;
    if (f[31] || f[30:23] == 8'd0) return "   0,00";
    e = int'(f[30:23]) - 127;
    m = 1.0 + real'(f[22:13]) / 1024.0;
    v = m * (2.0 ** e);
    if (v >= 1000.0) return " 999,99";
    h = longint'($floor(v * 100.0));
    return $sformatf("%4d,%02d", h / 100, h % 100);
  endfunction

  task automatic try(input logic [31:0] f);
    string exp_s;
    num_field_t exp_t;
    value = f;
    #1;
    exp_s = expected(f);
    for (int i = 0; i < 7; i++) exp_t[55 - 8 * i -: 8] = exp_s[i];
    checks++;
    if (text !== exp_t) begin
      failures++;
      $display("FAIL: %h -> \"%s\", expected \"%s\"", f, text, exp_s);
    end
  endtask

  initial begin
    try(32'h0);
    try(32'h42C8_0000);                           // 100.0
    try(to_single(59950.0 / 10485.76));
    value = to_single(59950.0 / 10485.76);
    #1;
    checks++;
    if (text !== "   5,71") begin failures++; $display("FAIL: example shows \"%s\"", text); end
    value = 32'h42C8_0000;
    #1;
    checks++;
    if (text !== " 100,00") begin failures++; $display("FAIL: 100 %% shows \"%s\"", text); end
    try(to_single(-3.5));
    try(to_single(1234.5));
    for (int e = -10; e < 10; e++) begin
      try(to_single(2.0 ** e));
      try(to_single(2.0 ** e * 1.999));
    end
    repeat (3000) try(to_single(real'($urandom_range(0, 1 << 20)) / 10485.76));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
