// tb_int_to_float: integer to IEEE754 single precision.
//
// Every power of two, every all-ones value, the largest 21-bit input, zero,
// the 59950-bit example load and 2000 random inputs are converted; the result
// is compared with the simulator's double-precision conversion ($realtobits),
// narrowed to single precision, which is exact for inputs below 2^24.
module tb_int_to_float;

  localparam int unsigned IN_W = 21;

  logic [IN_W-1:0] value;
  logic [31:0]     result;

  int_to_float #(.IN_W(IN_W)) dut (.value, .result);

  int checks = 0, failures = 0;

  task automatic try(input logic [IN_W-1:0] v);
    logic [31:0] expv;
    logic [63:0] dbl;
    value = v;
    #1;
    dbl  = $realtobits(real'(v));
    // double to single: exact for inputs below 2^24
    expv = (v == '0) ? 32'h0 : {dbl[63], 8'(int'(dbl[62:52]) - 1023 + 127), dbl[51:29]};
    checks++;
    if (result !== expv) begin
      failures++;
      $display("FAIL: %0d -> %h, expected %h", v, result, expv);
    end
  endtask

  initial begin
    try('0);
    try('1);
    try(IN_W'(59950));
    try(IN_W'(1 << 20));
    for (int i = 0; i < IN_W; i++) begin
      try(IN_W'(1) << i);
      try((IN_W'(1) << i) - 1'b1);
      try((IN_W'(1) << i) | 1'b1);
    end
    repeat (2000) try(IN_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
