// tb_can_mon_pkg: checks the shared constants and the report word packing.
//
// The constants are compared with values worked out here from their
// definitions: the start word is 2^20 + 1 and must not fit in a load
// counter's range of real loads (at most 2^20 bit/s); the overall report id
// is the first id after the monitored modules; the percent divisor is
// 2^20 / 100 rounded to IEEE754 single precision, computed here from a
// double. report_word() is checked for 2000 random id/load pairs against
// shifts and masks of the 32-bit word. There is no clock; the watchdog
// counts time steps.
module tb_can_mon_pkg;
  import can_mon_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // round a double to IEEE754 single precision (normal numbers only)
  function automatic logic [31:0] to_single(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, 1'b1, d[51:29]} + 25'(d[28]);
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  initial begin
    logic [31:0] w;
    logic [7:0] id;
    logic [20:0] load;
    check(NUM_MODULES == 32, "32 modules");
    check(MOD_IDX_W == 5, "module index width");
    check(LOAD_W == 21 && (2 ** LOAD_W) > (1 << 20), "load counter holds 2^20");
    check(UART_ID_W + 3 + LOAD_W == 32, "report word is 32 bits");
    check(MSG_W == 64 + 8 * 8, "message buffer holds the longest frame");
    check(UART_START_WORD == 32'((1 << 20) + 1), "start word 2^20 + 1");
    check(int'(OVERALL_ID) == NUM_MODULES, "overall id follows the modules");
    check(PERCENT_DIVISOR == to_single(real'(1 << 20) / 100.0),
          $sformatf("divisor %h", PERCENT_DIVISOR));
    for (int i = 0; i < 2000; i++) begin
      id   = 8'($urandom);
      load = 21'($urandom);
      if (i == 0) begin
        id = '1;
        load = '1;
      end
      w = report_word(id, load);
      check(w[31:24] == id && w[23:21] == 3'b000 && w[20:0] == load,
            $sformatf("report_word(%0d, %0d) = %h", id, load, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
