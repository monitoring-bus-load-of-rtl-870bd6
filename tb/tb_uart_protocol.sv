// tb_uart_protocol: the report word sequence.
//
// A model of the word sender in the testbench accepts a word on `word_send`
// and stays busy (done low) for a random 1 to 30 clocks. After a
// `data_ready` pulse with random frozen loads the testbench expects exactly
// 34 words: 0x0010_0001, {id, 000, load[id]} for id 0..31 in order and
// {32, 000, overall}; then nothing until the next pulse. A second report
// with new values is checked the same way, and a third pulse given in the
// middle of a report must restart it from the start word.
module tb_uart_protocol;
  import can_mon_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        data_ready = 1'b0;
  load_t       load_freeze [NUM_MODULES];
  load_t       overall_freeze;
  logic        word_done;
  logic        word_send;
  logic [31:0] word;

  uart_protocol dut (.clk, .rst_n, .data_ready, .load_freeze, .overall_freeze,
                     .word_done, .word_send, .word);

  int checks = 0, failures = 0;
  logic [31:0] got_q [$];
  int busy_left = 0;

  assign word_done = (busy_left == 0);

  always @(posedge clk) begin
    if (rst_n && word_send) begin
      if (!word_done) begin failures++; $display("FAIL: word sent while the sender is busy"); end
      got_q.push_back(word);
      busy_left <= $urandom_range(1, 30);
    end else if (busy_left > 0) begin
      busy_left <= busy_left - 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic new_values();
    foreach (load_freeze[i]) load_freeze[i] = LOAD_W'($urandom);
    overall_freeze = LOAD_W'($urandom);
  endtask

  task automatic pulse();
    @(negedge clk);
    data_ready = 1'b1;
    @(negedge clk);
    data_ready = 1'b0;
  endtask

  task automatic check_report();
    check(got_q.size() == 34, $sformatf("%0d words in a report", got_q.size()));
    if (got_q.size() == 34) begin
      check(got_q[0] == 32'h0010_0001, $sformatf("start word %h", got_q[0]));
      for (int i = 0; i < NUM_MODULES; i++)
        check(got_q[i + 1] == {8'(i), 3'b000, load_freeze[i]}, $sformatf("module %0d word %h", i, got_q[i + 1]));
      check(got_q[33] == {8'd32, 3'b000, overall_freeze}, $sformatf("overall word %h", got_q[33]));
    end
  endtask

  initial begin
    new_values();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (50) @(posedge clk);
    check(got_q.size() == 0, "nothing sent before the first freeze");
    for (int r = 0; r < 2; r++) begin
      got_q = {};
      new_values();
      pulse();
      repeat (34 * 40) @(posedge clk);
      check_report();
    end
    // restart in the middle of a report
    got_q = {};
    new_values();
    pulse();
    wait (got_q.size() == 10);
    got_q = {};
    new_values();
    pulse();
    repeat (34 * 40) @(posedge clk);
    // a word accepted just before the pulse may be in the queue first
    if (got_q.size() == 35) void'(got_q.pop_front());
    check_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * 34 * 40) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
