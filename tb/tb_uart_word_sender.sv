// tb_uart_word_sender: 32-bit words split into bytes.
//
// A model of the byte transmitter in the testbench takes a byte whenever
// `send` is high, records it and then reports busy for a random 3 to 40
// clocks. The testbench hands over words with random gaps and checks that
// each word arrives as four bytes, bits 31:24 first; that `send` is never
// raised while the model is busy; that `done` is low while a word is in
// progress and high again after its fourth byte, and that exactly four
// bytes are sent per word.
module tb_uart_word_sender;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        data_ready = 1'b0;
  logic [31:0] data_in = '0;
  logic        tx_busy = 1'b0;
  logic        send;
  logic [7:0]  byte_out;
  logic        done;

  uart_word_sender dut (.clk, .rst_n, .data_ready, .data_in, .tx_busy, .send, .byte_out, .done);

  int checks = 0, failures = 0;
  logic [7:0] got_q [$];
  int busy_left = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // transmitter model
  always @(posedge clk) begin
    if (rst_n && send) begin
      if (tx_busy) begin failures++; $display("FAIL: send while busy"); end
      got_q.push_back(byte_out);
      busy_left = $urandom_range(3, 40);
    end
    if (busy_left > 0) begin
      tx_busy <= 1'b1;
      busy_left--;
    end else begin
      tx_busy <= 1'b0;
    end
  end

  initial begin
    logic [31:0] w;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(negedge clk);
    check(done == 1'b1, "done when idle");
    for (int n = 0; n < 60; n++) begin
      w = (n == 0) ? 32'h0010_0001 : $urandom;
      got_q = {};
      @(negedge clk);
      data_ready = 1'b1;
      data_in = w;
      @(negedge clk);
      data_ready = 1'b0;
      data_in = ~w;
      check(done == 1'b0, "busy with a word");
      wait (done == 1'b1);
      @(negedge clk);
      check(got_q.size() == 4, $sformatf("%0d bytes for one word", got_q.size()));
      if (got_q.size() == 4)
        check({got_q[0], got_q[1], got_q[2], got_q[3]} == w,
              $sformatf("word %h sent as %h %h %h %h", w, got_q[0], got_q[1], got_q[2], got_q[3]));
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 4 * 60) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
