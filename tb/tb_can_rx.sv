// tb_can_rx: self-checking testbench for the CAN receiver.
//
// Frames built by can_tb_pkg (standard and extended, DLC 0..8 and 9..15,
// remote frames, stuffing-heavy all-zero and all-one data, random data and
// identifiers, and the reference frame ID 2 / DLC 8 / data 1..8 whose
// destuffed bits are 00 21 00 20 40 60 80 A0 C0 E1 18 B3 2F F) are driven on
// the line_bits with bit times of 48 clocks (nominal), 50 clocks (a true 1 Mbit/s
// bit at 50 MHz) and 46 clocks, each followed by intermission and a random
// idle gap. For every frame the testbench checks the reported length, the
// stored bits and that exactly one msg_valid pulse arrived. At 48 clocks per
// bit it also checks that msg_valid comes 33..36 clocks after the start of the
// last end-of-frame bit (two synchroniser stages, the 31-clock sample point,
// one clock each for the state machine and the output register).
module tb_can_rx;
  import can_mon_pkg::*;
  import can_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rx = 1'b1;
  always #5 clk = ~clk;

  can_msg_t msg;
  msg_len_t msg_len;
  logic     msg_valid;

  can_rx dut (.clk, .rst_n, .rx, .msg, .msg_len, .msg_valid);

  int checks = 0, failures = 0;
  int n_valid = 0;
  longint cyc = 0, valid_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (msg_valid) begin
      n_valid   <= n_valid + 1;
      valid_cyc <= cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_and_check(input logic [28:0] id, input bit ext, input bit rtr,
                                input logic [3:0] dlc, input logic [63:0] data, input int period);
    bitq_t raw, line_bits;
    int n_before;
    longint last_bit_cyc;
    can_msg_t exp_msg;
    build_frame(id, ext, rtr, dlc, data, raw, line_bits);
    exp_msg = '0;
    foreach (raw[i]) exp_msg[MSG_W-1-i] = raw[i];
    n_before = n_valid;
    foreach (line_bits[i]) begin
      @(posedge clk);
      rx <= line_bits[i];
      if (i == line_bits.size() - 1) last_bit_cyc = cyc;
      repeat (period - 1) @(posedge clk);
    end
    // intermission and idle
    @(posedge clk);
    rx <= 1'b1;
    repeat ((3 + $urandom_range(0, 4)) * period) @(posedge clk);
    check(n_valid == n_before + 1, $sformatf("one frame reported (id %0h ext %0b dlc %0d, got %0d)", id, ext, dlc, n_valid - n_before));
    check(msg_len == msg_len_t'(raw.size()), $sformatf("length %0d expected %0d", msg_len, raw.size()));
    check(int'(msg_len) == frame_len(ext, rtr, dlc), "length matches the frame format");
    check(msg == exp_msg, $sformatf("message bits id %0h ext %0b dlc %0d period %0d", id, ext, dlc, period));
    if (period == 48) begin
      // last_bit_cyc is the clock edge at which the last bit was driven
      check(valid_cyc - last_bit_cyc >= 33 && valid_cyc - last_bit_cyc <= 36,
            $sformatf("latency %0d clocks", valid_cyc - last_bit_cyc));
    end
  endtask

  initial begin
    int periods[3] = '{48, 50, 47};
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (200) @(posedge clk);

    // the reference frame
    send_and_check(29'd2, 1'b0, 1'b0, 4'd8, 64'h0102030405060708, 48);
    check(msg[127:20] == 108'h00210020406080A0C0E118B32FF, "reference frame bits");
    check(msg_len == 8'd108, "reference frame length 108");

    foreach (periods[p]) begin
      for (int d = 0; d <= 8; d++) begin
        send_and_check(29'(d), 1'b0, 1'b0, 4'(d), {$urandom, $urandom}, periods[p]);
        send_and_check(29'(d * 3), 1'b1, 1'b0, 4'(d), {$urandom, $urandom}, periods[p]);
      end
      // stuffing-heavy frames
      send_and_check(29'd0, 1'b0, 1'b0, 4'd8, 64'h0, periods[p]);
      send_and_check(29'h7FF, 1'b0, 1'b0, 4'd8, '1, periods[p]);
      send_and_check(29'd0, 1'b1, 1'b0, 4'd8, 64'h0, periods[p]);
      send_and_check(29'h1FFF_FFFF, 1'b1, 1'b0, 4'd8, '1, periods[p]);
      // DLC above 8, remote frames
      send_and_check(29'd5, 1'b0, 1'b0, 4'd12, {$urandom, $urandom}, periods[p]);
      send_and_check(29'd7, 1'b0, 1'b1, 4'd8, 64'h0, periods[p]);
      send_and_check(29'd9, 1'b1, 1'b1, 4'd4, 64'h0, periods[p]);
      // random frames
      repeat (10)
        send_and_check(29'($urandom), 1'($urandom), 1'b0, 4'($urandom_range(0, 8)), {$urandom, $urandom}, periods[p]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
