// tb_load_calc: load counters against a reference model.
//
// Random frames (standard and extended, identifiers inside and outside
// 0..31, extended identifier 0 against standard identifier 0) are presented
// one clock at a time as the CAN receiver would, mixed with sample ticks,
// some of them in the same clock as a frame. A reference model in the
// testbench keeps its own counters. After every tick the testbench checks
// that data_ready pulsed one clock later and that all frozen module loads,
// the overall load, the selected module's load and its number match the
// model; it also counts how often each of the four cases (idle, sample,
// update, sample+update) occurred and fails if one never did.
module tb_load_calc;
  import can_mon_pkg::*;
  import can_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  can_msg_t             msg = '0;
  msg_len_t             msg_len = '0;
  logic                 msg_valid = 1'b0;
  logic                 sample_tick = 1'b0;
  logic [MOD_IDX_W-1:0] module_sel = '0;
  load_t                load_freeze [NUM_MODULES];
  load_t                overall_freeze, module_freeze;
  logic [MOD_IDX_W-1:0] module_sel_freeze;
  logic                 data_ready;

  load_calc dut (.clk, .rst_n, .msg, .msg_len, .msg_valid, .sample_tick, .module_sel,
                 .load_freeze, .overall_freeze, .module_freeze, .module_sel_freeze, .data_ready);

  int checks = 0, failures = 0;
  int ref_load [NUM_MODULES];
  int ref_overall;
  int n_case [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one clock of stimulus; frame and/or tick
  task automatic step(input bit with_frame, input bit with_tick);
    bitq_t raw, line_bits;
    logic [28:0] id;
    bit ext;
    logic [3:0] dlc;
    int exp_ov, exp_mod;
    int exp_loads [NUM_MODULES];
    logic [MOD_IDX_W-1:0] sel;
    int kind;
    n_case[{with_frame, with_tick}]++;
    @(negedge clk);
    msg_valid   = 1'b0;
    sample_tick = with_tick;
    sel = MOD_IDX_W'($urandom);
    module_sel = sel;
    if (with_frame) begin
      ext = 1'($urandom);
      kind = $urandom_range(0, 3);
      case (kind)
        0: id = 29'($urandom_range(0, 31));
        1: id = 29'($urandom_range(0, 3));
        2: id = ext ? 29'($urandom) : 29'($urandom_range(32, 2047));
        default: id = 29'd0;
      endcase
      dlc = 4'($urandom_range(0, 15));
      build_frame(id, ext, 1'b0, dlc, {$urandom, $urandom}, raw, line_bits);
      msg = '0;
      foreach (raw[i]) msg[MSG_W-1-i] = raw[i];
      msg_len = msg_len_t'(raw.size());
      msg_valid = 1'b1;
      ref_overall += raw.size();
      if (id < NUM_MODULES) ref_load[id] += raw.size();
    end
    if (with_tick) begin
      exp_ov = ref_overall;
      exp_mod = ref_load[sel];
      exp_loads = ref_load;
      ref_overall = 0;
      foreach (ref_load[i]) ref_load[i] = 0;
    end
    @(negedge clk);
    msg_valid   = 1'b0;
    sample_tick = 1'b0;
    if (with_tick) begin
      check(data_ready == 1'b1, "data_ready after tick");
      check(int'(overall_freeze) == exp_ov, $sformatf("overall %0d expected %0d", overall_freeze, exp_ov));
      check(int'(module_freeze) == exp_mod, $sformatf("module %0d load %0d expected %0d", sel, module_freeze, exp_mod));
      check(module_sel_freeze == sel, "selected module number");
      for (int i = 0; i < NUM_MODULES; i++)
        check(int'(load_freeze[i]) == exp_loads[i], $sformatf("module %0d frozen %0d expected %0d", i, load_freeze[i], exp_loads[i]));
    end else begin
      check(data_ready == 1'b0, "no data_ready without tick");
    end
  endtask

  initial begin
    ref_overall = 0;
    foreach (ref_load[i]) ref_load[i] = 0;
    foreach (n_case[i]) n_case[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    step(1'b0, 1'b1);  // empty period
    repeat (40) begin
      repeat ($urandom_range(0, 60)) step($urandom_range(0, 2) != 0, 1'b0);
      step(1'($urandom), 1'b1);
    end
    step(1'b1, 1'b1);
    step(1'b0, 1'b0);
    foreach (n_case[i]) check(n_case[i] > 0, $sformatf("case %0d exercised", i));
    $display("cases: idle %0d sample %0d update %0d sample+update %0d", n_case[0], n_case[1], n_case[2], n_case[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
