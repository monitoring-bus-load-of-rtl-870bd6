// fp_div_model: behavioural model of a pipelined single-precision divider.
//
// Testbench-only stand-in for the FPGA vendor's floating point divider that
// the monitor expects outside its top level. result = dataa / datab, computed
// in double precision and rounded to the nearest single-precision value,
// appears LATENCY clocks after the operands. Only zero and normal numbers
// are handled, which is all the load monitor produces.
module fp_div_model #(
  parameter int unsigned LATENCY = 6
) (
  input  logic        clk,
  input  logic [31:0] dataa,
  input  logic [31:0] datab,
  output logic [31:0] result
);

  function automatic real single_to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_single(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, 1'b1, d[51:29]} + 25'(d[28]);  // round half up
    if (m[24]) begin
      m = m >> 1;
      e++;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  logic [31:0] pipe [LATENCY];

  always @(posedge clk) begin
    pipe[0] <= real_to_single(single_to_real(dataa) / single_to_real(datab));
    for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i - 1];
  end

  assign result = pipe[LATENCY - 1];

endmodule
