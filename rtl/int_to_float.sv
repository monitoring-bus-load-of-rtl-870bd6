// int_to_float: unsigned integer to IEEE754 single precision.
//
// The sign is 0. The exponent is 127 plus the position of the leftmost one in
// the input (bit 0 is position 0); the 23-bit mantissa holds the bits below
// that one, moved up so that the bit just under the leading one lands in
// mantissa bit 22, with zeros filled in below. This is the conversion of the
// design description. For inputs of up to 24 bits it is exact. An input of 0
// gives +0.0 (all zeros), a choice of this design: the plain leading-one rule
// would give 1.0.
//
// Purely combinational.
module int_to_float #(
  parameter int unsigned IN_W = 21
) (
  input  logic [IN_W-1:0] value,
  output logic [31:0]     result
);

  localparam int unsigned POS_W = $clog2(IN_W);

  logic [POS_W-1:0] pos;
  logic [22:0]      mant;
  logic [IN_W+22:0] shifted;

  always_comb begin
    pos = '0;
    for (int i = 0; i < IN_W; i++)
      if (value[i]) pos = POS_W'(i);
    // place the leading one at bit IN_W+22, the mantissa is the 23 bits below it
    shifted = (IN_W + 23)'(value) << (IN_W + 22 - int'(pos));
    mant    = shifted[IN_W+21 -: 23];
    if (value == '0) result = 32'h0;
    else             result = {1'b0, 8'(127 + int'(pos)), mant};
  end

endmodule
