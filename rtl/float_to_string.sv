// float_to_string: IEEE754 percent value to a 7-character decimal field.
//
// The value (a bus load in percent, 0..100) is turned into hundredths of a
// percent using only the leading one and the first MANT_BITS mantissa bits:
//   hundredths = floor( {1, mantissa[22 -: MANT_BITS]} * 100 * 2^(E - MANT_BITS) )
// with E = exponent - 127. Dropping the lower mantissa bits keeps the
// multiplier small and makes the last digit at most one hundredth low; using
// ten bits follows the design description. The digits are then taken one by
// one as d_p = n / 10^(p-1) % 10 and looked up as ASCII characters.
//
// Output `text` is 7 characters, first (leftmost) in bits 55:48, laid out as
// " hhh,hh" right-aligned: a blank, up to three integer digits with leading
// zeros blanked (at least one digit is shown), a comma as the decimal
// separator and two decimals. Zero, negative numbers and denormals show
// "   0,00"; values of 1000 and above show "999,99" (this design's choice).
//
// Purely combinational.
module float_to_string
  import can_mon_pkg::*;
#(
  parameter int unsigned MANT_BITS = 10
) (
  input  logic [31:0] value,
  output num_field_t  text
);

  localparam int unsigned PROD_W = MANT_BITS + 8;  // (MANT_BITS+1)-bit mantissa times 100

  logic              sign;
  logic [7:0]        expo;
  logic [MANT_BITS:0] mant;
  logic [PROD_W-1:0] prod;
  int                e, sh;
  logic [16:0]       hund;     // 0..99999
  logic [3:0]        d [5];

  function automatic logic [7:0] digit_char(input logic [3:0] dv);
    unique case (dv)
      4'd0: return "0";
      4'd1: return "1";
      4'd2: return "2";
      4'd3: return "3";
      4'd4: return "4";
      4'd5: return "5";
      4'd6: return "6";
      4'd7: return "7";
      4'd8: return "8";
      4'd9: return "9";
      default: return "?";
    endcase
  endfunction

  always_comb begin
    sign = value[31];
    expo = value[30:23];
    mant = {1'b1, value[22 -: MANT_BITS]};
    prod = PROD_W'(mant) * PROD_W'(100);
    e    = int'(expo) - 127;
    sh   = int'(MANT_BITS) - e;
    if (sign || expo == 8'd0) begin
      hund = '0;
    end else if (e >= 10) begin
      hund = 17'd99999;              // 1024 % or more
    end else if (sh >= PROD_W) begin
      hund = '0;
    end else if (sh >= 0) begin
      hund = 17'(prod >> sh);
    end else begin
      hund = 17'(prod << (-sh));
    end
    if (hund > 17'd99999) hund = 17'd99999;

    for (int p = 0; p < 5; p++) d[p] = 4'((hund / (17'd10 ** p)) % 17'd10);

    text[55:48] = " ";
    text[47:40] = (d[4] == 0) ? " " : digit_char(d[4]);
    text[39:32] = (d[4] == 0 && d[3] == 0) ? " " : digit_char(d[3]);
    text[31:24] = digit_char(d[2]);
    text[23:16] = ",";
    text[15:8]  = digit_char(d[1]);
    text[7:0]   = digit_char(d[0]);
  end

endmodule
